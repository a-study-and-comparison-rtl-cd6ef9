// ripple_carry_adder: W-bit ripple-carry adder.
//
// A chain of W full adders: bit i adds a[i], b[i] and the carry out of bit
// i-1 (cin for bit 0). The carry ripples from bit 0 to cout, so the delay
// grows linearly with W. The UT multiplier uses three of these at W = 4; the
// full-adder equations (majority carry, XOR sum) are this design's choice.
// Combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]     = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (a[i] & carry[i]) | (b[i] & carry[i]);
  end

  assign cout = carry[W];

endmodule
