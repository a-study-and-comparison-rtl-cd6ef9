// vedic_mult_2x2: 2-bit by 2-bit Urdhva-Tiryagbhyam ("vertically and
// crosswise") multiplier.
//
// The product of A1A0 and B1B0 is formed in three columns:
//   vertical   Y0      = A0&B0
//   crosswise  C1 Y1   = A1&B0 + A0&B1        (first half adder)
//   vertical   C2 Y2   = A1&B1 + C1           (second half adder)
// and the result is y = {C2, Y2, Y1, Y0}. The structure (four AND terms and
// two half adders, carry C1 passed from the crosswise to the upper vertical
// column) follows the design's block diagram exactly. Combinational.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] y
);

  logic p00, p10, p01, p11;   // partial products Ai&Bj
  logic y1, c1, y2, c2;

  always_comb begin
    p00 = a[0] & b[0];
    p10 = a[1] & b[0];
    p01 = a[0] & b[1];
    p11 = a[1] & b[1];
  end

  half_adder u_ha_cross (.a(p10), .b(p01), .s(y1), .c(c1));
  half_adder u_ha_upper (.a(p11), .b(c1),  .s(y2), .c(c2));

  assign y = {c2, y2, y1, p00};

endmodule
