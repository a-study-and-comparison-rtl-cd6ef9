// yava_mode1: Yavadunam squarer for numbers at or above the base (mode 1).
//
// For an N-bit p with its MSB set, p = B + d with base B = 2^(N-1) and
// excess ("deficiency") d = p without its MSB. Then
//   p^2 = B*(p + d) + d^2
// so the square is split at bit N-1:
//   LHS = d^2 mod B                 (the low N-1 bits, taken directly)
//   RHS = (p + d) + (d^2 >> (N-1))  (N+1 bits: sum plus the "carry" of d^2)
//   q   = {RHS, LHS}                (2N bits)
// The steps (drop the MSB, square the deficiency, split it into LHS and
// carry, add input and deficiency, add the carry, concatenate) follow the
// mode-1 algorithm of the design. Squaring the (N-1)-bit deficiency with the
// '*' operator is this design's choice; only its width matters here.
// The result is only meaningful when p[N-1] = 1; the enclosing squarer
// selects it in that case. Combinational.
module yava_mode1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   p,
  output logic [2*N-1:0] q
);

  localparam int unsigned M = N - 1;   // width of the deficiency

  logic [M-1:0]   def1;   // deficiency D = p with MSB removed
  logic [2*M-1:0] defsq;  // D^2 = X
  logic [M-1:0]   lhs;    // X[M-1:0]
  logic [M-1:0]   carry;  // X[2M-1:M]
  logic [N:0]     y;      // p + D
  logic [N:0]     rhs;    // p + D + carry

  always_comb begin
    def1  = p[M-1:0];
    defsq = def1 * def1;
    lhs   = defsq[M-1:0];
    carry = defsq[2*M-1:M];
    y     = {1'b0, p} + {2'b00, def1};
    rhs   = y + {2'b00, carry};
    q     = {rhs, lhs};
  end

endmodule
