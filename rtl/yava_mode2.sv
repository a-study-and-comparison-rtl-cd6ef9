// yava_mode2: Yavadunam squarer for numbers below the base (mode 2).
//
// For an N-bit p with its MSB clear, base B = 2^(N-1) and deficiency
// D = B - p, formed as the (N-1)-bit two's complement of p ("bit
// reduction": the MSB is dropped first). Then
//   p^2 = B*(p - D) + D^2
// where p - D may be negative. The square is split at bit N-1:
//   LHS = D^2 mod B                        (low N-1 bits of D^2)
//   carry = D^2 >> (N-1)
//   RHS = carry + (p - D)   if p >= D      (subtractor result positive)
//       = carry - (D - p)   if p <  D      (subtractor result negative)
//   r   = {RHS, LHS}                       (2N-2 bits)
// Two comparators decide the sign, the magnitude |p - D| is taken, and a mux
// picks the adder or the subtractor result, as in the design's mode-2
// schematic (inverter and adder for the two's complement, magnitude
// comparators, adder, subtractor and output mux). For p = 0 the (N-1)-bit
// deficiency wraps to 0; the datapath then yields 0, which is still the
// correct square. The result is only meaningful when p[N-1] = 0; the
// enclosing squarer selects it in that case. Squaring D with '*' is this
// design's choice. Combinational.
module yava_mode2 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   p,
  output logic [2*N-3:0] r
);

  localparam int unsigned M = N - 1;   // width of the reduced number

  logic [M-1:0]   cmp;    // bit-reduced input
  logic [M-1:0]   def2;   // deficiency D = two's complement of cmp
  logic [2*M-1:0] sq;     // D^2
  logic [M-1:0]   lhs;    // low M bits of D^2
  logic [M-1:0]   carry;  // high M bits of D^2
  logic           neg;    // p - D is negative
  logic [M-1:0]   y;      // |p - D|
  logic [M-1:0]   rhs;

  always_comb begin
    cmp   = p[M-1:0];
    def2  = ~cmp + 1'b1;
    sq    = def2 * def2;
    lhs   = sq[M-1:0];
    carry = sq[2*M-1:M];
    neg   = cmp < def2;
    y     = neg ? (def2 - cmp) : (cmp - def2);
    rhs   = neg ? (carry - y) : (carry + y);
    r     = {rhs, lhs};
  end

endmodule
