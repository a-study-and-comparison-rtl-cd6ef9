// vedic_square_top: the two compared Vedic arithmetic units side by side.
//
// One N-bit Urdhva-Tiryagbhyam multiplier (x * y -> mult) and one N-bit
// Yavadunam squarer (p -> q in mode 1, p -> r in mode 2). The two units
// share nothing; each has its own ports so they can be exercised and
// compared independently. Squaring a number with the UT multiplier means
// driving x = y. The document evaluates both units at N = 4, the default.
// Combinational.
module vedic_square_top #(
  parameter int unsigned N = 4
) (
  // Urdhva-Tiryagbhyam multiplier
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] mult,
  // Yavadunam squarer
  input  logic [N-1:0]   p,
  output logic [2*N-1:0] q,
  output logic [2*N-3:0] r
);

  ut_multiplier #(.N(N)) u_ut (.x(x), .y(y), .mult(mult));

  yavadunam_squarer #(.N(N)) u_yava (.p(p), .q(q), .r(r));

endmodule
