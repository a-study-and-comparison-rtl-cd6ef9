// ut_multiplier: N-bit by N-bit Urdhva-Tiryagbhyam (UT) multiplier, built
// hierarchically from 2x2 Vedic multipliers.
//
// The operands are cut into 2-bit digits. Level 1 multiplies every pair of
// digits with a 2x2 Vedic multiplier. Each higher level L treats the operands
// as W = 2^L-bit digits and forms each W x W product from four products of
// the level below, with halves of H = W/2 bits:
//   l1 = xL*yL   l2 = xH*yL   l3 = xL*yH   l4 = xH*yH
// combined by three W-bit ripple-carry adders:
//   add1 = l2 + l3                          (crosswise terms, carry cd)
//   add2 = add1 + {0, l1[W-1:H]}            (upper half of l1, carry cd1)
//   add3 = l4 + {0.., cd|cd1, add2[W-1:H]}  (vertical high term)
//   product = {add3, add2[H-1:0], l1[H-1:0]}
// At N = 4 there is one such node: four 2x2 multipliers and three 4-bit
// ripple-carry adders, arranged and wired as in the design's 4-bit block
// diagram. The two carries cd and cd1 can never both be 1
// (l2 + l3 + l1>>H < 2^(W+1)), so OR-ing them into bit H of the third
// adder's operand is exact; which wire carries the second adder's carry is
// this design's choice. The third adder's carry out is always 0 because the
// product fits in 2W bits, so it is left open.
//
// N must be a power of two, at least 2. The document's configuration is
// N = 4; it describes wider multipliers (8 and 32 bits) as built the same way,
// which the levels here do (N = 8 adds a level of four 4-bit nodes feeding
// one 8-bit node). The level-by-level generate, rather than a module that
// instantiates itself, is this design's choice. Combinational.
module ut_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] mult
);

  localparam int unsigned LV = $clog2(N);   // number of levels

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("ut_multiplier: N=%0d must be a power of two >= 2", N);
  end

  for (genvar L = 1; L <= LV; L++) begin : g_lvl
    localparam int unsigned W = 2 ** L;     // digit width at this level
    localparam int unsigned C = N / W;      // digits per operand
    localparam int unsigned H = W / 2;

    // prod[i][j] = (x digit i) * (y digit j), digits W bits wide
    logic [2*W-1:0] prod [C][C];

    for (genvar i = 0; i < C; i++) begin : g_i
      for (genvar j = 0; j < C; j++) begin : g_j
        if (L == 1) begin : g_leaf
          vedic_mult_2x2 u_m2 (.a(x[2*i +: 2]), .b(y[2*j +: 2]), .y(prod[i][j]));
        end else begin : g_node
          logic [W-1:0] l1, l2, l3, l4;     // partial products
          logic [W-1:0] add1, add2, add3;   // ripple-carry adder sums
          logic         cd, cd1, cd2;       // adder carries out
          logic [W-1:0] opb2, opb3;         // zero-extended second operands

          assign l1 = g_lvl[L-1].prod[2*i][2*j];
          assign l2 = g_lvl[L-1].prod[2*i+1][2*j];
          assign l3 = g_lvl[L-1].prod[2*i][2*j+1];
          assign l4 = g_lvl[L-1].prod[2*i+1][2*j+1];

          ripple_carry_adder #(.W(W)) u_add1 (
            .a(l2), .b(l3), .cin(1'b0), .sum(add1), .cout(cd)
          );

          always_comb begin
            opb2 = '0;
            opb2[H-1:0] = l1[W-1:H];
          end

          ripple_carry_adder #(.W(W)) u_add2 (
            .a(add1), .b(opb2), .cin(1'b0), .sum(add2), .cout(cd1)
          );

          always_comb begin
            opb3 = '0;
            opb3[H-1:0] = add2[W-1:H];
            opb3[H]     = cd | cd1;
          end

          // cd2 is left open: the product always fits in 2W bits.
          ripple_carry_adder #(.W(W)) u_add3 (
            .a(l4), .b(opb3), .cin(1'b0), .sum(add3), .cout(cd2)
          );

          assign prod[i][j] = {add3, add2[H-1:0], l1[H-1:0]};
        end
      end
    end
  end

  assign mult = g_lvl[LV].prod[0][0];

endmodule
