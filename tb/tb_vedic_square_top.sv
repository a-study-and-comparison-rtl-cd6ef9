// tb_vedic_square_top: end-to-end check of both Vedic units at their
// default width (N = 4), with no parameter overrides.
//
// Multiplier: all 256 (x, y) pairs, mult compared with the integer product.
// Squarer: all 16 values of p, the live output (q in mode 1, r in mode 2)
// compared with p*p and the other output with 0. Squaring: for every p the
// multiplier is also driven with x = y = p and its product must equal the
// squarer's result, the comparison the two units are built for.
// Mechanisms counted (each must occur at least once): mode 1, mode 2, a
// negative and a non-negative subtractor result in mode 2, and a carry out
// of the first and of the second ripple-carry adder of the multiplier.
module tb_vedic_square_top;
  logic [3:0] x, y, p;
  logic [7:0] mult, q;
  logic [5:0] r;
  int checks = 0, failures = 0;
  int n_mode1 = 0, n_mode2 = 0, n_neg = 0, n_pos = 0, n_cd = 0, n_cd1 = 0;

  vedic_square_top dut (.x(x), .y(y), .mult(mult), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : stimulus
    p = '0;
    for (int i = 0; i < 256; i++) begin
      {x, y} = 8'(i);
      #1;
      expect_eq($sformatf("mult %0d*%0d", x, y), int'(mult), int'(x) * int'(y));
      if (dut.u_ut.g_lvl[2].g_i[0].g_j[0].g_node.cd)  n_cd++;
      if (dut.u_ut.g_lvl[2].g_i[0].g_j[0].g_node.cd1) n_cd1++;
    end
    for (int v = 0; v < 16; v++) begin
      p = 4'(v);
      x = 4'(v);
      y = 4'(v);
      #1;
      if (v >= 8) begin
        n_mode1++;
        expect_eq($sformatf("q for p=%0d", v), int'(q), v * v);
        expect_eq($sformatf("r for p=%0d", v), int'(r), 0);
        expect_eq($sformatf("UT vs Yavadunam p=%0d", v), int'(mult), int'(q));
      end else begin
        n_mode2++;
        if (dut.u_yava.u_g2.neg) n_neg++;
        else n_pos++;
        expect_eq($sformatf("r for p=%0d", v), int'(r), v * v);
        expect_eq($sformatf("q for p=%0d", v), int'(q), 0);
        expect_eq($sformatf("UT vs Yavadunam p=%0d", v), int'(mult), int'(r));
      end
    end
    $display("mode1=%0d mode2=%0d negative=%0d non-negative=%0d carry1=%0d carry2=%0d",
             n_mode1, n_mode2, n_neg, n_pos, n_cd, n_cd1);
    expect_eq("mode 1 occurred",               int'(n_mode1 > 0), 1);
    expect_eq("mode 2 occurred",               int'(n_mode2 > 0), 1);
    expect_eq("negative subtraction occurred", int'(n_neg > 0),   1);
    expect_eq("positive subtraction occurred", int'(n_pos > 0),   1);
    expect_eq("first adder carry occurred",    int'(n_cd > 0),    1);
    expect_eq("second adder carry occurred",   int'(n_cd1 > 0),   1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
