// tb_vedic_mult_2x2: exhaustive self-check of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied and the 4-bit result compared with the
// integer product; the worked example 11 x 11 = 1001 is checked by name.
module tb_vedic_mult_2x2;
  logic [1:0] a, b;
  logic [3:0] y;
  int checks = 0, failures = 0;

  vedic_mult_2x2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] expected);
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL %0d x %0d -> %0d, expected %0d", a, b, y, expected);
    end
  endtask

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        check(4'(i * j));
      end
    end
    a = 2'b11;
    b = 2'b11;
    #1;
    check(4'b1001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
