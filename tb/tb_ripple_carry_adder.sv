// tb_ripple_carry_adder: self-check of the ripple-carry adder, exhaustive
// at the default width of 4 (all a, b and carry-in values) and random at
// width 12. {cout, sum} is compared with the integer a + b + cin.
module tb_ripple_carry_adder;
  localparam int unsigned WB = 12;
  logic [3:0]    a4, b4, s4;
  logic          ci4, co4;
  logic [WB-1:0] a12, b12, s12;
  logic          ci12, co12;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  ripple_carry_adder #(.W(WB)) dut12 (.a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    a12 = '0; b12 = '0; ci12 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a12 = WB'($urandom);
      b12 = WB'($urandom);
      ci12 = 1'($urandom);
      #1;
      checks++;
      if ({co12, s12} !== (WB+1)'(int'(a12) + int'(b12) + int'(ci12))) begin
        failures++;
        $display("FAIL W=12 %0d + %0d + %0d -> %0d", a12, b12, ci12, {co12, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
