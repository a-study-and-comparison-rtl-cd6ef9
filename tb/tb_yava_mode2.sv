// tb_yava_mode2: self-check of the mode-2 Yavadunam datapath.
// Every input with its MSB clear is applied at the default N = 4 (0..7) and
// at N = 8 (0..127); r is compared with the integer square. The worked value
// 0011 -> 001001 is checked by name. The run counts how often the
// subtractor result p - D was negative and non-negative, and fails if
// either case never happened.
module tb_yava_mode2;
  logic [3:0]  p4;
  logic [5:0]  r4;
  logic [7:0]  p8;
  logic [13:0] r8;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  yava_mode2 dut4 (.p(p4), .r(r4));
  yava_mode2 #(.N(8)) dut8 (.p(p8), .r(r8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    p8 = '0;
    for (int v = 0; v < 8; v++) begin
      p4 = 4'(v);
      #1;
      checks++;
      if (r4 !== 6'(v * v)) begin
        failures++;
        $display("FAIL N=4 p=%0d -> r=%0d", p4, r4);
      end
      // independent classification: p - (8 - p) < 0  <=>  p < 4 (p = 0 wraps D to 0)
      if (v != 0 && v < 4) n_neg++;
      else n_pos++;
    end
    p4 = 4'b0011; #1;
    checks++;
    if (r4 !== 6'b001001) begin failures++; $display("FAIL 0011 -> %b", r4); end
    for (int v = 0; v < 128; v++) begin
      p8 = 8'(v);
      #1;
      checks++;
      if (r8 !== 14'(v * v)) begin
        failures++;
        $display("FAIL N=8 p=%0d -> r=%0d", p8, r8);
      end
    end
    $display("subtractor sign at N=4: negative=%0d non-negative=%0d", n_neg, n_pos);
    checks++;
    if (n_neg == 0 || n_pos == 0) begin failures++; $display("FAIL a sign case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
