// tb_yava_mode1: self-check of the mode-1 Yavadunam datapath.
// Every input with its MSB set is applied at the default N = 4 (8..15) and
// at N = 8 (128..255); q is compared with the integer square. The worked
// value 1001 -> 01010001 is checked by name.
module tb_yava_mode1;
  logic [3:0]  p4;
  logic [7:0]  q4;
  logic [7:0]  p8;
  logic [15:0] q8;
  int checks = 0, failures = 0;

  yava_mode1 dut4 (.p(p4), .q(q4));
  yava_mode1 #(.N(8)) dut8 (.p(p8), .q(q8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    p8 = 8'd128;
    for (int v = 8; v < 16; v++) begin
      p4 = 4'(v);
      #1;
      checks++;
      if (q4 !== 8'(v * v)) begin
        failures++;
        $display("FAIL N=4 p=%0d -> q=%0d", p4, q4);
      end
    end
    p4 = 4'b1001; #1;
    checks++;
    if (q4 !== 8'b01010001) begin failures++; $display("FAIL 1001 -> %b", q4); end
    for (int v = 128; v < 256; v++) begin
      p8 = 8'(v);
      #1;
      checks++;
      if (q8 !== 16'(v * v)) begin
        failures++;
        $display("FAIL N=8 p=%0d -> q=%0d", p8, q8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
