// tb_yavadunam_squarer: self-check of the two-mode Yavadunam squarer.
// All 16 inputs at the default N = 4 and all 256 at N = 8 are applied. For
// p >= 2^(N-1) q must equal p*p and r must be 0 (mode 1); otherwise r must
// equal p*p and q must be 0 (mode 2). The waveform values 0011 -> q = 0,
// r = 001001 and 1001 -> q = 01010001, r = 0 are checked by name, and both
// modes must have been exercised.
module tb_yavadunam_squarer;
  logic [3:0]  p4;
  logic [7:0]  q4;
  logic [5:0]  r4;
  logic [7:0]  p8;
  logic [15:0] q8;
  logic [13:0] r8;
  int checks = 0, failures = 0;
  int n_mode1 = 0, n_mode2 = 0;

  yavadunam_squarer dut4 (.p(p4), .q(q4), .r(r4));
  yavadunam_squarer #(.N(8)) dut8 (.p(p8), .q(q8), .r(r8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    p8 = '0;
    for (int v = 0; v < 16; v++) begin
      p4 = 4'(v);
      #1;
      checks++;
      if (v >= 8) begin
        n_mode1++;
        if (q4 !== 8'(v * v) || r4 !== '0) begin
          failures++;
          $display("FAIL N=4 p=%0d -> q=%0d r=%0d (mode 1)", p4, q4, r4);
        end
      end else begin
        n_mode2++;
        if (r4 !== 6'(v * v) || q4 !== '0) begin
          failures++;
          $display("FAIL N=4 p=%0d -> q=%0d r=%0d (mode 2)", p4, q4, r4);
        end
      end
    end
    p4 = 4'b0011; #1;
    checks++;
    if (q4 !== 8'b00000000 || r4 !== 6'b001001) begin
      failures++; $display("FAIL 0011 -> q=%b r=%b", q4, r4);
    end
    p4 = 4'b1001; #1;
    checks++;
    if (q4 !== 8'b01010001 || r4 !== 6'b000000) begin
      failures++; $display("FAIL 1001 -> q=%b r=%b", q4, r4);
    end
    for (int v = 0; v < 256; v++) begin
      p8 = 8'(v);
      #1;
      checks++;
      if (v >= 128 ? (q8 !== 16'(v * v) || r8 !== '0)
                   : (r8 !== 14'(v * v) || q8 !== '0)) begin
        failures++;
        $display("FAIL N=8 p=%0d -> q=%0d r=%0d", p8, q8, r8);
      end
    end
    checks++;
    if (n_mode1 == 0 || n_mode2 == 0) begin failures++; $display("FAIL a mode never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
