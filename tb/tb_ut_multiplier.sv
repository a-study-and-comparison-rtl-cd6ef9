// tb_ut_multiplier: self-check of the Urdhva-Tiryagbhyam multiplier.
// The default 4-bit instance is checked on all 256 operand pairs, including
// the worked examples 1011 x 1011 = 01111001 and 0100 x 0100 = 00010000.
// An 8-bit instance (two levels of hierarchy) is checked on all 65536 pairs
// and 16-bit and 32-bit instances (the widest the hierarchy is described
// for) on random pairs. Expected values are integer
// products. The run also counts how often the first and second adder carries
// of the 4-bit instance are set, and fails if either never is.
module tb_ut_multiplier;
  logic [3:0]  x4, y4;
  logic [7:0]  m4;
  logic [7:0]  x8, y8;
  logic [15:0] m8;
  logic [15:0] x16, y16;
  logic [31:0] m16;
  logic [31:0] x32, y32;
  logic [63:0] m32;
  int checks = 0, failures = 0;
  int n_cd = 0, n_cd1 = 0;

  ut_multiplier dut4 (.x(x4), .y(y4), .mult(m4));
  ut_multiplier #(.N(8))  dut8  (.x(x8),  .y(y8),  .mult(m8));
  ut_multiplier #(.N(16)) dut16 (.x(x16), .y(y16), .mult(m16));
  ut_multiplier #(.N(32)) dut32 (.x(x32), .y(y32), .mult(m32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    x8 = '0; y8 = '0; x16 = '0; y16 = '0; x32 = '0; y32 = '0;
    for (int i = 0; i < 256; i++) begin
      {x4, y4} = 8'(i);
      #1;
      checks++;
      if (m4 !== 8'(int'(x4) * int'(y4))) begin
        failures++;
        $display("FAIL N=4 %0d x %0d -> %0d", x4, y4, m4);
      end
      if (dut4.g_lvl[2].g_i[0].g_j[0].g_node.cd)  n_cd++;
      if (dut4.g_lvl[2].g_i[0].g_j[0].g_node.cd1) n_cd1++;
    end
    x4 = 4'b1011; y4 = 4'b1011; #1;
    checks++;
    if (m4 !== 8'b01111001) begin failures++; $display("FAIL 1011x1011 -> %b", m4); end
    x4 = 4'b0100; y4 = 4'b0100; #1;
    checks++;
    if (m4 !== 8'b00010000) begin failures++; $display("FAIL 0100x0100 -> %b", m4); end

    for (int i = 0; i < 65536; i++) begin
      {x8, y8} = 16'(i);
      #1;
      checks++;
      if (m8 !== 16'(int'(x8) * int'(y8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d x %0d -> %0d", x8, y8, m8);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      if (i == 0) begin x16 = '1; y16 = '1; end
      #1;
      checks++;
      if (m16 !== 32'(longint'(x16) * longint'(y16))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d x %0d -> %0d", x16, y16, m16);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      x32 = $urandom;
      y32 = $urandom;
      if (i == 0) begin x32 = '1; y32 = '1; end
      #1;
      checks++;
      if (m32 !== 64'(x32) * 64'(y32)) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 %0d x %0d -> %0d", x32, y32, m32);
      end
    end
    $display("adder carries at N=4: cd=%0d cd1=%0d", n_cd, n_cd1);
    checks++;
    if (n_cd == 0 || n_cd1 == 0) begin
      failures++;
      $display("FAIL an adder carry never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
