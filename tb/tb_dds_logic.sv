// Testbench of dds_logic at its default widths (M=24, P=10, N=10).
// A reference model of the increment register and accumulator, kept in
// 64-bit integers, predicts the quantized address after every clock; the
// stimulus changes the increment and shift at random, holds ce low at
// random, and checks an exact one-step-per-sample ramp, the one-sample delay
// of a new increment and the accumulator wrap.
module tb_dds_logic;
  localparam int M = 24, P = 10, N = 10;
  logic clk = 0, rst, ce;
  logic [M-1:0] phase_inc;
  logic [P-1:0] phase_shift;
  logic [N-1:0] addr;
  int checks = 0, failures = 0, wraps = 0;
  longint unsigned inc_m, acc_m, acc_prev;

  dds_logic #(.M(M), .P(P), .N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] expect_addr();
    longint unsigned ph;
    ph = (acc_m + (longint'(phase_shift) << (M - P))) % (64'd1 << M);
    return N'(ph >> (M - N));
  endfunction

  task automatic step(input bit en);
    ce = en;
    @(posedge clk);
    if (en) begin
      acc_prev = acc_m;
      acc_m = (acc_m + inc_m) % (64'd1 << M);
      if (acc_m < acc_prev) wraps++;
      inc_m = 64'(phase_inc);
    end
    #1;
    checks++;
    if (addr !== expect_addr()) begin
      failures++;
      $display("FAIL addr=%0d expected %0d (acc=%0d shift=%0d)", addr, expect_addr(), acc_m, phase_shift);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 0; phase_inc = '0; phase_shift = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0; inc_m = 0; acc_m = 0;
    // Ramp: one ROM word per sample
    phase_inc = M'(1 << (M - N));
    step(1);
    checks++;
    if (addr !== 0) begin failures++; $display("FAIL new increment applied too early"); end
    for (int i = 1; i <= 1100; i++) begin
      step(1);
      checks++;
      if (addr !== N'(i)) begin failures++; $display("FAIL ramp %0d got %0d", i, addr); end
    end
    // 90 degree shift: 256 words ahead
    phase_shift = P'(256);
    #1; checks++;
    if (addr !== N'(expect_addr())) failures++;
    // Random increments, shifts and enables
    for (int i = 0; i < 20000; i++) begin
      if (i % 500 == 0) phase_inc = M'($urandom);
      if (i % 700 == 0) phase_shift = P'($urandom);
      step(($urandom % 4) != 0);
    end
    // Reset clears the accumulator
    rst = 1; @(posedge clk); #1; rst = 0; acc_m = 0; inc_m = 0;
    checks++;
    if (addr !== expect_addr()) begin failures++; $display("FAIL after reset"); end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL accumulator never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
