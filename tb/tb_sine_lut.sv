// Testbench of sine_lut at its defaults (1024 x 8, 5.25 % duty limit).
// Each word is compared with 128 + 114.56*sin(2*pi*k/1024) rounded to the
// nearest integer, the two ports are read with different addresses in the
// same cycle, the one-cycle read latency is checked, and the words must stay
// within 13..243 (duty 5.1 % .. 94.9 % after rounding) with both extremes
// reached near a quarter and three quarters of the table.
module tb_sine_lut;
  logic clk = 0;
  logic [9:0] addr_a, addr_b;
  logic [7:0] data_a, data_b;
  int checks = 0, failures = 0;
  int mn = 255, mx = 0, mn_at = -1, mx_at = -1;

  sine_lut dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_word(input int k);
    real v;
    v = 128.0 + 114.56 * $sin(2.0 * 3.141592653589793 * k / 1024.0);
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_a = 0; addr_b = 0;
    for (int k = 0; k < 1024; k++) begin
      addr_a = 10'(k);
      addr_b = 10'(1023 - k);
      #1;
      // latency: the outputs still show the previous addresses
      if (k > 0) begin
        checks++;
        if (data_a != 8'(ref_word(k - 1))) begin failures++; $display("FAIL latency a k=%0d", k); end
      end
      @(posedge clk); #1;
      checks += 2;
      if (data_a != 8'(ref_word(k))) begin
        failures++; $display("FAIL a[%0d]=%0d expected %0d", k, data_a, ref_word(k));
      end
      if (data_b != 8'(ref_word(1023 - k))) begin
        failures++; $display("FAIL b[%0d]=%0d expected %0d", 1023 - k, data_b, ref_word(1023 - k));
      end
      if (int'(data_a) < mn) begin mn = int'(data_a); mn_at = k; end
      if (int'(data_a) > mx) begin mx = int'(data_a); mx_at = k; end
    end
    checks += 2;
    if (mn != 13 || mx != 243) begin failures++; $display("FAIL range %0d..%0d", mn, mx); end
    if (mx_at < 250 || mx_at > 262 || mn_at < 762 || mn_at > 774) begin
      failures++; $display("FAIL extremes at %0d and %0d", mx_at, mn_at);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
