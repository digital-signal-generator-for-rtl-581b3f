// Testbench of clk_gen at its defaults (24 MHz / 4 and / 1024).
// Checks that reset_int follows reset at once and is released two clocks
// after it, that ce6m comes every 4 and ce24k every 1024 clocks, that every
// ce24k coincides with a ce6m (256 PWM steps per DDS sample), and that the
// divided clocks clk6m and clk24k have those periods and a 50 % duty cycle.
module tb_clk_gen;
  logic clk24m = 0, reset;
  logic reset_int, clk6m, clk24k, ce6m, ce24k;
  int checks = 0, failures = 0;

  clk_gen dut (.*);

  always #5 clk24m = ~clk24m;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, last6 = -1, last24 = -1, n6 = 0, n24 = 0, hi6 = 0, hi24 = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at clock %0d", what, n); end
  endtask

  initial begin
    reset = 0;
    @(posedge clk24m); #1;
    reset = 1; #1;
    chk(reset_int == 1, "reset_int not asserted asynchronously");
    repeat (3) @(posedge clk24m);
    #1 reset = 0;
    @(posedge clk24m); #1 chk(reset_int == 1, "reset_int released early");
    @(posedge clk24m); #1 chk(reset_int == 0, "reset_int not released after two clocks");
    e6 = -1;  // forget clk6m edges from before the reset
    // clock index 0 is the first cycle after release
    for (n = 0; n < 10 * 1024; n++) begin
      if (ce6m) begin
        if (last6 >= 0) chk(n - last6 == 4, "ce6m spacing");
        else chk(n == 3, "first ce6m");
        last6 = n; n6++;
      end
      if (ce24k) begin
        chk(ce6m == 1, "ce24k without ce6m");
        if (last24 >= 0) chk(n - last24 == 1024, "ce24k spacing");
        else chk(n == 1023, "first ce24k");
        last24 = n; n24++;
      end
      hi6 += int'(clk6m); hi24 += int'(clk24k);
      @(posedge clk24m); #1;
    end
    chk(n6 == 10 * 256, "number of ce6m");
    chk(n24 == 10, "number of ce24k");
    chk(hi6 == 10 * 512, "clk6m duty");
    chk(hi24 == 10 * 512, "clk24k duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clk6m toggles every 2 clocks: check each edge spacing
  int e6 = -1, nn = 0;
  always @(posedge clk24m) nn <= nn + 1;
  always @(clk6m) if (!reset_int) begin
    if (e6 >= 0) begin checks++; if (nn - e6 != 2) begin failures++; $display("FAIL clk6m edge spacing"); end end
    e6 = nn;
  end
endmodule
