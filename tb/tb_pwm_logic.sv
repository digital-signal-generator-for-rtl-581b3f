// Testbench of pwm_logic (R = 8) with ce on every fourth clock, as in the
// generator. It measures every period of both outputs: the period must be 256
// strobes (1024 clocks) and the high time data * 4 clocks, where data is the
// sample present at the period start; samples changed in mid-period must not
// affect the running period. Extremes 0 and 255 are included.
module tb_pwm_logic;
  logic clk = 0, rst, ce;
  logic [7:0] data0, data1;
  logic pwm0, pwm1;
  int checks = 0, failures = 0;
  int cyc = 0;

  pwm_logic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 4 == 3) && !rst;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi0, hi1;
  logic [7:0] exp0, exp1;
  initial begin
    rst = 1; data0 = 0; data1 = 0;
    repeat (3) @(posedge clk);
    // release reset while a strobe is pending: the next edge starts period 0
    do begin @(posedge clk); #1; end while (cyc % 4 != 3);
    rst = 0;
    for (int p = 0; p < 200; p++) begin
      case (p)
        0: begin exp0 = 8'd0;   exp1 = 8'd255; end
        1: begin exp0 = 8'd128; exp1 = 8'd13;  end
        2: begin exp0 = 8'd243; exp1 = 8'd1;   end
        default: begin exp0 = 8'($urandom); exp1 = 8'($urandom); end
      endcase
      data0 = exp0; data1 = exp1;
      hi0 = 0; hi1 = 0;
      for (int c = 0; c < 1024; c++) begin
        @(posedge clk); #1;
        if (c == 200) begin data0 = ~exp0; data1 = ~exp1; end  // mid-period change
        hi0 += int'(pwm0); hi1 += int'(pwm1);
      end
      checks += 2;
      if (hi0 != 4 * exp0) begin failures++; $display("FAIL p%0d pwm0 high %0d for %0d", p, hi0, exp0); end
      if (hi1 != 4 * exp1) begin failures++; $display("FAIL p%0d pwm1 high %0d for %0d", p, hi1, exp1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
