// Testbench of phase_tab. The expected phase shift words for 0..180 degrees in
// 15 degree steps are listed here (round(deg * 1024 / 360)); codes 13..15
// must give 180 degrees. The display digits must spell the angle.
module tb_phase_tab;
  logic [3:0] phase;
  logic [9:0] phase_shift;
  logic [15:0] disp;
  int checks = 0, failures = 0;
  int unsigned exp_ps [13] = '{0, 43, 85, 128, 171, 213, 256, 299, 341, 384, 427, 469, 512};

  phase_tab dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, deg;
    logic [15:0] exp_disp;
    for (int c = 0; c < 16; c++) begin
      k = (c > 12) ? 12 : c;
      deg = 15 * k;
      exp_disp = {4'd0, 4'(deg / 100), 4'((deg / 10) % 10), 4'(deg % 10)};
      phase = 4'(c);
      #1;
      checks += 2;
      if (phase_shift != 10'(exp_ps[k])) begin failures++; $display("FAIL code %0d shift %0d", c, phase_shift); end
      if (disp != exp_disp) begin failures++; $display("FAIL code %0d disp %h", c, disp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
