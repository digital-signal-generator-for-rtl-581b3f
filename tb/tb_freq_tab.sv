// Testbench of freq_tab. For all 64 codes the phase increment is compared with
// round(f * 2^24 / 23437.5), computed here in floating point, where f is
// 74.0 + 0.1*code Hz for codes 0..20, 274.0 + 0.1*(code-21) Hz for codes
// 21..41 and 75.0 Hz otherwise; the resulting DDS frequency must be within
// 0.001 Hz of f, and the display digits must spell f.
module tb_freq_tab;
  logic [5:0]  freq;
  logic [23:0] phase_inc;
  logic [15:0] disp;
  int checks = 0, failures = 0;

  freq_tab dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f, fo;
    int d, exp_inc;
    logic [15:0] exp_disp;
    for (int c = 0; c < 64; c++) begin
      freq = 6'(c);
      if (c < 21) d = 740 + c;
      else if (c < 42) d = 2740 + c - 21;
      else d = 750;
      f = d / 10.0;
      exp_inc = int'($floor(f * 16777216.0 / 23437.5 + 0.5));
      exp_disp = {4'(d / 1000), 4'((d / 100) % 10), 4'((d / 10) % 10), 4'(d % 10)};
      #1;
      fo = phase_inc * 23437.5 / 16777216.0;
      checks += 3;
      if (phase_inc != 24'(exp_inc)) begin failures++; $display("FAIL code %0d inc %0d expected %0d", c, phase_inc, exp_inc); end
      if (fo - f > 0.001 || f - fo > 0.001) begin failures++; $display("FAIL code %0d f_o %f", c, fo); end
      if (disp != exp_disp) begin failures++; $display("FAIL code %0d disp %h expected %h", c, disp, exp_disp); end
    end
    // the two nominal frequencies
    freq = 6'd10; #1; checks++; if (phase_inc != 24'd53687) begin failures++; $display("FAIL 75 Hz"); end
    freq = 6'd31; #1; checks++; if (phase_inc != 24'd196853) begin failures++; $display("FAIL 275 Hz"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
