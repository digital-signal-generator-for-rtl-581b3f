// Testbench of display_logic with a short debounce (DEB_TICKS = 4, a tick
// every second clock). Checks the segment patterns for a frequency
// (" 75.0", "275.0") and phase values ("  90", "   0", " 180"), that a debounced
// press toggles between them, that a bounce shorter than the debounce time
// and the release of the button do not toggle, and that reset shows the
// frequency again.
module tb_display_logic;
  localparam int DEB = 4;
  logic clk = 0, rst, tick, pb_sw;
  logic [15:0] freq_disp, phase_disp;
  logic [31:0] display;
  logic show_phase;
  int checks = 0, failures = 0, cyc = 0, toggles = 0;

  display_logic #(.DEB_TICKS(DEB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign tick = cyc[0];
  always @(posedge clk) if (!rst && show_phase != show_q) toggles++;
  logic show_q = 0;
  always @(posedge clk) show_q <= show_phase;

  // {g,f,e,d,c,b,a} of 0..9, and blank
  localparam logic [6:0] SEG [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
  function automatic logic [7:0] s(input int d, input bit dp = 0);
    return {dp, (d < 0) ? 7'h00 : SEG[d]};
  endfunction

  task automatic expect_disp(input logic [31:0] e, input string what);
    checks++;
    if (display !== e) begin failures++; $display("FAIL %s: %h expected %h", what, display, e); end
  endtask

  task automatic wait_ticks(input int n);
    repeat (2 * n) @(posedge clk);
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pb_sw = 0;
    freq_disp = 16'h0750; phase_disp = 16'h0090;
    wait_ticks(3);
    rst = 0;
    wait_ticks(1);
    expect_disp({s(-1), s(7), s(5, 1), s(0)}, "75.0 Hz");
    freq_disp = 16'h2750; wait_ticks(1);
    expect_disp({s(2), s(7), s(5, 1), s(0)}, "275.0 Hz");
    // short bounce: 2 ticks high
    pb_sw = 1; wait_ticks(2); pb_sw = 0; wait_ticks(10);
    checks++; if (show_phase) begin failures++; $display("FAIL bounce toggled"); end
    // real press
    pb_sw = 1; wait_ticks(DEB + 4);
    checks++; if (!show_phase) begin failures++; $display("FAIL press did not toggle"); end
    expect_disp({s(-1), s(-1), s(9), s(0)}, "90 deg");
    phase_disp = 16'h0000; wait_ticks(1);
    expect_disp({s(-1), s(-1), s(-1), s(0)}, "0 deg");
    phase_disp = 16'h0180; wait_ticks(1);
    expect_disp({s(-1), s(1), s(8), s(0)}, "180 deg");
    // release: no toggle
    pb_sw = 0; wait_ticks(DEB + 4);
    checks++; if (!show_phase) begin failures++; $display("FAIL release toggled"); end
    // second press: back to frequency
    pb_sw = 1; wait_ticks(DEB + 4); pb_sw = 0; wait_ticks(DEB + 4);
    checks++; if (show_phase) begin failures++; $display("FAIL second press"); end
    expect_disp({s(2), s(7), s(5, 1), s(0)}, "back to frequency");
    // press, then reset returns to frequency
    pb_sw = 1; wait_ticks(DEB + 4); pb_sw = 0;
    checks++; if (!show_phase) begin failures++; $display("FAIL third press"); end
    rst = 1; wait_ticks(1); rst = 0; wait_ticks(1);
    checks++; if (show_phase) begin failures++; $display("FAIL reset"); end
    checks++; if (toggles != 3) begin failures++; $display("FAIL %0d toggles", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
