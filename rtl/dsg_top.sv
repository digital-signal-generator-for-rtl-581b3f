// Two-channel digital sine generator for a railway track-circuit signal supply.
//
// A 24 MHz board clock drives everything. clk_gen derives the 6 MHz PWM rate
// and the 23.4375 kHz DDS sample rate as clock-enable strobes. The 6-bit freq
// code selects the phase increment (freq_tab) and the 4-bit phase code the
// phase shift (phase_tab). Two identical DDS channels (dds_logic) run in lock
// step from the same increment: channel 0 with no shift, channel 1 shifted by
// the selected angle. Both read the shared dual-port sine ROM (sine_lut), and
// pwm_logic turns each 8-bit sample into one 256-step PWM period at 6 MHz on
// pwm0 and pwm1, which drive the power amplifiers. display_logic shows the
// frequency or, after a press of pb_sw, the phase shift on four seven-segment
// digits.
//
// This structure, all bus widths and rates follow the generator's block
// diagram. Running the whole design in one clock domain with enables, and
// the code tables, display format and debounce, are this design's choices.
//
// Latency: a new freq or phase code reaches the outputs within two DDS samples
// (about 85 us). pwm0 and pwm1 are registered. clk6m, clk24k and show_phase
// are left unused here: the design runs on the strobes, and the display mode
// is visible on the display itself.
module dsg_top
  import dsg_pkg::*;
#(
  parameter int unsigned DEB_TICKS = 240   // push button debounce, in DDS samples
) (
  input  logic        clk24m,
  input  logic        reset,
  input  logic        pb_sw,
  input  logic [5:0]  freq,
  input  logic [3:0]  phase,
  output logic [31:0] display,
  output logic        pwm0,
  output logic        pwm1
);
  logic         reset_int, clk6m, clk24k, ce6m, ce24k;
  logic [DDS_M-1:0] phase_inc;
  logic [DDS_P-1:0] phase_shift;
  logic [15:0]  freq_disp, phase_disp;
  logic [DDS_N-1:0] addr0, addr1;
  logic [DDS_R-1:0] data0, data1;
  logic         show_phase;

  clk_gen #(.DIV_PWM(DIV_PWM), .DIV_DDS(DIV_DDS)) u_clk_gen (
    .clk24m, .reset, .reset_int, .clk6m, .clk24k, .ce6m, .ce24k
  );

  freq_tab #(.M(DDS_M)) u_freq_tab (
    .freq, .phase_inc, .disp(freq_disp)
  );

  phase_tab #(.P(DDS_P)) u_phase_tab (
    .phase, .phase_shift, .disp(phase_disp)
  );

  dds_logic #(.M(DDS_M), .P(DDS_P), .N(DDS_N)) u_dds_logic_0 (
    .clk(clk24m), .rst(reset_int), .ce(ce24k),
    .phase_inc, .phase_shift(DDS_P'(0)), .addr(addr0)
  );

  dds_logic #(.M(DDS_M), .P(DDS_P), .N(DDS_N)) u_dds_logic_1 (
    .clk(clk24m), .rst(reset_int), .ce(ce24k),
    .phase_inc, .phase_shift, .addr(addr1)
  );

  sine_lut #(.N(DDS_N), .R(DDS_R)) u_sine_lut (
    .clk(clk24m), .addr_a(addr0), .addr_b(addr1), .data_a(data0), .data_b(data1)
  );

  pwm_logic #(.R(DDS_R)) u_pwm_logic (
    .clk(clk24m), .rst(reset_int), .ce(ce6m), .data0, .data1, .pwm0, .pwm1
  );

  display_logic #(.DEB_TICKS(DEB_TICKS)) u_display_logic (
    .clk(clk24m), .rst(reset_int), .tick(ce24k), .pb_sw,
    .freq_disp, .phase_disp, .display, .show_phase
  );

  // One DDS sample must last exactly one PWM period
  initial begin
    assert (DIV_DDS == (DIV_PWM << DDS_R))
      else $error("DIV_DDS must equal DIV_PWM * 2^R");
  end
endmodule
