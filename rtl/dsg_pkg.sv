// Shared constants of the two-channel DDS sine generator.
//
// The bit widths are those of the realised generator: an M = 24 bit phase
// accumulator, a P = 10 bit phase shift input, an N = 10 bit quantized phase
// (ROM address) and R = 8 bit samples. The DDS runs at f_clk = f_pwm / 2^R
// = 6 MHz / 256 = 23437.5 Hz, derived from a 24 MHz board clock. The
// frequency and phase tables below it (74..76 Hz, 274..276 Hz in 0.1 Hz steps,
// 0..180 degrees in 15 degree steps) also follow the realised generator; the
// selection-code layout is this design's own.
package dsg_pkg;

  // DDS bit widths
  localparam int unsigned DDS_M = 24;   // phase accumulator
  localparam int unsigned DDS_P = 10;   // phase shift input
  localparam int unsigned DDS_N = 10;   // quantized phase / LUT address
  localparam int unsigned DDS_R = 8;    // sample (amplitude) resolution

  // Clock plan: 24 MHz in, PWM counter at 24 MHz / 4, DDS at 24 MHz / 1024
  localparam int unsigned DIV_PWM = 4;
  localparam int unsigned DIV_DDS = 1024;
  // DDS sample rate in units of 0.1 Hz: 234375 (= 23437.5 Hz)
  localparam longint unsigned FCLK_DECIHZ = 64'd240_000_000 / 64'(DIV_DDS);

  // Frequency selection: two bands of 21 steps of 0.1 Hz
  localparam int unsigned FREQ_STEPS     = 21;
  localparam int unsigned FREQ_LO_DECIHZ = 740;   // 74.0 Hz
  localparam int unsigned FREQ_HI_DECIHZ = 2740;  // 274.0 Hz
  localparam int unsigned FREQ_DEF_CODE  = 10;    // 75.0 Hz, used for unused codes

  // Phase selection: 0..180 degrees in 15 degree steps
  localparam int unsigned PHASE_STEP_DEG = 15;
  localparam int unsigned PHASE_MAX_CODE = 12;

  // Blank digit code for the display (BCD digits are 0..9)
  localparam logic [3:0] DIGIT_BLANK = 4'hF;

  // Frequency in 0.1 Hz of a selection code
  function automatic int unsigned freq_decihz(input int unsigned code);
    int unsigned c;
    c = (code < 2 * FREQ_STEPS) ? code : FREQ_DEF_CODE;
    if (c < FREQ_STEPS) return FREQ_LO_DECIHZ + c;
    return FREQ_HI_DECIHZ + (c - FREQ_STEPS);
  endfunction

  // Phase increment for a frequency in 0.1 Hz: round(f * 2^width / f_clk)
  function automatic longint unsigned phase_inc_of(input int unsigned decihz,
                                                   input int unsigned width);
    longint unsigned num;
    num = longint'(decihz) << width;
    return (num + FCLK_DECIHZ / 2) / FCLK_DECIHZ;
  endfunction

  // Angle in degrees of a phase selection code (codes above 12 give 180)
  function automatic int unsigned phase_deg(input int unsigned code);
    return ((code > PHASE_MAX_CODE) ? PHASE_MAX_CODE : code) * PHASE_STEP_DEG;
  endfunction

  // Phase shift word for an angle: round(deg * 2^width / 360)
  function automatic int unsigned phase_shift_of(input int unsigned deg,
                                                 input int unsigned width);
    return ((deg << width) + 180) / 360;
  endfunction

endpackage
