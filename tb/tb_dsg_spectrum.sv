// Spectrum testbench of dsg_top at its default parameters.
//
// For the two nominal track-circuit frequencies, 75.0 Hz and 275.0 Hz, it
// records one second (23437 samples) of both PWM outputs, recovering each
// sample from the high time of its period, and computes the spectrum from
// 2 Hz to 800 Hz in 1 Hz steps with a 4-term Blackman-Harris window. The
// carrier must be at the selected frequency, and the largest other component
// (more than 6 Hz from the carrier) must stay below the phase-truncation bound
// -6.02*N + 3.992 = -56.2 dBc for N = 10. The levels found are printed: about
// -65.3 dBc at 75.0 Hz (a spur at 113 Hz from the table's amplitude rounding)
// and -60.9 dBc at 275.0 Hz (a phase-truncation spur at 75.5 Hz); the built
// generator was reported to measure better than -66 dBc and -60 dBc.
// pwm1 runs with a 90 degree shift and must meet the same limit.
module tb_dsg_spectrum;
  logic        clk24m = 0, reset, pb_sw;
  logic [5:0]  freq;
  logic [3:0]  phase;
  logic [31:0] display;
  logic        pwm0, pwm1;

  dsg_top dut (.*);

  always #20.833 clk24m = ~clk24m;

  localparam int NS = 23437;          // one second of samples
  localparam real FS = 23437.5;
  localparam real S_MAX = -6.02 * 10 + 3.992;   // dBc, N = 10
  int checks = 0, failures = 0;

  // period monitor: high time of each PWM period, in 6 MHz steps
  int s0 [NS];
  int s1 [NS];
  int n = 0, hi0 = 0, hi1 = 0;
  bit rec = 0, started = 0;
  logic p0q = 0;
  always @(posedge clk24m) begin
    p0q <= pwm0;
    if (pwm0 && !p0q) begin
      // pwm0 and pwm1 periods start on the same clock
      if (started && rec && n < NS) begin s0[n] = hi0 / 4; s1[n] = hi1 / 4; n++; end
      started <= 1; hi0 = 1; hi1 = int'(pwm1);
    end else begin
      hi0 += int'(pwm0); hi1 += int'(pwm1);
    end
  end

  function automatic real bh(input int i);
    real t;
    t = 2.0 * 3.141592653589793 * i / (NS - 1);
    return 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
  endfunction

  real win [NS];

  // magnitude of the windowed DFT at f Hz
  function automatic real mag(input int ch, input real f);
    real re = 0.0, im = 0.0, x, w;
    w = 2.0 * 3.141592653589793 * f / FS;
    for (int i = 0; i < NS; i++) begin
      x = ((ch == 0) ? s0[i] : s1[i]) - 128.0;
      re += win[i] * x * $cos(w * i);
      im -= win[i] * x * $sin(w * i);
    end
    return $sqrt(re * re + im * im);
  endfunction

  task automatic analyse(input int ch, input real f0, input real limit_dbc);
    real c, m, worst = 0.0, worst_f = 0.0, dbc;
    int cf;
    cf = int'($floor(f0 + 0.5));
    c = mag(ch, f0);
    for (int f = 2; f <= 800; f++) begin
      if (f < cf - 6 || f > cf + 6) begin
        m = mag(ch, f);
        if (m > worst) begin worst = m; worst_f = f; end
      end
    end
    dbc = 20.0 * $log10(worst / c);
    $display("pwm%0d at %.1f Hz: carrier %.1f (near %.1f expected), largest spur %.1f dBc at %0.0f Hz (limit %.1f dBc)",
             ch, f0, c, 0.5 * 114.56 * NS * 0.35875, dbc, worst_f, limit_dbc);
    checks += 2;
    if (dbc > limit_dbc) begin failures++; $display("FAIL spur above limit"); end
    // the carrier must dominate its neighbours 1 Hz away
    if (mag(ch, f0 - 1.0) > 0.9 * c || mag(ch, f0 + 1.0) > 0.9 * c) begin
      failures++; $display("FAIL carrier not at %.1f Hz", f0);
    end
  endtask

  task automatic capture(input int code);
    freq = 6'(code);
    n = 0; rec = 0;
    repeat (20 * 1024) @(posedge clk24m);   // settle after the change
    rec = 1;
    while (n < NS) @(posedge clk24m);
    rec = 0;
  endtask

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) win[i] = bh(i);
    reset = 1; pb_sw = 0; freq = 6'd10; phase = 4'd6;   // 90 degrees
    repeat (10) @(posedge clk24m);
    reset = 0;
    capture(10);                                        // 75.0 Hz
    analyse(0, 75.0, S_MAX);
    analyse(1, 75.0, S_MAX);
    capture(31);                                        // 275.0 Hz
    analyse(0, 275.0, S_MAX);
    analyse(1, 275.0, S_MAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
