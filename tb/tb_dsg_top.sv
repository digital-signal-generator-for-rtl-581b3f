// End-to-end testbench of dsg_top at its default parameters (24-bit
// accumulator, 10-bit phase, 8-bit samples, 24 MHz clock, 240-sample debounce).
//
// A monitor measures every PWM period of pwm0 and pwm1 between rising edges:
// each period must last 1024 clocks (a 23.4375 kHz sample rate) and its high
// time, in 6 MHz steps, is the sample. The samples are then replayed against
// an independent model: a 24-bit accumulator advanced by
// round(f * 2^24 / 23437.5) per sample, a 10-bit phase taken from its top
// bits, plus round(deg * 1024 / 360) for pwm1, and the sine
// 128 + 114.56 sin(2 pi k / 1024). The alignment of the model with the
// output is searched once after reset, and after every code change the
// number of samples before the new increment and the new shift take effect is
// searched (0..4); all other samples must match exactly.
//
// The run covers a full 75.0 Hz period at 90 degrees, a phase step, a jump to
// 275.0 Hz, the unused-code fallbacks (75.0 Hz, 180 degrees), 74.0 Hz at
// 15 degrees, accumulator wraps, and a debounced push-button press that
// switches the display from frequency to phase shift. Each of these is
// counted and must happen at least once.
module tb_dsg_top;
  logic        clk24m = 0, reset, pb_sw;
  logic [5:0]  freq;
  logic [3:0]  phase;
  logic [31:0] display;
  logic        pwm0, pwm1;

  dsg_top dut (.*);

  always #20.833 clk24m = ~clk24m;   // 24 MHz

  int checks = 0, failures = 0;
  localparam int MAXS = 4096;

  // ---------------- PWM period monitor ----------------
  int m0 [MAXS];
  int m1 [MAXS];
  int n0 = 0, n1 = 0;
  int hi0 = 0, hi1 = 0, len0 = 0, len1 = 0;
  logic p0q = 0, p1q = 0;
  bit started0 = 0, started1 = 0;
  int bad_period = 0;

  always @(posedge clk24m) begin
    if (reset) begin
      started0 <= 0; started1 <= 0; p0q <= 0; p1q <= 0;
    end else begin
      p0q <= pwm0; p1q <= pwm1;
      if (pwm0 && !p0q) begin
        if (started0) begin
          if (len0 != 1024) bad_period++;
          if (n0 < MAXS) m0[n0] = hi0 / 4;
          n0++;
        end
        started0 <= 1; hi0 = 1; len0 = 1;
      end else begin
        hi0 += int'(pwm0); len0++;
      end
      if (pwm1 && !p1q) begin
        if (started1) begin
          if (len1 != 1024) bad_period++;
          if (n1 < MAXS) m1[n1] = hi1 / 4;
          n1++;
        end
        started1 <= 1; hi1 = 1; len1 = 1;
      end else begin
        hi1 += int'(pwm1); len1++;
      end
    end
  end

  // ---------------- reference model ----------------
  function automatic int sine_ref(input longint unsigned ph);
    int k;
    k = int'((ph % (64'd1 << 24)) >> 14);
    return int'($floor(128.0 + 114.56 * $sin(2.0 * 3.141592653589793 * k / 1024.0) + 0.5));
  endfunction

  function automatic longint unsigned inc_of(input int code);
    int d;
    if (code < 21) d = 740 + code;
    else if (code < 42) d = 2740 + code - 21;
    else d = 750;
    return longint'($floor(d / 10.0 * 16777216.0 / 23437.5 + 0.5));
  endfunction

  function automatic longint unsigned shift_of(input int code);
    int deg;
    deg = 15 * ((code > 12) ? 12 : code);
    return longint'($floor(deg * 1024.0 / 360.0 + 0.5)) << 14;
  endfunction

  // input segments: the codes and the sample count when they were applied
  int seg_at [16];
  int seg_f  [16];
  int seg_p  [16];
  int nseg = 0;

  task automatic apply(input int f, input int p);
    freq = 6'(f); phase = 4'(p);
    seg_at[nseg] = n0; seg_f[nseg] = f; seg_p[nseg] = p; nseg++;
  endtask

  task automatic wait_samples(input int n);
    int target;
    target = n0 + n;
    while (n0 < target) @(posedge clk24m);
    // land at a random point inside the period
    repeat ($urandom % 1000) @(posedge clk24m);
  endtask

  // mismatches of samples [from, to) for given delays, starting from acc
  function automatic int run_seg(input int from, input int to, input longint unsigned acc_in,
                                 input longint unsigned inc_old, input longint unsigned inc_new,
                                 input longint unsigned sh_old, input longint unsigned sh_new,
                                 input int d_inc, input int d_sh, output longint unsigned acc_out,
                                 output int wraps);
    longint unsigned acc, sh, nxt;
    int bad = 0;
    acc = acc_in; wraps = 0;
    for (int i = from; i < to; i++) begin
      sh = (i >= from + d_sh) ? sh_new : sh_old;
      if (m0[i] != sine_ref(acc)) bad++;
      if (m1[i] != sine_ref(acc + sh)) bad++;
      nxt = acc + ((i >= from + d_inc) ? inc_new : inc_old);
      if (nxt >= (64'd1 << 24)) wraps++;
      acc = nxt % (64'd1 << 24);
    end
    acc_out = acc;
    return bad;
  endfunction

  // ---------------- mechanism counters ----------------
  int cnt_freq_change = 0, cnt_band_change = 0, cnt_phase_change = 0;
  int cnt_wrap = 0, cnt_toggle = 0, cnt_fallback = 0, cnt_full_period = 0;

  // seven-segment patterns {dp,g,f,e,d,c,b,a}
  localparam logic [7:0] BL = 8'h00, D0 = 8'h3F, D1 = 8'h06, D2 = 8'h5B, D5 = 8'h6D,
                         D7 = 8'h07, D8 = 8'h7F, D9 = 8'h6F;
  task automatic chk_disp(input logic [31:0] e, input string what);
    checks++;
    if (display !== e) begin failures++; $display("FAIL display %s: %h expected %h", what, display, e); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned acc, acc_next, inc_prev, sh_prev;
    int best, bad, bd_i, bd_s, w, k0, i0, from, to;

    reset = 1; pb_sw = 0;
    apply(10, 6);                               // 75.0 Hz, 90 degrees
    repeat (10) @(posedge clk24m);
    reset = 0;
    repeat (3000) @(posedge clk24m);
    chk_disp({BL, D7, D5 | 8'h80, D0}, "75.0 Hz");
    // press the button for 300 samples during the first 75 Hz period
    wait_samples(20);
    pb_sw = 1;
    wait_samples(300);
    checks++;
    if (display === {BL, BL, D9, D0}) cnt_toggle++;
    else begin failures++; $display("FAIL display after press: %h", display); end
    pb_sw = 0;
    wait_samples(60);
    apply(10, 12); cnt_phase_change++;          // 180 degrees
    wait_samples(60);
    chk_disp({BL, D1, D8, D0}, "180 deg");
    apply(31, 12); cnt_freq_change++; cnt_band_change++;  // 275.0 Hz
    wait_samples(200);
    apply(50, 14); cnt_freq_change++; cnt_band_change++; cnt_phase_change++;
    cnt_fallback++;                             // unused codes: 75.0 Hz, 180 degrees
    wait_samples(80);
    chk_disp({BL, D1, D8, D0}, "fallback 180 deg");
    apply(0, 1); cnt_freq_change++; cnt_phase_change++;    // 74.0 Hz, 15 degrees
    wait_samples(100);
    reset = 0;

    // ---- replay the measured samples against the model ----
    checks++;
    if (bad_period != 0 || n0 != n1) begin
      failures++; $display("FAIL %0d periods not 1024 clocks, counts %0d/%0d", bad_period, n0, n1);
    end
    // alignment after reset: sample i = accumulator (i - k0) * inc
    i0 = 8; k0 = -1;
    for (int k = 0; k <= 8 && k0 < 0; k++) begin
      bad = run_seg(i0, i0 + 40, ((64'(i0) - 64'(k)) * inc_of(10)) % (64'd1 << 24), inc_of(10), inc_of(10),
                    shift_of(6), shift_of(6), 0, 0, acc_next, w);
      if (bad == 0) k0 = k;
    end
    checks++;
    if (k0 < 0) begin
      failures++; $display("FAIL no alignment found after reset");
    end else begin
      acc = ((64'(i0) - 64'(k0)) * inc_of(10)) % (64'd1 << 24);
      inc_prev = inc_of(10); sh_prev = shift_of(6);
      for (int s = 0; s < nseg; s++) begin
        from = (s == 0) ? i0 : seg_at[s];
        to = (s + 1 < nseg) ? seg_at[s + 1] : n0;
        best = 1 << 30; bd_i = -1; bd_s = -1;
        for (int di = 0; di <= 4; di++)
          for (int ds = 0; ds <= 4; ds++) begin
            bad = run_seg(from, to, acc, inc_prev, inc_of(seg_f[s]), sh_prev, shift_of(seg_p[s]),
                          di, ds, acc_next, w);
            if (bad < best) begin best = bad; bd_i = di; bd_s = ds; end
          end
        bad = run_seg(from, to, acc, inc_prev, inc_of(seg_f[s]), sh_prev, shift_of(seg_p[s]),
                      bd_i, bd_s, acc_next, w);
        checks += 2 * (to - from);
        failures += best;
        cnt_wrap += w;
        if (s == 0 && to - from >= 313) cnt_full_period++;  // 23437.5 / 75 samples
        $display("segment %0d: freq code %0d phase code %0d, samples %0d..%0d, %0d mismatches, delays %0d/%0d, %0d wraps",
                 s, seg_f[s], seg_p[s], from, to - 1, best, bd_i, bd_s, w);
        if (s > 0) begin
          checks++;
          if (bd_i > 2 || bd_s > 2) begin failures++; $display("FAIL change took over two samples"); end
        end
        acc = acc_next; inc_prev = inc_of(seg_f[s]); sh_prev = shift_of(seg_p[s]);
      end
    end

    $display("mechanisms: freq changes %0d, band changes %0d, phase changes %0d, wraps %0d, display toggles %0d, fallbacks %0d, full 75 Hz periods %0d",
             cnt_freq_change, cnt_band_change, cnt_phase_change, cnt_wrap, cnt_toggle, cnt_fallback, cnt_full_period);
    checks += 7;
    if (cnt_freq_change == 0) failures++;
    if (cnt_band_change == 0) failures++;
    if (cnt_phase_change == 0) failures++;
    if (cnt_wrap == 0) failures++;
    if (cnt_toggle == 0) failures++;
    if (cnt_fallback == 0) failures++;
    if (cnt_full_period == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
