// PWM logic: two R-bit pulse-width modulators sharing one period counter.
//
// The counter steps on each ce (the 6 MHz strobe), so one PWM period is 2^R
// strobes: 256 x 1/6 MHz = 42.67 us, exactly one DDS sample period
// (f_clk = f_pwm / 2^R). Each output is high while counter < sample, giving a
// duty cycle of sample / 2^R; the sine table limits it to 5.25..94.75 %.
// Counter-compare modulation is this design's choice; the rates and the
// sample width follow the generator.
//
// Timing: data0/data1 are latched on the strobe that wraps the counter to 0,
// so every period uses one sample; the outputs are registered and change one
// clk after their strobe. Reset clears the counter, the samples and the
// outputs.
module pwm_logic #(
  parameter int unsigned R = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [R-1:0] data0,
  input  logic [R-1:0] data1,
  output logic         pwm0,
  output logic         pwm1
);
  logic [R-1:0] cnt;
  logic [R-1:0] d0_q, d1_q;
  logic [R-1:0] cnt_next;
  logic [R-1:0] d0_next, d1_next;
  logic         wrap;

  assign wrap     = (cnt == '1);
  assign cnt_next = cnt + 1'b1;
  assign d0_next  = wrap ? data0 : d0_q;
  assign d1_next  = wrap ? data1 : d1_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '1;   // the first strobe wraps and loads a sample
      d0_q <= '0;
      d1_q <= '0;
      pwm0 <= 1'b0;
      pwm1 <= 1'b0;
    end else if (ce) begin
      cnt  <= cnt_next;
      d0_q <= d0_next;
      d1_q <= d1_next;
      pwm0 <= (cnt_next < d0_next);
      pwm1 <= (cnt_next < d1_next);
    end
  end
endmodule
