// Clock generator of the sine generator.
//
// From the 24 MHz board clock it derives the 6 MHz PWM clock and the
// 23.4375 kHz DDS sample clock (24 MHz / 4 and 24 MHz / 1024), and an internal
// reset. Those three outputs and their rates follow the generator's block
// diagram. As this design's own choice, one free-running counter divides the
// clock: clk6m and clk24k are counter bits (50 % duty), and the rest of the
// design does not clock on them but uses the one-cycle strobes ce6m and ce24k
// as clock enables in the 24 MHz domain. ce24k coincides with every 256th
// ce6m, so each DDS sample lines up with exactly one PWM period.
//
// reset (active high) asserts reset_int at once; reset_int is released on the
// second clk24m edge after reset falls. The counter is held at zero while
// reset_int is high, so the first ce6m comes DIV_PWM cycles after release.
module clk_gen #(
  parameter int unsigned DIV_PWM = 4,     // 24 MHz -> 6 MHz
  parameter int unsigned DIV_DDS = 1024   // 24 MHz -> 23.4375 kHz
) (
  input  logic clk24m,
  input  logic reset,
  output logic reset_int,
  output logic clk6m,
  output logic clk24k,
  output logic ce6m,
  output logic ce24k
);
  localparam int unsigned CW = $clog2(DIV_DDS);

  logic [1:0]    rst_sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk24m or posedge reset) begin
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end
  assign reset_int = rst_sync[1];

  always_ff @(posedge clk24m) begin
    if (reset_int) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  // Divided clocks: the top bit of each power-of-two division
  assign clk6m  = cnt[$clog2(DIV_PWM)-1];
  assign clk24k = cnt[CW-1];
  // Strobes on the last count of each division
  assign ce6m   = !reset_int && (cnt[$clog2(DIV_PWM)-1:0] == '1);
  assign ce24k  = !reset_int && (cnt == '1);

  initial begin
    assert (DIV_PWM >= 2 && (1 << $clog2(DIV_PWM)) == DIV_PWM)
      else $error("DIV_PWM must be a power of two");
    assert (DIV_DDS > DIV_PWM && (1 << CW) == DIV_DDS)
      else $error("DIV_DDS must be a power of two above DIV_PWM");
  end
endmodule
