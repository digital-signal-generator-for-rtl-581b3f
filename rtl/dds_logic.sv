// DDS logic: phase accumulator with phase shift and phase quantizer.
//
// Follows the DDS block diagram: an input register holds the phase increment,
// an adder and a register form the M-bit phase accumulator, a second adder
// adds the P-bit phase shift, and the quantizer Q keeps the top N bits as the
// address of the sine table (the table itself is a separate module, so that
// its form can change). The output frequency is f_o = phase_inc * f_ce / 2^M
// and the phase shift is phase_shift / 2^P of a turn.
//
// Timing: on each ce the increment register loads phase_inc and the
// accumulator adds the previously registered increment, so a new increment
// takes effect one ce later. addr is combinational from the accumulator and
// phase_shift (no register after the shift adder, as in the diagram).
// The M-N low bits of the shifted phase are dropped by the quantizer.
// Reset clears both registers; ce is this design's clock-enable form of the
// 23.4375 kHz DDS clock.
module dds_logic #(
  parameter int unsigned M = 24,  // accumulator width
  parameter int unsigned P = 10,  // phase shift width
  parameter int unsigned N = 10   // quantized phase width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [M-1:0] phase_inc,
  input  logic [P-1:0] phase_shift,
  output logic [N-1:0] addr
);
  logic [M-1:0] inc_q;
  logic [M-1:0] acc_q;
  logic [M-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      inc_q <= '0;
      acc_q <= '0;
    end else if (ce) begin
      inc_q <= phase_inc;
      acc_q <= acc_q + inc_q;
    end
  end

  // Phase shift aligned to the top of the accumulator word
  assign phase = acc_q + {phase_shift, {(M-P){1'b0}}};
  // Phase quantizer: truncation to N bits
  assign addr  = phase[M-1 -: N];

  initial begin
    assert (P <= M && N <= M && P > 0 && N > 0 && M > P)
      else $error("dds_logic needs 0 < P < M and 0 < N <= M");
  end
endmodule
