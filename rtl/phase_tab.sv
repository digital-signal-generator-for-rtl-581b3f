// Phase table: selection code -> DDS phase shift and display digits.
//
// The 4-bit code k selects a phase shift of 15*k degrees, 0..180 degrees for
// k = 0..12; codes 13..15 give 180 degrees. Range and step follow the
// generator's specification; the treatment of the unused codes is this
// design's own.
//
// The DDS adds phase_shift to the top P bits of its accumulator, so one unit
// is 360 / 2^P degrees and phase_shift = round(deg * 2^P / 360): 90 degrees is
// exactly 256 at P = 10, 15 degrees is 43 (15.12 degrees).
//
// disp carries four BCD digits {0, hundreds, tens, units} of the angle in
// degrees, e.g. 16'h0090 for 90 degrees. Both outputs are combinational.
module phase_tab
  import dsg_pkg::*;
#(
  parameter int unsigned P = dsg_pkg::DDS_P
) (
  input  logic [3:0]   phase,
  output logic [P-1:0] phase_shift,
  output logic [15:0]  disp
);
  logic [P-1:0] ps_rom   [16];
  logic [15:0]  disp_rom [16];

  for (genvar i = 0; i < 16; i++) begin : g_rom
    localparam int unsigned DEG = phase_deg(i);
    assign ps_rom[i]   = P'(phase_shift_of(DEG, P));
    assign disp_rom[i] = {4'd0, 4'(DEG / 100), 4'((DEG / 10) % 10), 4'(DEG % 10)};
  end

  assign phase_shift = ps_rom[phase];
  assign disp        = disp_rom[phase];
endmodule
