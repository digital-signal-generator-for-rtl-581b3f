// Frequency table: selection code -> DDS phase increment and display digits.
//
// The 6-bit code picks one of 42 output frequencies, 74.0..76.0 Hz (codes
// 0..20) and 274.0..276.0 Hz (codes 21..41) in 0.1 Hz steps; codes 42..63 are
// unused and select 75.0 Hz. The frequency range, step and port widths follow
// the generator's specification; the code layout and the fallback are this
// design's own.
//
// phase_inc = round(f * 2^M / f_clk) with f_clk = 23437.5 Hz, so that the DDS
// output frequency f_o = phase_inc * f_clk / 2^M is within f_clk / 2^(M+1)
// (0.0007 Hz at M = 24) of the selected value. The table is computed at
// elaboration and is a plain 64-entry ROM in logic.
//
// disp carries four BCD digits {hundreds, tens, units, tenths} of the
// frequency in Hz, e.g. 16'h0750 for 75.0 Hz. Both outputs are combinational.
module freq_tab
  import dsg_pkg::*;
#(
  parameter int unsigned M = dsg_pkg::DDS_M
) (
  input  logic [5:0]   freq,
  output logic [M-1:0] phase_inc,
  output logic [15:0]  disp
);
  logic [M-1:0] inc_rom  [64];
  logic [15:0]  disp_rom [64];

  for (genvar i = 0; i < 64; i++) begin : g_rom
    localparam int unsigned DHZ = freq_decihz(i);
    assign inc_rom[i]  = M'(phase_inc_of(DHZ, M));
    assign disp_rom[i] = {4'(DHZ / 1000), 4'((DHZ / 100) % 10),
                          4'((DHZ / 10) % 10), 4'(DHZ % 10)};
  end

  assign phase_inc = inc_rom[freq];
  assign disp      = disp_rom[freq];
endmodule
