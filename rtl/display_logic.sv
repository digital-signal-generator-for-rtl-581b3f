// Display logic: shows the selected frequency or phase shift on four
// seven-segment digits; the push button switches between the two.
//
// pb_sw is synchronised to clk and debounced: a new level is accepted after it
// has been seen on DEB_TICKS consecutive tick strobes (240 ticks of the
// 23.4375 kHz strobe, about 10 ms). Each accepted press (0 -> 1) toggles the
// shown value; the frequency is shown after reset. That a press toggles, the
// debounce and its time are this design's choices.
//
// freq_disp and phase_disp are four BCD digits each, most significant first.
// Leading zeros are blanked; in frequency mode digit 1 carries the decimal
// point, so 16'h0750 shows " 75.0" and phase 16'h0090 shows "  90".
// display holds four segment patterns {dp,g,f,e,d,c,b,a}, active high, digit 3
// (leftmost) in bits 31:24; the decimal points of digits 3, 2 and 0 are never
// lit. display is registered: it follows a change of the
// inputs or of the mode one clk later.
module display_logic
  import dsg_pkg::*;
#(
  parameter int unsigned DEB_TICKS = 240
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        pb_sw,
  input  logic [15:0] freq_disp,
  input  logic [15:0] phase_disp,
  output logic [31:0] display,
  output logic        show_phase
);
  localparam int unsigned DW = $clog2(DEB_TICKS + 1);

  // Segment pattern {g,f,e,d,c,b,a} of a BCD digit; anything else is blank
  function automatic logic [6:0] seg7(input logic [3:0] d);
    case (d)
      4'd0: return 7'h3F;
      4'd1: return 7'h06;
      4'd2: return 7'h5B;
      4'd3: return 7'h4F;
      4'd4: return 7'h66;
      4'd5: return 7'h6D;
      4'd6: return 7'h7D;
      4'd7: return 7'h07;
      4'd8: return 7'h7F;
      4'd9: return 7'h6F;
      default: return 7'h00;
    endcase
  endfunction

  // ---- push button: synchroniser, debounce, press detection ----
  logic [1:0]    pb_sync;
  logic          pb_stable;
  logic [DW-1:0] deb_cnt;
  logic          press;

  always_ff @(posedge clk) begin
    if (rst) pb_sync <= '0;
    else     pb_sync <= {pb_sync[0], pb_sw};
  end

  assign press = tick && (pb_sync[1] != pb_stable) && (deb_cnt == DW'(DEB_TICKS - 1))
                 && pb_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pb_stable  <= 1'b0;
      deb_cnt    <= '0;
      show_phase <= 1'b0;
    end else if (tick) begin
      if (pb_sync[1] == pb_stable) begin
        deb_cnt <= '0;
      end else if (deb_cnt == DW'(DEB_TICKS - 1)) begin
        deb_cnt   <= '0;
        pb_stable <= pb_sync[1];
      end else begin
        deb_cnt <= deb_cnt + 1'b1;
      end
      if (press) show_phase <= !show_phase;
    end
  end

  // ---- digit selection, blanking and segment encoding ----
  logic [3:0]  dig [4];
  logic [3:0]  shown [4];
  logic [31:0] seg_next;
  logic        lead;

  always_comb begin
    for (int i = 0; i < 4; i++)
      dig[i] = show_phase ? phase_disp[4*i +: 4] : freq_disp[4*i +: 4];
    // Blank leading zeros; keep digit 1 in frequency mode and digit 0 always
    lead = 1'b1;
    for (int i = 3; i >= 0; i--) begin
      if (lead && dig[i] == 4'd0 && i > (show_phase ? 0 : 1)) shown[i] = DIGIT_BLANK;
      else begin
        shown[i] = dig[i];
        lead     = 1'b0;
      end
    end
    for (int i = 0; i < 4; i++)
      seg_next[8*i +: 8] = {(!show_phase && i == 1), seg7(shown[i])};
  end

  always_ff @(posedge clk) begin
    if (rst) display <= '0;
    else     display <= seg_next;
  end

  initial begin
    assert (DEB_TICKS >= 1) else $error("DEB_TICKS must be at least 1");
  end
endmodule
