`timescale 1ps/1fs
// fastlock_ctrl: switches the loop between frequency acquisition (FA) and
// phase tracking (PT) and gates the auxiliary TDC result.
//
// Clocked by the NEXT strobe, once per phase comparison.  After reset, or
// when the channel word fcw changes (a frequency hop), the loop enters FA if
// fl_en is set: the auxiliary TDC is enabled and its level m (0..3, decoded
// from the thermometer [S2,S1,S0]) is passed to the divider and the KI
// controller.  S0 is the mode detection: in FA a comparison with S0 set uses
// the compensation paths.  Once S0 has stayed clear for LOCK_CNT
// consecutive comparisons the loop is taken as locked: the controller goes
// to PT, switches the auxiliary TDC off and forces m to 0, so the loop is a
// plain type-II TDC loop again.  With fl_en low the loop is always in PT
// (conventional ADPLL, kept for comparison).
// The use of S0 and the switching off after lock follow the description;
// the LOCK_CNT qualification and re-arming on a fcw change are this design's
// own choices.
module fastlock_ctrl
  import adpll_pkg::*;
#(
  parameter int unsigned LOCK_CNT = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fl_en,
  input  logic [DIV_CNT_W-1:0]   fcw,
  input  logic [ATDC_STAGES-1:0] s,        // ATDC thermometer [S2,S1,S0]
  output loop_mode_e             mode,
  output logic                   atdc_en,
  output logic [1:0]             level
);
  logic [DIV_CNT_W-1:0]     fcw_q;
  logic [$clog2(LOCK_CNT+1)-1:0] quiet;

  assign atdc_en = (mode == MODE_FA);
  assign level   = (mode == MODE_FA) ? atdc_level(s) : 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= MODE_FA;
      fcw_q <= '0;
      quiet <= '0;
    end else begin
      fcw_q <= fcw;
      if (!fl_en) begin
        mode  <= MODE_PT;
        quiet <= '0;
      end else if (fcw != fcw_q) begin
        mode  <= MODE_FA;
        quiet <= '0;
      end else if (mode == MODE_FA) begin
        if (s[0]) quiet <= '0;
        else if (quiet == $bits(quiet)'(LOCK_CNT - 1)) begin
          mode  <= MODE_PT;
          quiet <= '0;
        end else quiet <= quiet + 1'b1;
      end
    end
  end

endmodule
