`timescale 1ps/1fs
// mash2_dsm: second-order MASH 1-1 sigma-delta modulator for the 8-bit
// fractional tuning word, with a dither input.
//
// Two cascaded 8-bit accumulators.  The first adds the input word (plus a
// one-LSB dither bit taken from a 15-bit LFSR when dith_en is set); the
// second adds the first accumulator's residue.  The carries c1, c2 are
// combined by the noise-cancelling network y = c1 + c2 - c2(n-1), so y takes
// values -1..+2 and its mean equals x / 256.  y is added to the integer DCO
// code in dco_decoder.  The MASH-II structure with a dithering input and the
// 8-bit width follow the description; the LFSR dither source is this
// design's own choice.  It runs on a fast clock derived from the DCO
// (dithering clock).  y is registered: it changes one clk edge after the
// accumulators.
module mash2_dsm
  import adpll_pkg::*;
#(
  parameter int unsigned W = DCO_FRAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      x,
  input  logic              dith_en,
  output logic signed [2:0] y
);
  logic [W-1:0]  acc1, acc2;
  logic [W:0]    s1, s2;
  logic          c2_d;
  logic [14:0]   lfsr;
  logic          dith;

  assign dith = dith_en & lfsr[0];
  assign s1   = {1'b0, acc1} + {1'b0, x} + (W+1)'(dith);
  assign s2   = {1'b0, acc2} + {1'b0, s1[W-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0;
      acc2 <= '0;
      c2_d <= 1'b0;
      y    <= '0;
      lfsr <= 15'h4a3b;
    end else begin
      acc1 <= s1[W-1:0];
      acc2 <= s2[W-1:0];
      c2_d <= s2[W];
      y    <= $signed({2'b00, s1[W]}) + $signed({2'b00, s2[W]}) - $signed({2'b00, c2_d});
      lfsr <= {lfsr[13:0], lfsr[14] ^ lfsr[13]};
    end
  end

endmodule
