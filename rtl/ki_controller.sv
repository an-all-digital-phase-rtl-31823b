`timescale 1ps/1fs
// ki_controller: gain look-up of the digital loop filter (the "LUT" and the
// two variable-gain amplifiers of the DLF block diagram).
//
// All gains are powers of two, so multipliers are replaced by shifts and
// adds.  The proportional product is err * 2^kp_sh (14-bit result) and the
// integral product is err * 2^ki_sh plus, while the auxiliary TDC reports a
// level m > 0, the frequency-compensation term sign * m * KI_FC (15-bit
// result).  KI_FC = 2^kifc_sh_a + 2^kifc_sh_b (the second term can be
// switched off), so the integral gain steps through KI, KI+KI_FC, KI+2KI_FC,
// KI+3KI_FC as the phase error grows, as in the operation timing diagram.
// m * x is formed as (m[1] ? 2x : 0) + (m[0] ? x : 0).
//
// Widths 6 (input), 14 and 15 are the ones printed in the DLF diagram.
// Signed shift amounts (negative = arithmetic right shift, for KI < 1 LSB)
// and saturation of the products are this design's own choices.
// Timing: purely combinational.
module ki_controller
  import adpll_pkg::*;
#(
  parameter int unsigned IN_W = MTDC_BITS + 1,
  parameter int unsigned P_W  = 14,
  parameter int unsigned I_W  = 15
) (
  input  logic signed [IN_W-1:0] err,        // signed phase error from the MTDC
  input  logic                   sign,       // 1: feedback leads (frequency too high)
  input  logic [1:0]             level,      // ATDC level m (0 when fast lock is off)
  input  logic signed [4:0]      kp_sh,      // KP  = 2^kp_sh
  input  logic signed [4:0]      ki_sh,      // KI  = 2^ki_sh
  input  logic [3:0]             kifc_sh_a,  // KI_FC = 2^a (+ 2^b)
  input  logic [3:0]             kifc_sh_b,
  input  logic                   kifc_b_en,
  output logic signed [P_W-1:0]  p_term,
  output logic signed [I_W-1:0]  i_term
);
  localparam int unsigned WW = 24;   // internal width, wide enough for any shift

  function automatic logic signed [WW-1:0] shl(input logic signed [WW-1:0] x,
                                               input logic signed [4:0] sh);
    if (sh >= 0) return x <<< sh;
    else         return x >>> (-sh);
  endfunction

  function automatic logic signed [WW-1:0] sat(input logic signed [WW-1:0] x,
                                               input int unsigned w);
    logic signed [WW-1:0] hi, lo;
    hi = (WW'(1) <<< (w - 1)) - 1;
    lo = -(WW'(1) <<< (w - 1));
    if (x > hi)      return hi;
    else if (x < lo) return lo;
    else             return x;
  endfunction

  logic signed [WW-1:0] e_w, p_w, i_w, kifc, comp;

  always_comb begin
    e_w  = WW'(err);
    p_w  = shl(e_w, kp_sh);
    kifc = (WW'(1) <<< kifc_sh_a) + (kifc_b_en ? (WW'(1) <<< kifc_sh_b) : '0);
    comp = (level[1] ? (kifc <<< 1) : '0) + (level[0] ? kifc : '0);
    if (sign) comp = -comp;
    i_w  = shl(e_w, ki_sh) + comp;
    p_term = P_W'(sat(p_w, P_W));
    i_term = I_W'(sat(i_w, I_W));
  end

endmodule
