`timescale 1ps/1fs
// mtdc_encoder: thermometer-to-binary encoder of the 5-bit uneven-step
// Vernier main TDC.
//
// The delay line has FINE cells of one resolution step followed by COARSE
// cells of two steps (the second segment has double delay), so the k-th set
// cell adds 1 to the code in the first segment and 2 in the second.  The
// encoder works like a ROM-based flash encoder:
//   1. thermometer to 1-of-N with 3-input gates hot[i] = t[i-1] & t[i] & ~t[i+1],
//      which ignores a lone '1' above the transition (bubble removal);
//   2. every hot line reads a ROM row holding the Gray code of its weighted
//      value; rows are ORed, so a residual double hot line disturbs the result
//      by little (Gray intermediate code);
//   3. Gray to binary.
// The structure (bubble removal with 3-input gates, Gray intermediate, 5-bit
// output, double-delay second segment) follows the description; the cell
// counts FINE=9 / COARSE=11 are read from the simulated transfer curve
// (single steps up to about code 9, double steps up to 31).
// Interface: therm[0] is the first (fine) cell.  Purely combinational.
module mtdc_encoder
  import adpll_pkg::*;
#(
  parameter int unsigned FINE   = 9,
  parameter int unsigned COARSE = 11
) (
  input  logic [FINE+COARSE-1:0] therm,
  output logic [MTDC_BITS-1:0]   code
);
  localparam int unsigned T = FINE + COARSE;

  // Weighted value of a thermometer whose top set cell is i.
  function automatic logic [MTDC_BITS-1:0] cell_value(input int unsigned i);
    int unsigned v;
    if (i < FINE) v = i + 1;
    else          v = FINE + 2 * (i - FINE + 1);
    if (v > (1 << MTDC_BITS) - 1) v = (1 << MTDC_BITS) - 1;
    return MTDC_BITS'(v);
  endfunction

  logic [T-1:0]         hot;
  logic [MTDC_BITS-1:0] gray;

  always_comb begin
    for (int unsigned i = 0; i < T; i++) begin
      logic below, above;
      below  = (i == 0)     ? 1'b1 : therm[i-1];
      above  = (i == T - 1) ? 1'b0 : therm[i+1];
      hot[i] = below & therm[i] & ~above;
    end
    gray = '0;
    for (int unsigned i = 0; i < T; i++) begin
      logic [MTDC_BITS-1:0] v;
      v = cell_value(i);
      if (hot[i]) gray = gray | (v ^ (v >> 1));
    end
    code = gray2bin(gray);
  end

endmodule
