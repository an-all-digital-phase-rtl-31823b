`timescale 1ps/1fs
// dco: behavioural model (not synthesizable) of the LC-tank
// digitally-controlled oscillator.
//
// Frequency = F_MIN_MHZ + band * BAND_STEP_MHZ + n_on * KDCO_KHZ / 1000,
// where band is the 4-bit binary-weighted coarse bank setting and n_on the
// number of unit varactors of the 16x16 fine matrix in their switching
// state; cell (i,j) is on when R[i] | P[i] & C[j].  The output toggles every
// half period, recomputed at every edge, so a control change takes effect
// from the next half period.  en low stops the oscillator (output low).
// 2.39 GHz bottom of range, 16 bands, 256 fine units and 200 kHz per code
// are taken from the description; BAND_STEP_MHZ = 16 (bands overlapping
// by far more than 40 %) is this design's own value.  A linear tuning law is
// assumed.  The half-period delay is computed at run time, so lint cannot
// prove it non-zero; it is always a positive half period (about 190-210 ps).
module dco #(
  parameter real F_MIN_MHZ     = 2390.0,
  parameter real BAND_STEP_MHZ = 16.0,
  parameter real KDCO_KHZ      = 200.0
) (
  input  logic        en,
  input  logic [3:0]  band,
  input  logic [15:0] r,
  input  logic [15:0] p,
  input  logic [15:0] c,
  output logic        f_out
);
  function automatic int n_on(input logic [15:0] rr, input logic [15:0] pp,
                              input logic [15:0] cc);
    // Full rows count 16 cells; a partly filled row counts its columns.
    return 16 * $countones(rr) + $countones(pp & ~rr) * $countones(cc);
  endfunction

  real f_mhz, half_ps;

  initial f_out = 1'b0;

  always begin
    if (!en) begin
      f_out = 1'b0;
      @(posedge en);
    end
    f_mhz   = F_MIN_MHZ + real'(band) * BAND_STEP_MHZ + real'(n_on(r, p, c)) * KDCO_KHZ / 1000.0;
    half_ps = 1.0e6 / (2.0 * f_mhz);
    #(half_ps) f_out = ~f_out;
  end

endmodule
