`timescale 1ps/1fs
// pfd: behavioural model (not synthesizable) of the DFF-based
// phase/frequency detector.
//
// Two edge-triggered flip-flops with D tied high: f_ref sets UP, f_fb sets
// DN.  When both are high, an AND gate followed by a delay line (the pulse
// hold time T_HOLD_PS) resets both.  The difference in width between UP and
// DN is the phase error, passed on to the main and auxiliary TDCs.  The
// hold time must cover the whole main TDC range; T_HOLD_PS is this design's
// own value.  rst_n clears both flip-flops.
module pfd #(
  parameter real T_HOLD_PS = 300.0
) (
  input  logic f_ref,
  input  logic f_fb,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  logic both, clr;

  assign both = up & dn;
  always @(both) clr <= #(T_HOLD_PS) both;

  always_ff @(posedge f_ref or posedge clr or negedge rst_n) begin
    if (!rst_n)   up <= 1'b0;
    else if (clr) up <= 1'b0;
    else          up <= 1'b1;
  end

  always_ff @(posedge f_fb or posedge clr or negedge rst_n) begin
    if (!rst_n)   dn <= 1'b0;
    else if (clr) dn <= 1'b0;
    else          dn <= 1'b1;
  end

endmodule
