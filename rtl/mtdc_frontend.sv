`timescale 1ps/1fs
// mtdc_frontend: behavioural model (not synthesizable) of the analog part of
// the main TDC: the phase selector and the uneven-step Vernier delay lines.
//
// Phase selector: a decision circuit (time amplifier + flip-flop) finds
// which of UP and DN rises first.  Sign is 0 when UP leads (reference ahead
// of feedback) and 1 when DN leads; the multiplexers then route the leading
// pulse to the slow line ("Lead") and the lagging pulse to the fast line
// ("Lag").  In the circuit NEXT presets the decision flip-flop to 1 before
// each comparison; this model shows on 'sign' the decision of the latest
// comparison, taken at its leading edge and held until the next leading
// edge, because the divider control logic and the loop filter read it
// after NEXT.
// Vernier lines: FINE stages resolve RES_PS each, the following COARSE
// stages 2*RES_PS each (double-delay cells).  When the lagging pulse has
// caught up, the stage flip-flops hold a thermometer code: stage k is set
// when the time difference is at least its threshold
//   k < FINE : (k+1)*RES_PS,   k >= FINE : (FINE + 2*(k-FINE+1))*RES_PS.
// T_CONV_PS after the lagging edge the code is valid and NEXT pulses high
// for T_NEXT_PS.  Outputs hold until the next comparison.
// 5 ps resolution, 5-bit range, the two segments and the Sign convention
// follow the description; the conversion and strobe times are own values.
// Event times are recorded with blocking assignments inside edge-triggered
// processes, which lint flags; that is intended for a timing model.
module mtdc_frontend #(
  parameter int unsigned FINE      = 9,
  parameter int unsigned COARSE    = 11,
  parameter real         RES_PS    = 5.0,
  parameter real         T_CONV_PS = 1000.0,
  parameter real         T_NEXT_PS = 2000.0
) (
  input  logic                   up,
  input  logic                   dn,
  output logic                   sign,
  output logic [FINE+COARSE-1:0] therm,
  output logic                   next
);
  real t_up, t_dn, dt;
  logic seen_up, seen_dn;

  function automatic real threshold(input int unsigned k);
    if (k < FINE) return real'(k + 1) * RES_PS;
    else          return real'(FINE + 2 * (k - FINE + 1)) * RES_PS;
  endfunction

  initial begin
    sign    = 1'b1;
    therm   = '0;
    next    = 1'b0;
    seen_up = 1'b0;
    seen_dn = 1'b0;
    t_up    = 0.0;
    t_dn    = 0.0;
  end

  always @(posedge up) begin
    t_up = $realtime;
    if (!seen_dn) sign = 1'b0;       // UP leads
    seen_up = 1'b1;
    if (seen_dn) convert();
  end

  always @(posedge dn) begin
    t_dn = $realtime;
    if (!seen_up) sign = 1'b1;       // DN leads
    seen_dn = 1'b1;
    if (seen_up) convert();
  end

  task automatic convert();
    logic [FINE+COARSE-1:0] th;
    seen_up = 1'b0;
    seen_dn = 1'b0;
    dt = (t_up > t_dn) ? (t_up - t_dn) : (t_dn - t_up);
    for (int unsigned k = 0; k < FINE + COARSE; k++) th[k] = (dt >= threshold(k));
    fork
      begin
        #(T_CONV_PS);
        therm = th;
        next  = 1'b1;
        #(T_NEXT_PS);
        next  = 1'b0;
      end
    join_none
  endtask

endmodule
