`timescale 1ps/1fs
// atdc: behavioural model (not synthesizable) of the 3-stage auxiliary TDC,
// the coarse timing window of the fast-lock path.
//
// Three current-controlled delay cells of DELTA_PS each delay the leading
// PFD pulse; flip-flops clocked by the lagging pulse give the thermometer
// code [S2,S1,S0]:  S(j) = 1 when |t_up - t_dn| >= (j+1) * DELTA_PS.  Small
// errors give 000 (the dead zone lies on the horizontal axis); with the
// phase-selector Sign this is a 7-level quantizer.  The code is updated
// T_CONV_PS after the lagging edge (before the main TDC's NEXT strobe) and
// held until the next comparison.  With en low the cells are off and the
// code is 000.  DELTA_PS = 613 ps is the design value in the description
// (it must exceed the whole main TDC range, 31 x 5 ps).  The model samples
// event times with blocking assignments inside edge-triggered processes;
// lint flags these, which is intended for a timing model.
module atdc #(
  parameter real DELTA_PS  = 613.0,
  parameter real T_CONV_PS = 500.0
) (
  input  logic       up,
  input  logic       dn,
  input  logic       en,
  output logic [2:0] s
);
  real  t_up, t_dn;
  logic seen_up, seen_dn;

  initial begin
    s       = '0;
    seen_up = 1'b0;
    seen_dn = 1'b0;
    t_up    = 0.0;
    t_dn    = 0.0;
  end

  always @(posedge up) begin
    t_up = $realtime;
    seen_up = 1'b1;
    if (seen_dn) sample();
  end

  always @(posedge dn) begin
    t_dn = $realtime;
    seen_dn = 1'b1;
    if (seen_up) sample();
  end

  always @(negedge en) s = '0;

  task automatic sample();
    real dt;
    logic [2:0] q;
    seen_up = 1'b0;
    seen_dn = 1'b0;
    dt = (t_up > t_dn) ? (t_up - t_dn) : (t_dn - t_up);
    for (int j = 0; j < 3; j++) q[j] = en && (dt >= real'(j + 1) * DELTA_PS);
    fork
      begin
        #(T_CONV_PS);
        s = q;
      end
    join_none
  endtask

endmodule
