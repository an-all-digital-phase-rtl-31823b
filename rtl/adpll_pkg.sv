`timescale 1ps/1fs
// adpll_pkg: widths, constants and small helper functions shared by the
// blocks of the dynamic-phase-control ADPLL.
//
// Numbers that come from the design description: 5-bit main TDC, 3-stage
// auxiliary TDC, 7-bit divider counter with seven shift taps, 16-bit DCO
// tuning word split into an 8-bit integer (DCO) part and an 8-bit fractional
// (sigma-delta) part, 17-bit loop-filter accumulator.  The tap used in the
// locked state (C4) is also taken from the description.  Everything else here
// (the mode encoding, helper functions) is this design's own choice.
package adpll_pkg;

  localparam int unsigned MTDC_BITS   = 5;   // main TDC magnitude code
  localparam int unsigned ATDC_STAGES = 3;   // auxiliary TDC thermometer [S2,S1,S0]
  localparam int unsigned DIV_CNT_W   = 7;   // divider counter / channel word
  localparam int unsigned DIV_TAPS    = 7;   // shift-register taps C1..C7
  localparam int unsigned LOCK_TAP    = 4;   // tap selected in phase tracking mode
  localparam int unsigned DLF_ACC_W   = 17;  // integrator / sum width
  localparam int unsigned DCO_INT_W   = 8;   // integer tuning word (DCO varactors)
  localparam int unsigned DCO_FRAC_W  = 8;   // fractional tuning word (DSM)

  // Loop operating mode.
  typedef enum logic {
    MODE_PT = 1'b0,   // phase tracking: normal type-II TDC loop
    MODE_FA = 1'b1    // frequency acquisition: ATDC, KI controller, divider compensation on
  } loop_mode_e;

  // Gray code to binary.
  function automatic logic [MTDC_BITS-1:0] gray2bin(input logic [MTDC_BITS-1:0] g);
    logic [MTDC_BITS-1:0] b;
    b[MTDC_BITS-1] = g[MTDC_BITS-1];
    for (int i = MTDC_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Level (0..3) of a 3-bit thermometer code [S2,S1,S0].
  function automatic logic [1:0] atdc_level(input logic [ATDC_STAGES-1:0] s);
    if (s[2])      return 2'd3;
    else if (s[1]) return 2'd2;
    else if (s[0]) return 2'd1;
    else           return 2'd0;
  endfunction

endpackage
