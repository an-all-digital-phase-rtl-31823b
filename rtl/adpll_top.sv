`timescale 1ps/1fs
// adpll_top: all-digital PLL with dynamic phase control for fast locking.
//
// Loop: the PFD compares the reference with the divided DCO clock.  The
// main TDC (phase selector + 5-bit uneven-step Vernier lines + encoder)
// measures small errors with 5 ps steps; the 3-stage auxiliary TDC (ATDC)
// gives a coarse level m = 0..3 of large errors.  The PI loop filter is
// clocked by the TDC's NEXT strobe; its 16-bit tuning word drives the DCO
// varactor matrix (8 MSBs through the row/column decoder) and a MASH-II
// sigma-delta modulator (8 LSBs) running on the prescaler clock.  The
// divider (/3/4 prescaler + 7-bit counter) has N = 512 - fcw - tap.
//
// Fast lock: after reset or a channel change the mode controller runs the
// loop in frequency acquisition.  Each comparison with an ATDC level m > 0
// (1) moves the next divider edge by m DCO cycles towards the reference
// (phase-compensation path) and (2) adds sign * m * KI_FC to the integrator
// (feed-forward frequency path through the KI controller).  When S0 stays
// clear the loop switches to phase tracking, the ATDC is turned off and the
// loop is a type-II TDC loop with gains KP, KI.  fl_en = 0 gives the
// conventional loop for comparison.
//
// The PFD, TDC front ends and DCO are behavioural models (analog parts), so
// this top level is a simulation model of the whole synthesizer; the other
// blocks are synthesizable.  Loop-gain shifts come in as ports so they can be
// programmed (the design's analysed KP ~ 2^2.5 and KI ~ 2^-1.5 can only be
// approximated by single shifts; the testbench uses larger, swept values).
//
// Interface and timing: rst_n is asynchronous.  A two-flop synchroniser on
// f_ref releases the PFD, prescaler and divider together so that the first
// feedback edge arrives near a reference edge; its output is used as an
// asynchronous reset of those blocks on purpose (lint reports the flop
// output driving an asynchronous reset, which is the intended structure).
// The loop filter and mode controller update once per reference period on
// the TDC's NEXT strobe; the sigma-delta modulator and DCO decoder run on
// the prescaler output.  The block set and their connections follow the
// described architecture; the reset synchroniser, the fl_en mode pin and the
// band port wiring are this design's own choices.
module adpll_top
  import adpll_pkg::*;
(
  input  logic                 f_ref,
  input  logic                 rst_n,
  input  logic [DIV_CNT_W-1:0] fcw,        // N = 508 - fcw in phase tracking
  input  logic                 fl_en,      // dynamic phase control enable
  input  logic                 dith_en,    // sigma-delta dither enable
  input  logic signed [4:0]    kp_sh,
  input  logic signed [4:0]    ki_sh,
  input  logic [3:0]           kifc_sh_a,
  input  logic [3:0]           kifc_sh_b,
  input  logic                 kifc_b_en,
  input  logic [15:0]          init_code,  // tuning word after reset
  input  logic                 band_sclk,  // coarse band serial interface
  input  logic                 band_sdi,
  input  logic                 band_load,
  output logic                 f_out,      // DCO output
  output logic                 f_fb,       // divided clock
  output loop_mode_e           mode,
  output logic [15:0]          tune_word,  // DLF output
  output logic                 dlf_ovf,
  output logic [2:0]           div_tap     // divider shift tap in use (4 when locked)
);
  logic                   up, dn, sign, next;
  logic [19:0]            therm;
  logic [MTDC_BITS-1:0]   tdc_code;
  logic [2:0]             s;
  logic                   atdc_en;
  logic [1:0]             level;
  logic [7:0]             res_dco, res_dsm;
  logic signed [2:0]      dsm_y;
  logic [15:0]            r, p, c;
  logic [3:0]             band;
  logic                   pres, md2;
  logic [1:0]             rst_sync;
  logic                   div_rst_n;

  // The divider chain, PFD and sigma-delta leave reset on a reference edge,
  // so the first feedback edge arrives one reference period later with a
  // small phase error (own choice).
  always_ff @(posedge f_ref or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign div_rst_n = rst_sync[1];

  pfd u_pfd (.f_ref(f_ref), .f_fb(f_fb), .rst_n(div_rst_n), .up(up), .dn(dn));

  mtdc_frontend u_mtdc_fe (.up(up), .dn(dn), .sign(sign), .therm(therm), .next(next));

  mtdc_encoder u_mtdc_enc (.therm(therm), .code(tdc_code));

  atdc u_atdc (.up(up), .dn(dn), .en(atdc_en), .s(s));

  fastlock_ctrl u_flc (
    .clk(next), .rst_n(rst_n), .fl_en(fl_en), .fcw(fcw), .s(s),
    .mode(mode), .atdc_en(atdc_en), .level(level)
  );

  dlf u_dlf (
    .clk_p_i(next), .rst_n_i(rst_n), .enable(1'b1), .tdc_out(tdc_code),
    .sign(sign), .level(level), .kp_sh(kp_sh), .ki_sh(ki_sh),
    .kifc_sh_a(kifc_sh_a), .kifc_sh_b(kifc_sh_b), .kifc_b_en(kifc_b_en),
    .init_code(init_code), .result_dco(res_dco), .result_dsm(res_dsm), .ovf(dlf_ovf)
  );
  assign tune_word = {res_dco, res_dsm};

  mash2_dsm u_dsm (.clk(pres), .rst_n(rst_n), .x(res_dsm), .dith_en(dith_en), .y(dsm_y));

  dco_decoder u_dec (.clk(pres), .rst_n(rst_n), .int_code(res_dco), .y(dsm_y),
                     .r(r), .p(p), .c(c));

  band_sipo u_band (.sclk(band_sclk), .rst_n(rst_n), .sdi(band_sdi), .load(band_load),
                    .band(band));

  dco u_dco (.en(1'b1), .band(band), .r(r), .p(p), .c(c), .f_out(f_out));

  prescaler34 u_pres (.clk(f_out), .rst_n(div_rst_n), .mode(md2), .pres(pres));

  mm_divider u_div (.pres(pres), .rst_n(div_rst_n), .fcw(fcw), .level(level), .sign(sign),
                    .md2(md2), .f_fb(f_fb), .tap(div_tap));

endmodule
