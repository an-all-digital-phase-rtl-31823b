`timescale 1ps/1fs
// dlf: programmable proportional-integral digital loop filter of the type-II
// ADPLL, clocked once per phase comparison.
//
// Data path (after the DLF block diagram): the 5-bit MTDC magnitude is gated
// by 'enable' (zero when disabled) and turned into a 6-bit two's complement
// error using the phase-selector Sign.  The ki_controller forms the
// proportional (14-bit) and integral (15-bit) products; the latter includes
// the frequency-compensation gain KI_FC scaled by the ATDC level during
// frequency acquisition.  A 17-bit integrator accumulates the integral
// product; its overflow detector keeps the old value when the new one would
// leave the 16-bit unsigned tuning range.  The output sum integrator +
// proportional term goes through a second overflow detector: out of range,
// the tuning word stays as it was.  The 16-bit tuning word is split into
// result_dco (8 MSBs, DCO varactor code) and result_dsm (8 LSBs, fed to the
// sigma-delta modulator).
//
// Units: one LSB of the 16-bit word is 1/256 of a DCO code.  The integrator
// restarts at init_code on reset.  The output word is registered (own
// choice) so that it can be held on overflow.  Latency: the code computed
// from a comparison appears one clk_p_i edge (the NEXT strobe) after it.
module dlf
  import adpll_pkg::*;
#(
  parameter int unsigned ACC_W = DLF_ACC_W
) (
  input  logic                    clk_p_i,
  input  logic                    rst_n_i,
  input  logic                    enable,
  input  logic [MTDC_BITS-1:0]    tdc_out,
  input  logic                    sign,
  input  logic [1:0]              level,       // ATDC level from the mode controller
  input  logic signed [4:0]       kp_sh,
  input  logic signed [4:0]       ki_sh,
  input  logic [3:0]              kifc_sh_a,
  input  logic [3:0]              kifc_sh_b,
  input  logic                    kifc_b_en,
  input  logic [DCO_INT_W+DCO_FRAC_W-1:0] init_code,
  output logic [DCO_INT_W-1:0]    result_dco,
  output logic [DCO_FRAC_W-1:0]   result_dsm,
  output logic                    ovf          // an overflow detector fired this cycle
);
  localparam int unsigned OUT_W = DCO_INT_W + DCO_FRAC_W;
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << OUT_W) - 1);

  logic [MTDC_BITS-1:0]        mag;
  logic signed [MTDC_BITS:0]   err;
  logic signed [13:0]          p_term;
  logic signed [14:0]          i_term;
  logic signed [ACC_W-1:0]     integ, integ_sum, integ_nxt, out_sum;
  logic [OUT_W-1:0]            word;
  logic                        ovf_i, ovf_o;

  assign mag = enable ? tdc_out : '0;
  assign err = sign ? -$signed({1'b0, mag}) : $signed({1'b0, mag});

  ki_controller u_kic (
    .err(err), .sign(sign), .level(level), .kp_sh(kp_sh), .ki_sh(ki_sh),
    .kifc_sh_a(kifc_sh_a), .kifc_sh_b(kifc_sh_b), .kifc_b_en(kifc_b_en),
    .p_term(p_term), .i_term(i_term)
  );

  always_comb begin
    integ_sum = integ + ACC_W'(i_term);
    ovf_i     = (integ_sum < 0) || (integ_sum > MAXV);
    integ_nxt = ovf_i ? integ : integ_sum;
    out_sum   = integ_nxt + ACC_W'(p_term);
    ovf_o     = (out_sum < 0) || (out_sum > MAXV);
  end

  always_ff @(posedge clk_p_i or negedge rst_n_i) begin
    if (!rst_n_i) begin
      integ <= ACC_W'(init_code);
      word  <= init_code;
      ovf   <= 1'b0;
    end else begin
      integ <= integ_nxt;
      if (!ovf_o) word <= out_sum[OUT_W-1:0];
      ovf   <= ovf_i | ovf_o;
    end
  end

  assign result_dco = word[OUT_W-1:DCO_FRAC_W];
  assign result_dsm = word[DCO_FRAC_W-1:0];

endmodule
