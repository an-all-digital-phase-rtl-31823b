`timescale 1ps/1fs
// tb_adpll_top: closed-loop test of the whole synthesizer at its default
// parameters.
//
// A 5 MHz reference drives the loop.  The test locks on 2490 MHz (N = 498)
// from reset, then hops 10 MHz down (N = 496), 25 MHz up (N = 501) and
// 5 MHz down (N = 500) with
// dynamic phase control on, then repeats the 10 MHz hop with it off
// (conventional type-II loop), reprograms the coarse band through the
// serial interface, and finally asks for a channel outside the tuning range
// so that the loop filter's overflow detectors must hold the code.
// Settling is judged from the tuning word: the expected DCO frequency is
//   f = 2390 + 16*band + 0.2 * word/256  MHz
// and the loop counts as settled once it stays within +-100 ppm of N * 5 MHz
// (the criterion used in the lock-time measurement of the design).  After
// the initial lock and the first hop the reference and feedback edge times
// are also compared directly: the skew must stay inside the main TDC range.
// Counted and required at least once: frequency acquisition entered,
// return to phase tracking, divider ratio moved off the locked tap in both
// directions, KI_FC feed-forward applied, conventional mode, band load,
// overflow hold.  Fast lock must settle a 10 MHz hop faster than the
// conventional loop and within 8 us.
module tb_adpll_top;
  import adpll_pkg::*;

  localparam real T_REF_PS = 200000.0;   // 5 MHz

  logic f_ref = 1'b0, rst_n = 1'b1;
  logic [6:0] fcw = 7'd10;
  logic fl_en = 1'b1, dith_en = 1'b1;
  logic band_sclk = 1'b0, band_sdi = 1'b0, band_load = 1'b0;
  logic f_out, f_fb, dlf_ovf;
  loop_mode_e mode;
  logic [15:0] tune_word;
  logic [3:0]  band_now;

  int checks = 0, failures = 0;
  int n_fa = 0, n_pt = 0, n_tap_dn = 0, n_tap_up = 0, n_kifc = 0, n_ovf = 0,
      n_conv = 0, n_band = 0;

  adpll_top dut (
    .f_ref(f_ref), .rst_n(rst_n), .fcw(fcw), .fl_en(fl_en), .dith_en(dith_en),
    .kp_sh(5'sd5), .ki_sh(5'sd1), .kifc_sh_a(4'd11), .kifc_sh_b(4'd9), .kifc_b_en(1'b1),
    .init_code(16'h8000), .band_sclk(band_sclk), .band_sdi(band_sdi), .band_load(band_load),
    .f_out(f_out), .f_fb(f_fb), .mode(mode), .tune_word(tune_word), .dlf_ovf(dlf_ovf), .div_tap()
  );

  always #(T_REF_PS / 2.0) f_ref = ~f_ref;

  // Mechanism counters, sampled on every loop-filter update.
  loop_mode_e mode_d = MODE_PT;
  always @(posedge dut.next) begin
    if (mode == MODE_FA && mode_d == MODE_PT) n_fa++;
    if (mode == MODE_PT && mode_d == MODE_FA) n_pt++;
    mode_d = mode;
    if (dut.level != 0) n_kifc++;
    if (!fl_en) n_conv++;
    if (dlf_ovf) n_ovf++;
  end
  always @(posedge f_fb) begin
    if (dut.div_tap > 3'd4) n_tap_dn++;
    if (dut.div_tap < 3'd4) n_tap_up++;
  end

  function automatic real freq_mhz(input logic [15:0] w, input logic [3:0] b);
    return 2390.0 + 16.0 * real'(b) + 0.2 * real'(w) / 256.0;
  endfunction

  assign band_now = dut.band;

  // Runs the loop for 'dur_ps' and returns the settling time (ps after the
  // start) to +-100 ppm of n*5 MHz, or -1 if it never settled.
  task automatic run_and_measure(input int n, input real dur_ps, output real t_set);
    real t0, target, tol, f;
    t0     = $realtime;
    target = real'(n) * 5.0;
    tol    = target * 100.0e-6;
    t_set  = 0.0;
    while ($realtime - t0 < dur_ps) begin
      @(posedge dut.next);
      f = freq_mhz(tune_word, band_now);
      if (f > target + tol || f < target - tol) t_set = $realtime - t0;
    end
    if (t_set > dur_ps - 2.0 * T_REF_PS) t_set = -1.0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic band_write(input logic [3:0] b);
    for (int i = 3; i >= 0; i--) begin
      band_sdi = b[i];
      #1000 band_sclk = 1'b1;
      #1000 band_sclk = 1'b0;
    end
    band_load = 1'b1;
    #1000 band_sclk = 1'b1;
    #1000 band_sclk = 1'b0;
    band_load = 1'b0;
    n_band++;
  endtask

  // Edge-time skew between reference and feedback, for the phase-lock check.
  realtime t_ref_edge = 0, t_fb_edge = 0;
  always @(posedge f_ref) t_ref_edge = $realtime;
  always @(posedge f_fb)  t_fb_edge  = $realtime;

  // Over n reference periods the feedback edge must follow the reference
  // edge within the main TDC range (155 ps), i.e. the loop is phase locked
  // and the DCO really runs at N * f_ref.
  task automatic check_phase_lock(input int n, input string what);
    real worst = 0.0, d;
    repeat (n) begin
      @(posedge dut.next);
      d = t_fb_edge - t_ref_edge;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    $display("%s: worst reference/feedback skew %0.1f ps", what, worst);
    check(worst < 155.0, {what, ": phase locked"});
  endtask

  real t_lock0, t_fl10, t_fl25, t_fl5, t_conv10, t_band, t_dummy;

  initial begin
    #(4000.0 * T_REF_PS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #(3.3 * T_REF_PS) rst_n = 1'b1;

    // Initial lock at 2490 MHz.
    run_and_measure(498, 40.0 * T_REF_PS, t_lock0);
    $display("initial lock: %0.2f us, word %h, mode %s", t_lock0 / 1e6, tune_word, mode.name());
    check(t_lock0 >= 0.0, "initial lock");
    check(mode == MODE_PT, "phase tracking after initial lock");
    check_phase_lock(20, "after initial lock");

    // 10 MHz hop down with dynamic phase control.
    fcw = 7'd12;
    run_and_measure(496, 100.0 * T_REF_PS, t_fl10);
    $display("fast lock, 10 MHz hop: %0.2f us", t_fl10 / 1e6);
    check(t_fl10 >= 0.0 && t_fl10 < 8.0e6, "fast lock 10 MHz within 8 us");
    check(mode == MODE_PT, "phase tracking after 10 MHz hop");
    check_phase_lock(20, "after 10 MHz hop");

    // 25 MHz hop up.
    fcw = 7'd7;
    run_and_measure(501, 100.0 * T_REF_PS, t_fl25);
    $display("fast lock, 25 MHz hop: %0.2f us", t_fl25 / 1e6);
    check(t_fl25 >= 0.0 && t_fl25 < 8.0e6, "fast lock 25 MHz within 8 us");

    // 5 MHz hop down.
    fcw = 7'd8;
    run_and_measure(500, 100.0 * T_REF_PS, t_fl5);
    $display("fast lock, 5 MHz hop: %0.2f us", t_fl5 / 1e6);
    check(t_fl5 >= 0.0 && t_fl5 < 8.0e6, "fast lock 5 MHz within 8 us");

    // Conventional loop, 10 MHz hop up from the locked N = 500.
    fl_en = 1'b0;
    fcw   = 7'd10;
    run_and_measure(498, 1500.0 * T_REF_PS, t_conv10);
    $display("conventional, 10 MHz hop: %0.2f us", t_conv10 / 1e6);
    check(t_conv10 > t_fl10, "conventional loop settles, slower than fast lock");
    fl_en = 1'b1;
    fcw   = 7'd11;
    run_and_measure(497, 100.0 * T_REF_PS, t_dummy);
    check(t_dummy >= 0.0, "fast lock again after conventional run");

    // Move to band 4 (16 MHz lower) together with a hop to 2480 MHz.
    band_write(4'd4);
    fcw = 7'd12;
    run_and_measure(496, 100.0 * T_REF_PS, t_band);
    $display("relock after band change: %0.2f us, word %h", t_band / 1e6, tune_word);
    check(band_now == 4'd4, "band loaded through serial interface");
    check(t_band >= 0.0, "relock after band change");

    // Unreachable channel: band 4 tops out at 2.505 GHz, below 2.54 GHz -> overflow.
    fcw = 7'd0;
    run_and_measure(508, 60.0 * T_REF_PS, t_dummy);
    check(tune_word >= 16'hf000, "tuning word pinned at top on overflow");

    $display("mechanisms: FA=%0d PT=%0d tap_dn=%0d tap_up=%0d kifc=%0d conv=%0d band=%0d ovf=%0d",
             n_fa, n_pt, n_tap_dn, n_tap_up, n_kifc, n_conv, n_band, n_ovf);
    check(n_fa > 0, "frequency acquisition mode entered");
    check(n_pt > 0, "phase tracking mode re-entered");
    check(n_tap_dn > 0, "divide ratio reduced by compensation");
    check(n_tap_up > 0, "divide ratio increased by compensation");
    check(n_kifc > 0, "KI_FC feed-forward applied");
    check(n_conv > 0, "conventional mode run");
    check(n_band > 0, "band switch");
    check(n_ovf > 0, "loop filter overflow detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
