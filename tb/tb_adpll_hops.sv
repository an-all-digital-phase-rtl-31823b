`timescale 1ps/1fs
// tb_adpll_hops: lock-time workloads of the synthesizer at its default
// parameters, with a 5 MHz reference.
//
// 1. Channel hops of 5, 10, 15, 20 and 25 MHz, each once upward and once
//    downward, inside DCO band 5 (2470-2521 MHz), with dynamic phase control
//    on.  Each must settle within 5 us, the lock time the design targets for
//    this hop range.
// 2. A 10 MHz hop with the loop gains set to the nearest single shifts of
//    the analysed design values (KP = 2^3, KI = 2^-2 LSB; KI_FC unchanged).
//    Its lock time is reported and must stay under 30 us.
// 3. The same 10 MHz hop with dynamic phase control off (conventional
//    type-II loop).  The settling time is measured to completion and must be
//    longer than the fast-lock time; it is only reported, since it depends
//    on the chosen KP and KI.
// 4. The design-example channel N = 480 (2400 MHz): the coarse band is set
//    to 0 through the serial interface and the loop must lock there.
// Settling is judged from the tuning word: the DCO frequency it selects is
//   f = 2390 + 16*band + 0.2 * word/256  MHz,
// and the loop is settled once it stays within +-100 ppm of N * 5 MHz.  A
// hop also counts as locked only when the mode controller is back in phase
// tracking at the end of the window.
module tb_adpll_hops;
  import adpll_pkg::*;

  localparam real T_REF_PS = 200000.0;   // 5 MHz

  logic f_ref = 1'b0, rst_n = 1'b1;
  logic [6:0] fcw = 7'd12;
  logic fl_en = 1'b1;
  logic signed [4:0] kp_sh = 5'sd5, ki_sh = 5'sd1;
  logic band_sclk = 1'b0, band_sdi = 1'b0, band_load = 1'b0;
  logic f_out, f_fb, dlf_ovf;
  loop_mode_e mode;
  logic [15:0] tune_word;

  int checks = 0, failures = 0;

  adpll_top dut (
    .f_ref(f_ref), .rst_n(rst_n), .fcw(fcw), .fl_en(fl_en), .dith_en(1'b1),
    .kp_sh(kp_sh), .ki_sh(ki_sh), .kifc_sh_a(4'd11), .kifc_sh_b(4'd9), .kifc_b_en(1'b1),
    .init_code(16'h8000), .band_sclk(band_sclk), .band_sdi(band_sdi), .band_load(band_load),
    .f_out(f_out), .f_fb(f_fb), .mode(mode), .tune_word(tune_word), .dlf_ovf(dlf_ovf), .div_tap()
  );

  always #(T_REF_PS / 2.0) f_ref = ~f_ref;

  function automatic real freq_mhz(input logic [15:0] w, input logic [3:0] b);
    return 2390.0 + 16.0 * real'(b) + 0.2 * real'(w) / 256.0;
  endfunction

  // Runs the loop for n_ref reference periods and returns the time after
  // the start (ps) of the last sample outside +-100 ppm of n*5 MHz, or -1 if
  // the loop was still outside at the end.
  task automatic run_and_measure(input int n, input int n_ref, output real t_set);
    real t0, target, tol, f;
    bit  outside;
    t0     = $realtime;
    target = real'(n) * 5.0;
    tol    = target * 100.0e-6;
    t_set  = 0.0;
    outside = 1'b0;
    repeat (n_ref) begin
      @(posedge dut.next);
      f = freq_mhz(tune_word, dut.band);
      outside = (f > target + tol || f < target - tol);
      if (outside) t_set = $realtime - t0;
    end
    if (outside) t_set = -1.0;
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
  endtask

  // Hop to channel n (N = 508 - fcw in phase tracking) and check the lock.
  task automatic hop(input int n, input int n_ref, input real limit_ps,
                     input string what, output real t_set);
    int n_prev;
    n_prev = 508 - int'(fcw);
    fcw = 7'(508 - n);
    run_and_measure(n, n_ref, t_set);
    $display("%-28s N %0d -> %0d (%0d MHz): lock %0.2f us, mode %s", what, n_prev, n,
             (n - n_prev) * 5, t_set / 1e6, mode.name());
    check(t_set >= 0.0 && t_set < limit_ps, {what, ": lock time"});
    check(mode == MODE_PT, {what, ": back in phase tracking"});
  endtask

  real t, t_fast10, t_doc10, t_conv10, t_worst = 0.0;
  int  seq_n [10] = '{497, 499, 502, 498, 503, 498, 502, 499, 497, 496};

  initial begin
    #(13000.0 * T_REF_PS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b0;
    #(3.3 * T_REF_PS) rst_n = 1'b1;

    // Start on 2480 MHz.
    run_and_measure(496, 60, t);
    $display("initial lock at N 496: %0.2f us", t / 1e6);
    check(t >= 0.0, "initial lock");

    // 1. Hops of 5..25 MHz up, then 25..5 MHz down.
    foreach (seq_n[i]) begin
      hop(seq_n[i], 100, 5.0e6, "fast lock", t);
      if (t > t_worst) t_worst = t;
    end
    $display("longest fast-lock time over the hop set: %0.2f us", t_worst / 1e6);

    hop(498, 100, 5.0e6, "fast lock", t_fast10);

    // 2. Analysed gains, rounded to single shifts.
    kp_sh = 5'sd3;
    ki_sh = -5'sd2;
    hop(496, 200, 30.0e6, "fast lock, analysed gains", t_doc10);
    kp_sh = 5'sd5;
    ki_sh = 5'sd1;
    run_and_measure(496, 40, t);

    // 3. Conventional loop over the same 10 MHz hop.
    fl_en = 1'b0;
    hop(498, 10000, 2000.0e6, "conventional loop", t_conv10);
    check(t_conv10 > t_fast10, "conventional loop slower than fast lock");
    $display("conventional / fast lock, 10 MHz hop: %0.1f", t_conv10 / t_fast10);
    fl_en = 1'b1;
    run_and_measure(498, 40, t);

    // 4. Design-example channel N = 480 in band 0.
    band_write(4'd0);
    hop(480, 200, 30.0e6, "design example N = 480", t);
    check(dut.band == 4'd0, "band 0 loaded");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
