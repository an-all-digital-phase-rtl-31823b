`timescale 1ps/1fs
// tb_pfd: reference and feedback edges with a known offset d.  The leading
// output must rise at its input edge, both must fall together 300 ps after
// the later edge, and the width difference UP - DN must equal d.
module tb_pfd;
  logic f_ref = 1'b0, f_fb = 1'b0, rst_n = 1'b1;
  logic up, dn;
  int checks = 0, failures = 0;
  real t_up_r, t_up_f, t_dn_r, t_dn_f;

  pfd dut (.f_ref(f_ref), .f_fb(f_fb), .rst_n(rst_n), .up(up), .dn(dn));

  always @(posedge up) t_up_r = $realtime;
  always @(negedge up) t_up_f = $realtime;
  always @(posedge dn) t_dn_r = $realtime;
  always @(negedge dn) t_dn_f = $realtime;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0; #100 rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      real d, wd;
      d = real'($urandom_range(0, 4000)) - 2000.0;   // ps, + = reference first
      #10000;
      if (d >= 0) begin
        f_ref = 1'b1; #(d) f_fb = 1'b1;
      end else begin
        f_fb = 1'b1; #(-d) f_ref = 1'b1;
      end
      #5000;
      f_ref = 1'b0; f_fb = 1'b0;
      wd = (t_up_f - t_up_r) - (t_dn_f - t_dn_r);
      checks += 2;
      if (wd < d - 0.01 || wd > d + 0.01) begin
        failures++;
        $display("FAIL d=%0.1f width difference %0.1f", d, wd);
      end
      if (t_up_f != t_dn_f ||
          t_up_f - ((t_up_r > t_dn_r) ? t_up_r : t_dn_r) < 299.99 ||
          t_up_f - ((t_up_r > t_dn_r) ? t_up_r : t_dn_r) > 300.01) begin
        failures++;
        $display("FAIL d=%0.1f reset timing", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
