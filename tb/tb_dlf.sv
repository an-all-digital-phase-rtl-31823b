`timescale 1ps/1fs
// tb_dlf: drives the loop filter with random TDC codes, signs and ATDC
// levels and compares the registered tuning word with a cycle model:
//   e = +-mag,  I' = I + KI*e + s*m*KI_FC  (kept when outside 0..65535),
//   W' = I' + KP*e (W kept when outside 0..65535).
// Gains are positive shifts here so that the model is exact integers.
// Runs long enough with a one-sided error to hit both overflow detectors,
// and checks the hold, the output split and the one-clock latency.
module tb_dlf;
  logic clk = 1'b0, rst_n = 1'b1, enable;
  logic [4:0] tdc;
  logic sign;
  logic [1:0] level;
  logic [7:0] rd, rs;
  logic ovf;
  int checks = 0, failures = 0, n_ovf = 0;
  longint integ, word;

  dlf dut (.clk_p_i(clk), .rst_n_i(rst_n), .enable(enable), .tdc_out(tdc), .sign(sign),
           .level(level), .kp_sh(5'sd4), .ki_sh(5'sd2), .kifc_sh_a(4'd11), .kifc_sh_b(4'd9),
           .kifc_b_en(1'b1), .init_code(16'h8000), .result_dco(rd), .result_dsm(rs), .ovf(ovf));

  always #500 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit bias_up);
    longint e, isum, osum, pt, it;
    bit o;
    enable = ($urandom_range(0, 9) != 0);
    tdc    = $urandom_range(0, 31);
    sign   = bias_up ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
    level  = $urandom_range(0, 3);
    e  = enable ? longint'(tdc) : 0;
    if (sign) e = -e;
    pt = e * 16;
    it = e * 4 + (sign ? -1 : 1) * longint'(level) * (2048 + 512);
    isum = integ + it;
    o = 0;
    if (isum < 0 || isum > 65535) o = 1; else integ = isum;
    osum = integ + pt;
    if (osum < 0 || osum > 65535) o = 1; else word = osum;
    @(posedge clk);
    #1;
    checks++;
    if ({rd, rs} != 16'(word) || ovf != o) begin
      failures++;
      $display("FAIL word %h exp %h ovf %b exp %b", {rd, rs}, 16'(word), ovf, o);
    end
    if (o) n_ovf++;
  endtask

  initial begin
    enable = 1'b0; tdc = '0; sign = 1'b0; level = '0;
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    integ = 32768; word = 32768;
    checks++;
    if ({rd, rs} != 16'h8000) begin failures++; $display("FAIL reset value"); end
    repeat (300) step(1'b1);
    repeat (600) step(1'b0);
    repeat (300) step(1'b1);
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("overflows: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
