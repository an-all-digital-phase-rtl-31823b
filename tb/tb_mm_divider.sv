`timescale 1ps/1fs
// tb_mm_divider: the divider chain together with the /3/4 prescaler, fed
// by an ideal clock.  For each channel word and compensation request the
// number of input clocks between f_fb rising edges must be
//   N = 512 - fcw - tap,  tap = 4 + m (sign 0) or 4 - m (sign 1),
// i.e. 508 - fcw in the locked state and shifted by m cycles per ATDC level
// (checked on the second period after a change, since the tap is latched
// part-way through a period).  The number of /3 cycles per period (MD2 low)
// must be fcw + tap.
module tb_mm_divider;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [6:0] fcw;
  logic [1:0] level;
  logic sign;
  logic md2, f_fb, pres;
  logic [2:0] tap;
  int checks = 0, failures = 0;
  int cnt = 0, n3 = 0;

  prescaler34 u_pre (.clk(clk), .rst_n(rst_n), .mode(md2), .pres(pres));
  mm_divider dut (.pres(pres), .rst_n(rst_n), .fcw(fcw), .level(level), .sign(sign),
                  .md2(md2), .f_fb(f_fb), .tap(tap));

  always #200 clk = ~clk;
  always @(posedge clk) cnt++;
  always @(posedge pres) if (!md2) n3++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int f, input int m, input bit s);
    int c0, n30, exp_tap;
    fcw = 7'(f); level = 2'(m); sign = s;
    exp_tap = s ? 4 - m : 4 + m;
    repeat (2) @(posedge f_fb);
    c0 = cnt; n30 = n3;
    @(posedge f_fb);
    checks += 2;
    if (cnt - c0 != 512 - f - exp_tap) begin
      failures++;
      $display("FAIL fcw=%0d m=%0d s=%b N=%0d exp %0d", f, m, s, cnt - c0, 512 - f - exp_tap);
    end
    if (n3 - n30 != f + exp_tap) begin
      failures++;
      $display("FAIL fcw=%0d m=%0d s=%b /3 cycles=%0d exp %0d", f, m, s, n3 - n30, f + exp_tap);
    end
  endtask

  initial begin
    fcw = 7'd10; level = '0; sign = 1'b0;
    #50 rst_n = 1'b0; #100 rst_n = 1'b1;
    try(10, 0, 0);                       // N = 498
    try(28, 0, 1);                       // N = 480
    for (int m = 0; m <= 3; m++) begin
      try(10, m, 0);
      try(10, m, 1);
    end
    repeat (10) try($urandom_range(0, 115), $urandom_range(0, 3), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
