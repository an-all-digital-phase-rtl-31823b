`timescale 1ps/1fs
// tb_ki_controller: random check of the loop-gain products against an
// integer model: p = sat14(err * 2^kp), i = sat15(floor(err * 2^ki)
// + s * m * (2^a + b_en * 2^b)), s = -1 when sign is set.
module tb_ki_controller;
  logic signed [5:0]  err;
  logic               sign, b_en;
  logic [1:0]         level;
  logic signed [4:0]  kp_sh, ki_sh;
  logic [3:0]         a, b;
  logic signed [13:0] p_term;
  logic signed [14:0] i_term;
  int checks = 0, failures = 0;

  ki_controller dut (.err(err), .sign(sign), .level(level), .kp_sh(kp_sh), .ki_sh(ki_sh),
                     .kifc_sh_a(a), .kifc_sh_b(b), .kifc_b_en(b_en),
                     .p_term(p_term), .i_term(i_term));

  function automatic longint sat(input longint x, input int w);
    longint hi = (longint'(1) << (w - 1)) - 1;
    longint lo = -(longint'(1) << (w - 1));
    return (x > hi) ? hi : (x < lo) ? lo : x;
  endfunction

  function automatic longint scale(input longint x, input int sh);
    longint d;
    if (sh >= 0) return x * (longint'(1) << sh);
    d = longint'(1) << (-sh);
    // floor division (arithmetic right shift)
    if (x >= 0) return x / d;
    else        return -((-x + d - 1) / d);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint ep, ei, kifc;
      err   = 6'($urandom_range(0, 62)) - 6'sd31;
      sign  = $urandom_range(0, 1);
      level = $urandom_range(0, 3);
      kp_sh = 5'($urandom_range(0, 10)) - 5'sd2;
      ki_sh = 5'($urandom_range(0, 10)) - 5'sd4;
      a     = $urandom_range(6, 12);
      b     = $urandom_range(4, 11);
      b_en  = $urandom_range(0, 1);
      #10;
      kifc = (longint'(1) << a) + (b_en ? (longint'(1) << b) : 0);
      ep = sat(scale(err, kp_sh), 14);
      ei = sat(scale(err, ki_sh) + (sign ? -1 : 1) * longint'(level) * kifc, 15);
      checks += 2;
      if (longint'(p_term) != ep) begin
        failures++;
        $display("FAIL p err=%0d kp=%0d got %0d exp %0d", err, kp_sh, p_term, ep);
      end
      if (longint'(i_term) != ei) begin
        failures++;
        $display("FAIL i err=%0d ki=%0d m=%0d s=%b got %0d exp %0d", err, ki_sh, level, sign, i_term, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
