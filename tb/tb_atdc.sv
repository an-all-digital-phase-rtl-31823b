`timescale 1ps/1fs
// tb_atdc: UP/DN edge pairs with a known difference d.  With the ATDC on,
// [S2,S1,S0] must be the thermometer of floor(|d| / 613 ps) (saturating at
// 3) half a nanosecond after the later edge; with it off the code is 000.
module tb_atdc;
  logic up = 1'b0, dn = 1'b0, en = 1'b1;
  logic [2:0] s;
  int checks = 0, failures = 0;

  atdc dut (.up(up), .dn(dn), .en(en), .s(s));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 80; n++) begin
      real d, a;
      int lv;
      logic [2:0] e;
      d  = real'($urandom_range(0, 5000)) - 2500.0;
      en = (n % 5 != 4);
      #10000;
      if (d >= 0) begin up = 1'b1; #(d) dn = 1'b1; end
      else        begin dn = 1'b1; #(-d) up = 1'b1; end
      #600;
      up = 1'b0; dn = 1'b0;
      a  = (d < 0) ? -d : d;
      lv = (a >= 3 * 613.0) ? 3 : (a >= 2 * 613.0) ? 2 : (a >= 613.0) ? 1 : 0;
      if (!en) lv = 0;
      e  = 3'((1 << lv) - 1);
      checks++;
      if (s != e) begin failures++; $display("FAIL d=%0.1f en=%b s=%b exp %b", d, en, s, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
