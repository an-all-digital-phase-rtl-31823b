`timescale 1ps/1fs
// tb_dco: sets band and fine code (through row/column lines built here)
// and measures the output frequency over 200 periods; it must be
// 2390 + 16*band + 0.2*code MHz within 0.01 %.
module tb_dco;
  logic en = 1'b1;
  logic [3:0] band;
  logic [15:0] r, p, c;
  logic f_out;
  int checks = 0, failures = 0;

  dco dut (.en(en), .band(band), .r(r), .p(p), .c(c), .f_out(f_out));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 12; n++) begin
      int code;
      real t0, f, e;
      band = $urandom_range(0, 15);
      code = $urandom_range(0, 255);
      if (n == 0) code = 0;
      if (n == 1) code = 255;
      for (int i = 0; i < 16; i++) begin
        r[i] = (i < code / 16);
        p[i] = (i == code / 16);
        c[i] = (i < code % 16);
      end
      repeat (3) @(posedge f_out);
      t0 = $realtime;
      repeat (200) @(posedge f_out);
      f = 200.0 / ($realtime - t0) * 1.0e6;            // MHz
      e = 2390.0 + 16.0 * band + 0.2 * code;
      checks++;
      if (f < e * 0.9999 || f > e * 1.0001) begin
        failures++;
        $display("FAIL band %0d code %0d: %0.3f MHz exp %0.3f", band, code, f, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
