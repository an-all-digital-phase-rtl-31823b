`timescale 1ps/1fs
// tb_mtdc_frontend: UP/DN edge pairs with a known time difference.  The
// thermometer must count the cells whose threshold (5 ps steps for 9 cells,
// then 10 ps steps) the difference reaches, Sign must be 0 when UP leads
// and 1 when DN leads, and NEXT must rise once per comparison, 1 ns after
// the later edge.
module tb_mtdc_frontend;
  logic up = 1'b0, dn = 1'b0;
  logic sign, next;
  logic [19:0] therm;
  int checks = 0, failures = 0, n_next = 0;
  real t_next;

  mtdc_frontend dut (.up(up), .dn(dn), .sign(sign), .therm(therm), .next(next));

  always @(posedge next) begin n_next++; t_next = $realtime; end

  function automatic int cells(input real d);
    int k = 0;
    for (int i = 0; i < 20; i++)
      if (d >= ((i < 9) ? 5.0 * (i + 1) : 5.0 * (9 + 2 * (i - 8)))) k++;
    return k;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      real d, t1;
      int k;
      d = real'($urandom_range(0, 4000)) / 20.0 - 100.0;    // -100..+100 ps
      if (n == 0) d = 2.5;
      #10000;
      if (d >= 0) begin up = 1'b1; #(d) dn = 1'b1; end
      else        begin dn = 1'b1; #(-d) up = 1'b1; end
      t1 = $realtime;
      #4000;
      up = 1'b0; dn = 1'b0;
      k = cells(d < 0 ? -d : d);
      checks += 3;
      if (therm != 20'((64'(1) << k) - 1)) begin
        failures++; $display("FAIL d=%0.2f therm %b exp %0d cells", d, therm, k);
      end
      if (sign != (d < 0)) begin failures++; $display("FAIL d=%0.2f sign %b", d, sign); end
      if (n_next != n + 1 || t_next - t1 < 999.99 || t_next - t1 > 1000.01) begin
        failures++; $display("FAIL d=%0.2f next timing", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
