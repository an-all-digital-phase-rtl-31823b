`timescale 1ps/1fs
// tb_band_sipo: reset value, then every band 0..15 shifted in MSB first and
// loaded; the output must not change while bits are being shifted.
module tb_band_sipo;
  logic sclk = 1'b0, rst_n = 1'b1, sdi = 1'b0, load = 1'b0;
  logic [3:0] band;
  int checks = 0, failures = 0;

  band_sipo dut (.sclk(sclk), .rst_n(rst_n), .sdi(sdi), .load(load), .band(band));

  task automatic tick();
    #500 sclk = 1'b1;
    #500 sclk = 1'b0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] prev;
    #100 rst_n = 1'b0; #100 rst_n = 1'b1;
    checks++;
    if (band != 4'd5) begin failures++; $display("FAIL reset band %0d", band); end
    prev = band;
    for (int b = 15; b >= 0; b--) begin
      for (int i = 3; i >= 0; i--) begin
        sdi = 1'(b >> i);
        tick();
        checks++;
        if (band != prev) begin failures++; $display("FAIL band changed while shifting"); end
      end
      load = 1'b1; tick(); load = 1'b0;
      checks++;
      if (band != 4'(b)) begin failures++; $display("FAIL band %0d exp %0d", band, b); end
      prev = band;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
