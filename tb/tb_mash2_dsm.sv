`timescale 1ps/1fs
// tb_mash2_dsm: without dither the first-stage carries of a MASH 1-1 fed
// with x sum to exactly x over any 256 clocks, and the second-stage term
// c2 - c2(n-1) telescopes to -1, 0 or +1, so the output sums to x +- 1 over
// every window of 256 clocks; y must stay within -1..+2.  With dither on, the mean over 4096 clocks must be within
// 1/256 of x/256.  Also checks the first-order carry sequence for x = 128
// (alternating 0/1 pattern sum) through the same mean rule.
module tb_mash2_dsm;
  logic clk = 1'b0, rst_n = 1'b1, dith = 1'b0;
  logic [7:0] x;
  logic signed [2:0] y;
  int checks = 0, failures = 0;

  mash2_dsm dut (.clk(clk), .rst_n(rst_n), .x(x), .dith_en(dith), .y(y));

  always #500 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[6] = '{0, 1, 37, 128, 200, 255};
    foreach (vals[k]) begin
      int sum, bad;
      x = 8'(vals[k]);
      dith = 1'b0;
      rst_n = 1'b0; #100 rst_n = 1'b1;
      repeat (300) @(posedge clk);
      sum = 0; bad = 0;
      for (int n = 0; n < 256; n++) begin
        @(posedge clk); #1;
        sum += int'(y);
        if (y < -1 || y > 2) bad++;
      end
      checks += 2;
      if (sum < vals[k] - 1 || sum > vals[k] + 1) begin failures++; $display("FAIL x=%0d sum=%0d", vals[k], sum); end
      if (bad != 0)       begin failures++; $display("FAIL x=%0d y out of range", vals[k]); end
      dith = 1'b1;
      sum = 0;
      for (int n = 0; n < 4096; n++) begin
        @(posedge clk); #1;
        sum += int'(y);
      end
      checks++;
      if (sum < vals[k] * 16 - 16 || sum > vals[k] * 16 + 32) begin
        failures++;
        $display("FAIL dither x=%0d sum=%0d", vals[k], sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
