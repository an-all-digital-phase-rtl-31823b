`timescale 1ps/1fs
// tb_prescaler34: measures the number of input clocks between rising edges
// of pres.  The mode is changed right after a pres rising edge (as the
// divider does); the output cycle after that must have length 3 (mode 0)
// or 4 (mode 1), and no cycle may have any other length.
module tb_prescaler34;
  logic clk = 1'b0, rst_n = 1'b1, mode = 1'b0;
  logic pres;
  int checks = 0, failures = 0;
  int cnt = 0;

  prescaler34 dut (.clk(clk), .rst_n(rst_n), .mode(mode), .pres(pres));

  always #200 clk = ~clk;
  always @(posedge clk) cnt++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit modes[$];
    int c0;
    #50 rst_n = 1'b0; #100 rst_n = 1'b1;
    @(posedge pres);
    for (int n = 0; n < 400; n++) begin
      bit m;
      m = $urandom_range(0, 1);
      #1 mode = m;
      modes.push_back(m);
      c0 = cnt;
      @(posedge pres);
      // cycle just finished used the mode applied one cycle before
      if (n > 0) begin
        checks++;
        if (cnt - c0 != (modes[n-1] ? 4 : 3)) begin
          failures++;
          $display("FAIL cycle %0d length %0d mode %b", n, cnt - c0, modes[n-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
