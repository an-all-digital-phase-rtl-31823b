`timescale 1ps/1fs
// tb_dco_decoder: for random integer codes and modulator outputs the number
// of matrix cells switched on (cell (i,j) on when R[i] | P[i]&C[j]) must
// equal clip(int + y, 0, 255) one clock later; R must be a thermometer, P
// one-hot, and the cell count must grow by one per code (checked over the
// whole 0..255 sweep).
module tb_dco_decoder;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] ic;
  logic signed [2:0] y;
  logic [15:0] r, p, c;
  int checks = 0, failures = 0;

  dco_decoder dut (.clk(clk), .rst_n(rst_n), .int_code(ic), .y(y), .r(r), .p(p), .c(c));

  always #500 clk = ~clk;

  function automatic int cells(input logic [15:0] rr, pp, cc);
    int n = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (rr[i] | (pp[i] & cc[j])) n++;
    return n;
  endfunction

  task automatic apply(input int code, input int yy);
    int e;
    ic = 8'(code); y = 3'(yy);
    @(posedge clk); #1;
    e = code + yy;
    if (e < 0) e = 0;
    if (e > 255) e = 255;
    checks++;
    if (cells(r, p, c) != e || $countones(p) != 1 || ((r + 16'd1) & r) != 0) begin
      failures++;
      $display("FAIL code=%0d y=%0d cells=%0d exp %0d", code, yy, cells(r, p, c), e);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ic = '0; y = '0;
    #100 rst_n = 1'b0; #100 rst_n = 1'b1;
    for (int k = 0; k < 256; k++) apply(k, 0);
    apply(0, -1);
    apply(255, 2);
    apply(254, 2);
    repeat (500) apply($urandom_range(0, 255), $urandom_range(0, 3) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
