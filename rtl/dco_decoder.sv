`timescale 1ps/1fs
// dco_decoder: converts the integer DCO code into the row/column control
// lines of the 16x16 unit-varactor matrix.
//
// code = sat(int_code + y) where y is the sigma-delta output (-1..+2); the
// sum is clipped to 0..255.  With row = code[7:4] and col = code[3:0]:
//   R[i] = (i < row)   rows completely on
//   P[i] = (i == row)  the partly filled row
//   C[j] = (j < col)   columns on inside the partly filled row
// and the local decoder of cell (i,j) switches its varactor on when
// R[i] | P[i] & C[j], so exactly 'code' cells are on and the count grows one
// cell per code step (thermometer, monotonic).  48 lines replace 256.  The
// three buses are registered on clk so that the different converter delays
// cause no glitches at the tank.  The matrix, the 48-line decoding and the
// output latches follow the description; adding the modulator output here
// (rather than to a separate fractional bank) is this design's own choice.
module dco_decoder
  import adpll_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DCO_INT_W-1:0] int_code,
  input  logic signed [2:0]    y,
  output logic [15:0]          r,
  output logic [15:0]          p,
  output logic [15:0]          c
);
  logic signed [DCO_INT_W+1:0] sum;
  logic [DCO_INT_W-1:0]        code;
  logic [3:0]                  row, col;
  logic [15:0]                 r_d, p_d, c_d;

  always_comb begin
    sum = $signed({2'b00, int_code}) + (DCO_INT_W+2)'(y);
    if (sum < 0)        code = '0;
    else if (sum > 255) code = 8'd255;
    else                code = sum[DCO_INT_W-1:0];
    row = code[7:4];
    col = code[3:0];
    for (int i = 0; i < 16; i++) begin
      r_d[i] = (4'(i) < row);
      p_d[i] = (4'(i) == row);
      c_d[i] = (4'(i) < col);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
      p <= 16'h0001;
      c <= '0;
    end else begin
      r <= r_d;
      p <= p_d;
      c <= c_d;
    end
  end

endmodule
