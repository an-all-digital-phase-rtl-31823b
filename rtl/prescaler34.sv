`timescale 1ps/1fs
// prescaler34: divide-by-3/4 dual-modulus prescaler clocked by the DCO.
//
// A 2-bit state counts DCO cycles; an output cycle lasts 3 DCO cycles when
// the latched mode is 0 and 4 when it is 1.  The mode input is sampled on
// the last DCO edge of every output cycle, so a change of mode never cuts an
// output cycle short.  pres is high for the first two DCO cycles of each
// output cycle, so its rising edge marks the start of a cycle.
// The description builds this as a latch chain with a cycle-swallowing
// transistor; here it is written as an equivalent synchronous counter.
// Polarity: 1 = divide by 4.  The prescaler text says a high mode signal
// gives divide by 3, but the divider-chain example (more divide-by-3 cycles
// as a later shift tap is selected, divide ratio falling by two from C4 to
// C6, Eq. 4-1) and the operation timing diagram (3 then 4 in every
// period after the counter reset has forced the mode low) need low = /3;
// this design follows the divider chain.
module prescaler34 (
  input  logic clk,      // DCO output
  input  logic rst_n,
  input  logic mode,     // 0: /3, 1: /4
  output logic pres
);
  logic [1:0] cnt;
  logic       mode_q;
  logic       last;

  assign last = mode_q ? (cnt == 2'd3) : (cnt == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      mode_q <= 1'b0;
      pres   <= 1'b1;
    end else begin
      if (last) begin
        cnt    <= '0;
        mode_q <= mode;
        pres   <= 1'b1;
      end else begin
        cnt    <= cnt + 2'd1;
        pres   <= (cnt == 2'd0);
      end
    end
  end

endmodule
