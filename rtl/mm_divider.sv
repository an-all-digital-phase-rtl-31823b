`timescale 1ps/1fs
// mm_divider: programmable divider chain with dynamic divide-ratio
// adjustment for phase-error compensation (everything after the /3/4
// prescaler).
//
// Clocked by the prescaler output PRES.  A 7-bit counter runs through 128
// PRES cycles per feedback period; its wrap is the RESET event that clears
// the mode-control chain and starts a new period of f_fb.  The digital code
// comparator raises MD1 once the count reaches the channel word fcw.  MD1
// feeds a 7-stage shift register whose outputs C1..C7 are MD1 delayed by
// 1..7 PRES cycles.  The control logic (a decoder of the ATDC level and
// Sign, and a MUX) selects one tap as MD2, the prescaler mode (0 = /3,
// 1 = /4).  MD2 is low for the first fcw + i cycles of a period when tap Ci
// is selected, so
//     N = 3 (fcw + i) + 4 (128 - fcw - i) = 512 - fcw - i      (Eq. 4-1 form)
// In phase tracking the tap is C4.  During frequency acquisition a feedback
// edge that lags (sign = 0) selects C(4+m), shortening the period by m DCO
// cycles; one that leads selects C(4-m), lengthening it by m cycles.
//
// Counter, comparator, 7-tap shift register, MUX+decoder control logic and
// the C4 locked tap follow the description.  The tap choice is latched when
// the count equals fcw, before any tap can rise, so it cannot glitch MD2
// (own choice); the description does not say when it is taken.
// f_fb is high during the first half of the count; its rising edge is the
// counter wrap.  fcw must not exceed 127 - 7; an assertion checks this
// outside reset (lint then sees rst_n used both as asynchronous reset and
// as the assertion's synchronous disable, which is intended).
module mm_divider
  import adpll_pkg::*;
(
  input  logic                 pres,
  input  logic                 rst_n,
  input  logic [DIV_CNT_W-1:0] fcw,
  input  logic [1:0]           level,    // ATDC level m (0 when fast lock is off)
  input  logic                 sign,     // 1: feedback leads the reference
  output logic                 md2,      // prescaler mode, 0 = /3, 1 = /4
  output logic                 f_fb,
  output logic [2:0]           tap       // selected tap index 1..7 (for observation)
);
  logic [DIV_CNT_W-1:0] cnt;
  logic                 wrap, md1;
  logic [DIV_TAPS:1]    csr;             // C1..C7
  logic [2:0]           tap_nxt;

  assign wrap = (cnt == '1);
  assign md1  = (cnt >= fcw);            // digital code comparator

  // Control logic decoder: tap index from level and sign.
  always_comb begin
    if (sign) tap_nxt = 3'(LOCK_TAP) - 3'(level);
    else      tap_nxt = 3'(LOCK_TAP) + 3'(level);
  end

  always_ff @(posedge pres or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      csr  <= '0;
      tap  <= 3'(LOCK_TAP);
      f_fb <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      f_fb <= ~(cnt + 1'b1 >= DIV_CNT_W'(1 << (DIV_CNT_W - 1)));
      if (wrap) csr <= '0;               // RESET clears the chain
      else      csr <= {csr[DIV_TAPS-1:1], md1};
      if (cnt == fcw) tap <= tap_nxt;
    end
  end

  // The counter must leave room for the latest tap before it wraps.
  fcw_room_a: assert property (@(posedge pres) disable iff (!rst_n)
                               int'(fcw) + int'(DIV_TAPS) <= (1 << DIV_CNT_W) - 1)
    else $error("mm_divider: fcw %0d leaves no room for tap C%0d", fcw, DIV_TAPS);

  // Control logic MUX.
  always_comb begin
    md2 = 1'b0;
    for (int i = 1; i <= DIV_TAPS; i++)
      if (tap == 3'(i)) md2 = csr[i];
  end

endmodule
