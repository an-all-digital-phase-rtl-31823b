`timescale 1ps/1fs
// tb_fastlock_ctrl: mode sequencing.  After reset with fl_en set the loop is
// in frequency acquisition and passes the ATDC level through; S0 clear for
// 8 comparisons in a row returns it to phase tracking with the ATDC off and
// level 0; a comparison with S0 set restarts the count; a channel change
// re-enters acquisition; with fl_en low the loop stays in phase tracking.
// A final 2000-step random sequence (mostly quiet codes, random channel
// changes and enable toggles) is compared with a reference model of these
// rules every comparison.
module tb_fastlock_ctrl;
  import adpll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, fl_en = 1'b1;
  logic [6:0] fcw = 7'd10;
  logic [2:0] s = 3'b000;
  loop_mode_e mode;
  logic atdc_en;
  logic [1:0] level;
  int checks = 0, failures = 0;

  fastlock_ctrl dut (.clk(clk), .rst_n(rst_n), .fl_en(fl_en), .fcw(fcw), .s(s),
                     .mode(mode), .atdc_en(atdc_en), .level(level));

  always #500 clk = ~clk;

  task automatic expect_state(input loop_mode_e m, input logic [1:0] lv, input string what);
    checks++;
    if (mode != m || atdc_en != (m == MODE_FA) || level != lv) begin
      failures++;
      $display("FAIL %s: mode %s en %b level %0d", what, mode.name(), atdc_en, level);
    end
  endtask

  task automatic cyc(input logic [2:0] sv);
    s = sv;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b0; #100 rst_n = 1'b1;
    cyc(3'b111); expect_state(MODE_FA, 2'd3, "level 3");
    cyc(3'b011); expect_state(MODE_FA, 2'd2, "level 2");
    cyc(3'b001); expect_state(MODE_FA, 2'd1, "level 1");
    repeat (5) cyc(3'b000);
    expect_state(MODE_FA, 2'd0, "still acquiring after 5 quiet");
    cyc(3'b001);                              // restart the count
    repeat (7) cyc(3'b000);
    expect_state(MODE_FA, 2'd0, "still acquiring after 7 quiet");
    cyc(3'b000);
    expect_state(MODE_PT, 2'd0, "tracking after 8 quiet");
    s = 3'b111; #1;
    expect_state(MODE_PT, 2'd0, "level gated in tracking");
    cyc(3'b111); expect_state(MODE_PT, 2'd0, "tracking ignores ATDC");
    fcw = 7'd12;
    cyc(3'b011); expect_state(MODE_FA, 2'd2, "channel change re-arms");
    fl_en = 1'b0;
    cyc(3'b011); expect_state(MODE_PT, 2'd0, "conventional mode");
    fcw = 7'd10;
    cyc(3'b011); expect_state(MODE_PT, 2'd0, "conventional ignores channel change");

    // Random sequence against a reference model: thermometer codes mostly
    // quiet, occasional channel changes and fast-lock enable toggles.
    begin
      loop_mode_e m_ref = MODE_PT;
      int unsigned run = 0;
      logic [6:0]  fcw_prev = fcw;
      logic [2:0]  sv;
      logic [1:0]  lv;
      for (int i = 0; i < 2000; i++) begin
        case ($urandom_range(0, 9))
          0:       sv = 3'b111;
          1:       sv = 3'b011;
          2, 3:    sv = 3'b001;
          default: sv = 3'b000;
        endcase
        if ($urandom_range(0, 39) == 0) fcw = 7'($urandom_range(0, 127));
        if ($urandom_range(0, 99) == 0) fl_en = ~fl_en;
        // next state of the model from the values seen at this edge
        if (!fl_en) begin
          m_ref = MODE_PT; run = 0;
        end else if (fcw != fcw_prev) begin
          m_ref = MODE_FA; run = 0;
        end else if (m_ref == MODE_FA) begin
          run = sv[0] ? 0 : run + 1;
          if (run == 8) begin
            m_ref = MODE_PT; run = 0;
          end
        end
        fcw_prev = fcw;
        cyc(sv);
        // level seen after the edge uses the code still applied
        lv = (m_ref == MODE_FA) ? 2'(sv[0] + sv[1] + sv[2]) : 2'd0;
        expect_state(m_ref, lv, $sformatf("random step %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
