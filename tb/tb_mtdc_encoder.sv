`timescale 1ps/1fs
// tb_mtdc_encoder: exhaustive check of the uneven-step MTDC encoder.
// For every thermometer length k = 0..20 the expected code is
//   k <= 9 : k,     k > 9 : 9 + 2*(k-9)
// (single steps in the fine segment, double steps in the coarse one).  The
// same codes must come out when a lone '1' (sparkle) sits two cells above
// the transition, which the 3-input bubble removal must ignore.
module tb_mtdc_encoder;
  logic [19:0] therm;
  logic [4:0]  code;
  int checks = 0, failures = 0;

  mtdc_encoder dut (.therm(therm), .code(code));

  function automatic int expect_code(input int k);
    return (k <= 9) ? k : 9 + 2 * (k - 9);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 20; k++) begin
      therm = (k == 0) ? '0 : 20'((64'(1) << k) - 1);
      #10;
      checks++;
      if (code != 5'(expect_code(k))) begin
        failures++;
        $display("FAIL clean k=%0d code=%0d expected %0d", k, code, expect_code(k));
      end
      if (k + 2 <= 19) begin
        therm[k+2] = 1'b1;
        #10;
        checks++;
        if (code != 5'(expect_code(k))) begin
          failures++;
          $display("FAIL sparkle k=%0d code=%0d expected %0d", k, code, expect_code(k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
