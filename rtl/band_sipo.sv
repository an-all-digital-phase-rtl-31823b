`timescale 1ps/1fs
// band_sipo: serial-in parallel-out register that sets the 4-bit coarse
// band of the DCO capacitor bank from outside the chip.
//
// Bits are shifted in MSB first on the rising edge of sclk while load is
// low; a rising sclk edge with load high copies the shift register to the
// band output, so the band never passes through intermediate values.
// The SIPO and the 4-bit width follow the description; the load strobe and
// bit order are this design's own choice.  Reset sets band to RESET_BAND.
module band_sipo #(
  parameter logic [3:0] RESET_BAND = 4'd5
) (
  input  logic       sclk,
  input  logic       rst_n,
  input  logic       sdi,
  input  logic       load,
  output logic [3:0] band
);
  logic [3:0] sr;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      band <= RESET_BAND;
    end else if (load) begin
      band <= sr;
    end else begin
      sr   <= {sr[2:0], sdi};
    end
  end

endmodule
