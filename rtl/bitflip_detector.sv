// bitflip_detector: marks the BPSK phase changes in the stream of peaks.
// The tag's 62.5 kHz subcarrier makes successive carrier peaks alternate
// between high and low. At a phase change the pattern slips, and two
// adjacent peaks are both high or both low. The detector compares each
// peak with the previous one; if they differ by less than TOLERANCE the
// peak is marked as a bit flip. The comparison rule follows the design
// description. The default tolerance is half of the observed high/low
// clearance of about 50 mV, taken as 62 LSB for a 3.3 V, 12-bit ADC at
// unity gain (this scaling is this design's assumption).
// Timing: peak_out repeats peak_valid one clock later, with bit_flip valid
// in the same cycle. The first peak after reset never flags a flip.
module bitflip_detector #(
  parameter int TOLERANCE = 31
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              peak_valid,
  input  rfid_pkg::sample_t peak_mag,
  output logic              peak_out,
  output logic              bit_flip
);
  import rfid_pkg::*;
  sample_t prev;
  logic    have_prev;
  logic [SAMPLE_W-1:0] diff;

  always_comb diff = (peak_mag > prev) ? peak_mag - prev : prev - peak_mag;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= '0;
      have_prev <= 1'b0;
      peak_out  <= 1'b0;
      bit_flip  <= 1'b0;
    end else begin
      peak_out <= peak_valid;
      bit_flip <= 1'b0;
      if (peak_valid) begin
        bit_flip  <= have_prev && (32'(diff) < TOLERANCE);
        prev      <= peak_mag;
        have_prev <= 1'b1;
      end
    end
  end
endmodule
