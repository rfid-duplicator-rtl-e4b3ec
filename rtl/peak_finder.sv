// peak_finder: finds the peaks of the received carrier in the ADC stream.
// It keeps the last four samples, v0 (newest) .. v3 (oldest), and judges
// v1. v1 is a peak when it is greater than both neighbours (v2 before,
// v0 after), or when it equals v2 (a flat top of two samples) and is
// greater than v3 and than v0. The window rule follows the design
// description; requiring the flat top to be followed by a lower sample is
// this design's reading, so that a rising plateau does not count.
// Timing: peak_valid pulses one clock after the sample_valid that brought
// in v0, with peak_mag = v1.
module peak_finder (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_valid,
  input  rfid_pkg::sample_t sample,
  output logic              peak_valid,
  output rfid_pkg::sample_t peak_mag
);
  import rfid_pkg::*;
  sample_t v1, v2, v3;
  logic [1:0] fill;   // window must hold four samples before judging

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= '0; v2 <= '0; v3 <= '0;
      fill       <= '0;
      peak_valid <= 1'b0;
      peak_mag   <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (sample_valid) begin
        if (fill == 2'd3 &&
            (((v1 > v2) && (v1 > sample)) ||
             ((v1 == v2) && (v1 > v3) && (v1 > sample)))) begin
          peak_valid <= 1'b1;
          peak_mag   <= v1;
        end
        v3 <= v2;
        v2 <= v1;
        v1 <= sample;
        if (fill != 2'd3) fill <= fill + 2'd1;
      end
    end
  end
endmodule
