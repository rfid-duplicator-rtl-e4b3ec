// adc_reader: serial interface to an AD7476A 12-bit ADC.
// Every SAMPLE_PERIOD system clocks the reader lowers CS, runs 16 SCLK
// periods of SCLK_DIV clocks each (20 MHz from 100 MHz) and shifts in the
// 16-bit frame: four leading zeros, then the 12-bit result MSB first.
// The ADC presents a new bit after each SCLK falling edge, so SDATA is
// taken on the last clock before each falling edge. When CS returns high the
// 12-bit result appears on `sample` with a one-cycle `sample_valid` strobe
// (one sample per microsecond by default, 8 per 125 kHz carrier period).
// The 20 MHz serial clock follows the design description; the sample
// period and the frame timing are this design's choice within the ADC's
// limits (quiet time between frames >= 50 ns).
module adc_reader #(
  parameter int SCLK_DIV      = 5,
  parameter int SAMPLE_PERIOD = 100
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          adc_sdata,
  output logic          adc_cs_n,
  output logic          adc_sclk,
  output rfid_pkg::sample_t sample,
  output logic          sample_valid
);
  localparam int FRAME_BITS = 16;
  localparam int CS_LEN     = SCLK_DIV * (FRAME_BITS + 1);   // one lead-in period
  localparam int TW         = $clog2(SAMPLE_PERIOD);

  logic [TW-1:0]  t;
  logic [15:0]    shreg;
  logic           in_frame;
  int unsigned    phase;   // position within the current SCLK period
  int unsigned    sper;    // SCLK period index (0 = lead-in)

  initial begin
    assert (SAMPLE_PERIOD > CS_LEN + 1) else $error("SAMPLE_PERIOD too short");
  end

  always_comb begin
    in_frame = (32'(t) < CS_LEN);
    sper     = 32'(t) / SCLK_DIV;
    phase    = 32'(t) % SCLK_DIV;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t            <= '0;
      shreg        <= '0;
      adc_cs_n     <= 1'b1;
      adc_sclk     <= 1'b1;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      t <= (32'(t) == SAMPLE_PERIOD - 1) ? '0 : t + 1'b1;
      adc_cs_n <= !in_frame;
      // SCLK low for the first two clocks of each of the 16 periods after the lead-in
      adc_sclk <= !(in_frame && sper >= 1 && phase < 2);
      // capture just before each falling edge: last clock of periods 0..15
      if (in_frame && sper < FRAME_BITS && phase == SCLK_DIV - 1)
        shreg <= {shreg[14:0], adc_sdata};
      if (32'(t) == CS_LEN) begin
        sample       <= shreg[11:0];
        sample_valid <= 1'b1;
      end
    end
  end
endmodule
