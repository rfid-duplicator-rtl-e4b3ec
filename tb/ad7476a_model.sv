// ad7476a_model: behavioural model of the AD7476A serial ADC (not synthesizable).
// On the falling edge of cs_n it takes `value` as the conversion result and
// drives the first leading zero; each falling SCLK edge then presents the
// next bit of the 16-bit frame (4 zeros, 12 data bits MSB first). After
// the 16th falling edge the output returns to 0. `conversions` counts
// frames, `last_value` is the result of the latest one.
module ad7476a_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] value,
  output logic        sdata,
  output int          conversions,
  output logic [11:0] last_value
);
  logic [15:0] frame;
  int          idx;
  initial begin
    sdata = 1'b0; conversions = 0; last_value = '0; idx = 0; frame = '0;
  end
  always @(negedge cs_n) begin
    frame = {4'b0000, value};
    last_value = value;
    idx   = 0;
    sdata = frame[15];
    conversions++;
  end
  always @(negedge sclk) begin
    if (!cs_n) begin
      idx++;
      sdata = (idx < 16) ? frame[15 - idx] : 1'b0;
    end
  end
endmodule
