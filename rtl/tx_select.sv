// tx_select: chooses what the 8-bit DAC (and the transmit antenna) sends.
//   spoof      : the spoofer's replayed card waveform (switch 2 high)
//   downlink   : the carrier, cut to mid-scale (128) wherever the active
//                tag writer or configurator holds carrier_en low
//   otherwise  : the plain carrier, which powers a card being read
// Writing takes precedence over spoofing so a write, once started, is not
// corrupted. The output is registered (one clock of latency).
// The three sources follow the design description; the priority order is
// this design's choice.
module tx_select (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [7:0] wave,
  input  logic [7:0]        spoof_dac,
  input  logic              spoof_sel,
  input  logic              downlink_active,
  input  logic              carrier_en,
  output logic [7:0]        dac
);
  logic [7:0] carrier_code;
  always_comb carrier_code = 8'(9'sd128 + 9'(wave));

  always_ff @(posedge clk) begin
    if (rst)                  dac <= 8'd128;
    else if (downlink_active) dac <= carrier_en ? carrier_code : 8'd128;
    else if (spoof_sel)       dac <= spoof_dac;
    else                      dac <= carrier_code;
  end
endmodule
