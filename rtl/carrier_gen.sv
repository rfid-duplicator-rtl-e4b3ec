// carrier_gen: 125 kHz carrier for the 8-bit R2R DAC.
// A phase counter runs through CARRIER_DIV system clocks per period
// (800 at 100 MHz). Each half period is shaped as a parabola,
// s = t*(H-t) scaled to a peak of about 127, positive in the first half
// and negative in the second, which is within 6 % of a sine. `wave` is the
// signed sample (registered, one clock behind the phase) and
// `cycle_start` pulses together with the first sample of each period,
// which is a zero crossing so amplitude or on/off changes there are
// smooth. The 125 kHz sine follows the design description; the parabola
// shaping is this design's choice.
module carrier_gen #(
  parameter int CARRIER_DIV = 800
) (
  input  logic              clk,
  input  logic              rst,
  output logic signed [7:0] wave,
  output logic              cycle_start
);
  localparam int HALF  = CARRIER_DIV / 2;
  localparam int QTR   = HALF / 2;
  localparam int PW    = $clog2(CARRIER_DIV);
  localparam longint PEAK = longint'(QTR) * (longint'(HALF) - longint'(QTR));
  // s * MULT >> 20 reaches 127 (rounded up, then clamped) at the top of the parabola
  localparam longint MULT = (127 * (longint'(1) << 20) + PEAK - 1) / PEAK;

  logic [PW-1:0] phase;
  logic [PW-1:0] t;
  logic          neg;
  logic [47:0]   s;
  logic [7:0]    mag;

  always_comb begin
    neg = (32'(phase) >= HALF);
    t   = neg ? PW'(32'(phase) - HALF) : phase;
    s   = 48'(t) * 48'(HALF - 32'(t)) * 48'(MULT);
    mag = (s[47:20] > 28'd127) ? 8'd127 : 8'(s[27:20]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= '0;
      wave        <= '0;
      cycle_start <= 1'b0;
    end else begin
      phase       <= (32'(phase) == CARRIER_DIV - 1) ? '0 : phase + 1'b1;
      wave        <= neg ? -$signed(mag) : $signed(mag);
      cycle_start <= (phase == '0);
    end
  end
endmodule
