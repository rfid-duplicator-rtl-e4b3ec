// spoofer: replays a stored ID as the waveform a card would produce.
// A passive card answers with a 62.5 kHz BPSK subcarrier, which a reader
// sees as carrier periods alternating between high and low amplitude.
// The spoofer reproduces this directly: each carrier period it switches
// between the full carrier and the carrier at 3/4 amplitude. Every
// PEAKS_PER_BIT periods a new ID bit starts; if it differs from the
// previous bit the amplitude of the last period is repeated once, which
// is the phase flip the reader decodes. The 224 bits repeat endlessly, the
// first bit following the last. While `enable` is low the frame restarts.
// Alternate-and-repeat follows the design description; the 3/4 low level
// is this design's choice. Output: `dac` = 128 + scaled carrier, one clock
// after `wave`; `frame_start` pulses at the first period of each frame.
module spoofer #(
  parameter int PEAKS_PER_BIT = rfid_pkg::PEAKS_PER_BIT,
  parameter int ID_BITS       = rfid_pkg::ID_BITS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic signed [7:0]  wave,
  input  logic               cycle_start,
  input  logic [ID_BITS-1:0] id_data,
  output logic [7:0]         dac,
  output logic               frame_start
);
  localparam int BW = $clog2(ID_BITS);
  logic [7:0]    per_cnt;
  logic [BW-1:0] bit_idx;
  logic          amp_hi, amp_next, amp_now;
  logic [BW-1:0] bit_next;
  logic          last_period;
  logic signed [9:0] scaled;

  always_comb begin
    last_period = (32'(per_cnt) == PEAKS_PER_BIT - 1);
    bit_next    = (32'(bit_idx) == ID_BITS - 1) ? '0 : bit_idx + 1'b1;
    // a bit change repeats the current amplitude; otherwise alternate
    if (last_period && id_data[ID_BITS-1-32'(bit_next)] != id_data[ID_BITS-1-32'(bit_idx)])
      amp_next = amp_hi;
    else
      amp_next = !amp_hi;
    amp_now = cycle_start ? amp_next : amp_hi;
    scaled  = amp_now ? 10'(wave) : 10'((10'(wave) * 3) >>> 2);
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      per_cnt     <= 8'(PEAKS_PER_BIT - 1);
      bit_idx     <= BW'(ID_BITS - 1);
      amp_hi      <= 1'b0;
      dac         <= 8'd128;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      dac <= 8'(10'sd128 + scaled);
      if (cycle_start) begin
        amp_hi <= amp_next;
        if (last_period) begin
          per_cnt <= '0;
          bit_idx <= bit_next;
          frame_start <= (bit_next == '0);
        end else begin
          per_cnt <= per_cnt + 1'b1;
        end
      end
    end
  end
endmodule
