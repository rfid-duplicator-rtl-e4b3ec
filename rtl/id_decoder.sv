// id_decoder: rebuilds the 224-bit MIT ID from the peak and bit-flip strobes.
// HUNT: count peaks since the last flip. A flip after at least
//   LEAD_ZEROS bit times without one (minus half a bit) marks the end of
//   the leading zeros; that flip starts bit LEAD_ZEROS, which is a one.
// COLLECT: the current bit level toggles at each flip. A bit ends when a
//   flip arrives after at least PEAKS_PER_BIT-8 peaks, or after
//   PEAKS_PER_BIT peaks without one; a flip earlier than that is noise and
//   the capture is abandoned. Bits shift in MSB first (first bit at [223]).
//   When SIG_BITS bits follow the zeros they must equal EXPECTED_SIG,
//   otherwise the frame is rejected.
// HOLD: all ID_BITS bits are in; id_valid stays high (green LED) until
//   `store` or `discard`, then the decoder hunts again.
// The framing (30 zeros, 20 constant bits, 32 peaks per bit, 224 bits) and
// the compare-then-store flow follow the design description; the
// resynchronisation window and the abort rule are this design's choice.
// start_pulse and reject_pulse are one-cycle event strobes.
module id_decoder #(
  parameter int PEAKS_PER_BIT = rfid_pkg::PEAKS_PER_BIT,
  parameter int LEAD_ZEROS    = rfid_pkg::LEAD_ZEROS,
  parameter int SIG_BITS      = rfid_pkg::SIG_BITS,
  parameter int ID_BITS       = rfid_pkg::ID_BITS,
  parameter logic [SIG_BITS-1:0] EXPECTED_SIG = rfid_pkg::MIT_SIG
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               peak_valid,
  input  logic               bit_flip,
  input  logic               store,
  input  logic               discard,
  output logic               id_valid,
  output logic [ID_BITS-1:0] id_data,
  output logic               start_pulse,
  output logic               reject_pulse
);
  typedef enum logic [1:0] {HUNT, COLLECT, HOLD} state_t;
  localparam int HUNT_MIN = LEAD_ZEROS * PEAKS_PER_BIT - PEAKS_PER_BIT / 2;
  localparam int MIN_FLIP = PEAKS_PER_BIT - 8;
  localparam int HW = $clog2(HUNT_MIN + 2);

  state_t             state;
  logic [HW-1:0]      hunt_cnt;
  logic [7:0]         peak_cnt;
  logic [8:0]         nbits;
  logic               level;
  logic [ID_BITS-1:0] shreg;
  logic               bit_end;

  always_comb
    bit_end = (bit_flip && 32'(peak_cnt) >= MIN_FLIP) || (32'(peak_cnt) >= PEAKS_PER_BIT);

  assign id_valid = (state == HOLD);
  assign id_data  = shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= HUNT;
      hunt_cnt     <= '0;
      peak_cnt     <= '0;
      nbits        <= '0;
      level        <= 1'b0;
      shreg        <= '0;
      start_pulse  <= 1'b0;
      reject_pulse <= 1'b0;
    end else begin
      start_pulse  <= 1'b0;
      reject_pulse <= 1'b0;
      unique case (state)
        HUNT: if (peak_valid) begin
          if (bit_flip) begin
            hunt_cnt <= '0;
            if (32'(hunt_cnt) >= HUNT_MIN) begin
              state       <= COLLECT;
              start_pulse <= 1'b1;
              shreg       <= '0;              // the leading zeros
              nbits       <= 9'(LEAD_ZEROS);
              level       <= 1'b1;
              peak_cnt    <= 8'd1;
            end
          end else if (32'(hunt_cnt) < HUNT_MIN) begin
            hunt_cnt <= hunt_cnt + 1'b1;
          end
        end
        COLLECT: if (peak_valid) begin
          if (bit_end) begin
            shreg    <= {shreg[ID_BITS-2:0], level};
            nbits    <= nbits + 1'b1;
            level    <= level ^ bit_flip;
            peak_cnt <= 8'd1;
            if (32'(nbits) + 1 == ID_BITS) begin
              state <= HOLD;
            end else if (32'(nbits) + 1 == LEAD_ZEROS + SIG_BITS &&
                         {shreg[SIG_BITS-2:0], level} != EXPECTED_SIG) begin
              state        <= HUNT;
              reject_pulse <= 1'b1;
              hunt_cnt     <= '0;
            end
          end else if (bit_flip) begin
            state        <= HUNT;             // flip inside a bit: lost lock
            reject_pulse <= 1'b1;
            hunt_cnt     <= '0;
          end else begin
            peak_cnt <= peak_cnt + 1'b1;
          end
        end
        HOLD: if (store || discard) begin
          state    <= HUNT;
          hunt_cnt <= '0;
        end
        default: state <= HUNT;
      endcase
    end
  end
endmodule
