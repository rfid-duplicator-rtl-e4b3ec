// t5577_config: sets up a T5577 tag to answer like an MIT card.
// It writes CONFIG_WORD into page 0 block 0 (opcode 10, lock bit 0, the
// 32-bit word, address 000), keeps the carrier on for the PROG_CYCLES
// programming time, and then sends the reset command (start gap plus
// opcode 00) so that the tag returns to read mode with the new setting.
// The default word 0x000810E0 selects a data rate of RF/32, BPSK
// modulation and a read-out of blocks 1..7 (MAXBLK = 7). The word and the
// write-delay-reset sequence follow the design description; the 64-period
// carrier hold after the reset is this design's choice.
// `start` when idle begins the sequence; `busy` covers it and `done` pulses
// at the end. `carrier_en` gates the DAC carrier.
module t5577_config #(
  parameter logic [31:0] CONFIG_WORD = rfid_pkg::T5577_CONFIG,
  parameter int          PROG_CYCLES = rfid_pkg::T_PROG
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic start,
  output logic carrier_en,
  output logic busy,
  output logic done
);
  import rfid_pkg::*;
  typedef enum logic [2:0] {IDLE, WR_SEND, WR_WAIT, RST_SEND, RST_WAIT} state_t;
  state_t state;
  logic   tx_start, tx_busy, tx_done, is_reset;
  logic [PKT_BITS-1:0] pkt;
  logic [5:0]          nbits;
  logic [15:0]         hold;

  always_comb begin
    is_reset = (state == RST_SEND) || (state == RST_WAIT);
    pkt   = is_reset ? {OP_RESET, {(PKT_BITS-2){1'b0}}}
                     : {OP_WRITE_P0, 1'b0, CONFIG_WORD, 3'd0};
    nbits = is_reset ? 6'd2 : 6'(PKT_BITS);
    hold  = is_reset ? 16'd64 : 16'(PROG_CYCLES);
  end

  downlink_tx u_tx (
    .clk, .rst, .tick,
    .start(tx_start), .nbits, .bits(pkt), .hold_cycles(hold),
    .carrier_en, .busy(tx_busy), .done(tx_done)
  );

  assign busy     = (state != IDLE);
  assign tx_start = (state == WR_SEND || state == RST_SEND) && !tx_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE:     if (start) state <= WR_SEND;
        WR_SEND:  if (tx_start) state <= WR_WAIT;
        WR_WAIT:  if (tx_done) state <= RST_SEND;
        RST_SEND: if (tx_start) state <= RST_WAIT;
        RST_WAIT: if (tx_done) begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
