// t5577_writer: writes a 224-bit ID into a T5577 tag, 32 bits at a time.
// The ID is cut into 7 blocks, the first received bits going to block 1.
// Block k (k = 1..7) is sent as one standard-write packet: opcode 10
// (page 0), lock bit 0, the 32 data bits MSB first and the 3-bit block
// address. After each packet the carrier stays on for PROG_CYCLES periods
// (5.6 ms at 125 kHz) while the tag programs, then the next block follows.
// `start` (when idle) latches the ID; `busy` stays high through all seven
// writes and `done` pulses at the end. `carrier_en` gates the DAC carrier.
// The 7-block split, packet layout and programming delay follow the
// design description; block numbering 1..7 follows the tag's memory map
// (block 0 holds its configuration).
module t5577_writer #(
  parameter int PROG_CYCLES = rfid_pkg::T_PROG
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            tick,
  input  logic            start,
  input  rfid_pkg::id_t   id_data,
  output logic            carrier_en,
  output logic            busy,
  output logic            done,
  output logic [2:0]      block
);
  import rfid_pkg::*;
  localparam int NBLK = ID_BITS / 32;

  typedef enum logic [1:0] {IDLE, SEND, WAIT} state_t;
  state_t state;
  id_t    id_q;
  logic   tx_start, tx_busy, tx_done;
  logic [PKT_BITS-1:0] pkt;

  always_comb pkt = {OP_WRITE_P0, 1'b0, id_q[ID_BITS-1 - 32*(32'(block)-1) -: 32], block};

  downlink_tx u_tx (
    .clk, .rst, .tick,
    .start(tx_start), .nbits(6'(PKT_BITS)), .bits(pkt),
    .hold_cycles(16'(PROG_CYCLES)),
    .carrier_en, .busy(tx_busy), .done(tx_done)
  );

  assign busy     = (state != IDLE);
  assign tx_start = (state == SEND) && !tx_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      id_q  <= '0;
      block <= 3'd1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          id_q  <= id_data;
          block <= 3'd1;
          state <= SEND;
        end
        SEND: if (tx_start) state <= WAIT;
        WAIT: if (tx_done) begin
          if (32'(block) == NBLK) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            block <= block + 3'd1;
            state <= SEND;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
