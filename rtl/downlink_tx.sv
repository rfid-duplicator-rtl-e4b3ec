// downlink_tx: sends one T5577 downlink packet by switching the carrier.
// The tag is written by interrupting its field. Timing is counted in
// carrier periods (one `tick` per period): a start gap of START_GAP periods
// with the carrier off puts the tag in write mode; each bit is then the
// carrier-on time before the next gap, ZERO_ON periods for a 0 and ONE_ON
// for a 1, each followed by a WRITE_GAP gap; after the last gap the
// carrier stays on for `hold_cycles` periods (the tag's programming time).
// `bits` holds the packet MSB first in its top `nbits` positions.
// `start` is taken when idle; `busy` is high until the hold ends and `done`
// pulses then. carrier_en changes only on a tick, so the carrier is cut and
// restored at period boundaries. The 24/56 on-times and the 8-50 / 8-20
// gap ranges follow the design description; the gap values inside those
// ranges are this design's choice.
module downlink_tx #(
  parameter int START_GAP = rfid_pkg::T_START_GAP,
  parameter int WRITE_GAP = rfid_pkg::T_WRITE_GAP,
  parameter int ZERO_ON   = rfid_pkg::T_ZERO_ON,
  parameter int ONE_ON    = rfid_pkg::T_ONE_ON,
  parameter int MAX_BITS  = rfid_pkg::PKT_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,
  input  logic                start,
  input  logic [5:0]          nbits,
  input  logic [MAX_BITS-1:0] bits,
  input  logic [15:0]         hold_cycles,
  output logic                carrier_en,
  output logic                busy,
  output logic                done
);
  typedef enum logic [2:0] {IDLE, ARM, SGAP, ON, WGAP, HOLD} state_t;
  state_t              state;
  logic [15:0]         cnt;      // periods left in the current phase
  logic [MAX_BITS-1:0] sh;
  logic [5:0]          left;
  logic [15:0]         hold;

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      cnt        <= '0;
      sh         <= '0;
      left       <= '0;
      hold       <= '0;
      carrier_en <= 1'b1;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          carrier_en <= 1'b1;
          if (start) begin
            sh    <= bits;
            left  <= nbits;
            hold  <= hold_cycles;
            state <= ARM;
          end
        end
        ARM: if (tick) begin                 // align to a period boundary
          carrier_en <= 1'b0;
          cnt        <= 16'(START_GAP - 1);
          state      <= SGAP;
        end
        SGAP, WGAP: if (tick) begin
          if (cnt == 0) begin
            carrier_en <= 1'b1;
            if (left == 0) begin
              cnt   <= (hold == 0) ? 16'd0 : hold - 16'd1;
              state <= HOLD;
            end else begin
              cnt   <= sh[MAX_BITS-1] ? 16'(ONE_ON - 1) : 16'(ZERO_ON - 1);
              sh    <= sh << 1;
              left  <= left - 6'd1;
              state <= ON;
            end
          end else cnt <= cnt - 16'd1;
        end
        ON: if (tick) begin
          if (cnt == 0) begin
            carrier_en <= 1'b0;
            cnt        <= 16'(WRITE_GAP - 1);
            state      <= WGAP;
          end else cnt <= cnt - 16'd1;
        end
        HOLD: if (tick) begin
          if (cnt == 0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else cnt <= cnt - 16'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a new packet must not be requested while one is in flight
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
