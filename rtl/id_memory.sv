// id_memory: storage for up to eight captured IDs.
// A write stores the 224-bit ID in slot `waddr` (the three ID-select
// switches) and marks the slot valid. Reads are combinational: `rdata` is
// the slot chosen by `raddr`, and `user_codes` gives the 32 user bits of
// every slot at once for the display. All slots start empty at reset.
// Eight slots of 224 bits and switch addressing follow the design
// description; holding them in registers rather than block RAM lets all
// eight user codes be read in parallel.
module id_memory #(
  parameter int NUM_SLOTS = rfid_pkg::NUM_SLOTS,
  parameter int ID_BITS   = rfid_pkg::ID_BITS
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         we,
  input  logic [$clog2(NUM_SLOTS)-1:0] waddr,
  input  logic [ID_BITS-1:0]           wdata,
  input  logic [$clog2(NUM_SLOTS)-1:0] raddr,
  output logic [ID_BITS-1:0]           rdata,
  output rfid_pkg::user_code_t         user_codes [NUM_SLOTS],
  output logic [NUM_SLOTS-1:0]         slot_valid
);
  import rfid_pkg::*;
  logic [ID_BITS-1:0] mem [NUM_SLOTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_SLOTS; i++) mem[i] <= '0;
      slot_valid <= '0;
    end else if (we) begin
      mem[waddr]        <= wdata;
      slot_valid[waddr] <= 1'b1;
    end
  end

  always_comb begin
    rdata = mem[raddr];
    for (int i = 0; i < NUM_SLOTS; i++)
      user_codes[i] = mem[i][ID_BITS-1-USER_POS -: USER_BITS];
  end
endmodule
