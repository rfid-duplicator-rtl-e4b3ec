// rfid_pkg: constants shared by the 125 kHz RFID reader/duplicator.
// The MIT ID frame is 224 bits long: 30 leading zeros, 20 constant bits
// and 32 user bits, followed by the rest of the frame. Each bit lasts
// 32 carrier periods (one received peak per period). Downlink timings
// for the T5577 tag are counted in carrier periods (Tc = 8 us).
// MIT_SIG is an example value for the 20 constant bits; set it to the
// constant bits of the cards to be read.
package rfid_pkg;
  localparam int ID_BITS       = 224;
  localparam int LEAD_ZEROS    = 30;
  localparam int SIG_BITS      = 20;
  localparam int USER_BITS     = 32;
  localparam int PEAKS_PER_BIT = 32;
  localparam int NUM_SLOTS     = 8;
  localparam int SAMPLE_W      = 12;
  // bit position (counting from the MSB, the first received bit) of the first user bit
  localparam int USER_POS      = LEAD_ZEROS + SIG_BITS;
  localparam logic [SIG_BITS-1:0] MIT_SIG = 20'hB271A;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [ID_BITS-1:0]  id_t;
  typedef logic [USER_BITS-1:0] user_code_t;

  // T5577 downlink, in carrier periods
  localparam int T_START_GAP  = 30;   // 8..50 allowed
  localparam int T_WRITE_GAP  = 12;   // 8..20 allowed
  localparam int T_ZERO_ON    = 24;
  localparam int T_ONE_ON     = 56;
  localparam int T_PROG       = 700;  // 5.6 ms programming time
  localparam int PKT_BITS     = 38;   // opcode(2) + lock(1) + data(32) + address(3)
  localparam logic [1:0] OP_WRITE_P0 = 2'b10;
  localparam logic [1:0] OP_RESET    = 2'b00;
  localparam logic [31:0] T5577_CONFIG = 32'h0008_10E0;

  // the 32 user bits of an ID
  function automatic user_code_t user_code(id_t id);
    return id[ID_BITS-1-USER_POS -: USER_BITS];
  endfunction
endpackage
