// image_sprite: black-and-white picture of the stored IDs, one pixel per clock.
// Left part: one text row per stored slot (empty slots stay black), each
// showing 54 characters: the 22 MIT-specific bits (the last two leading
// zeros and the 20 constant bits) followed by the slot's 32 user bits. The
// row of the slot picked by the ID-select switches is drawn highlighted,
// black on white. Right part: the selected slot's 32 user bits as a
// compressed BPSK waveform, 4 rows of 8 tiles, one tile per bit.
// Every pixel comes from one of six 1-bit templates: '0' and '1' glyphs
// (8x16), their highlighted (inverted) forms, and 64x32 waveform tiles for
// a 0 and a 1 (a square wave of 8-pixel half periods whose phase is set by
// the bit). The glyphs are small constant ROMs; the waveform tiles are computed
// from the pixel position.
// Pipeline: stage 1 maps (hcount, vcount) to a template and a position in
// it; stage 2 reads the template ROM. RGB is valid two clocks after the
// pixel position, so the sync signals must be delayed by two clocks.
// Regions, templates and the highlight follow the design description; the
// screen layout and glyph shapes are this design's choice.
module image_sprite (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [10:0]          hcount,
  input  logic [9:0]           vcount,
  input  rfid_pkg::user_code_t user_codes [rfid_pkg::NUM_SLOTS],
  input  logic [rfid_pkg::NUM_SLOTS-1:0] slot_valid,
  input  logic [2:0]           id_select,
  output logic [7:0]           red,
  output logic [7:0]           green,
  output logic [7:0]           blue
);
  import rfid_pkg::*;
  localparam int NCHAR = 22 + USER_BITS;
  localparam int TX0 = 32, TY0 = 32, ROW_PITCH = 24;
  localparam int WX0 = 704, WY0 = 32, WPITCH = 48, WTILE_W = 64, WTILE_H = 32;
  localparam logic [21:0] SIG22 = {2'b00, MIT_SIG};

  // glyph bitmaps, 16 rows of 8 pixels, top row in the most significant byte
  localparam logic [127:0] GLYPH0 = 128'h0000_3C66_666E_7666_6666_663C_0000_0000;
  localparam logic [127:0] GLYPH1 = 128'h0000_1838_7818_1818_1818_187E_0000_0000;

  // waveform tile: square wave, high level on row 4, low level on row 27,
  // an edge every 8 pixels; a 1 starts high, a 0 starts low
  function automatic logic wave_pix(logic b, logic [5:0] x, logic [4:0] y);
    logic lvl;
    lvl = x[3] ? !b : b;
    return (y == 5'd4 && lvl) || (y == 5'd27 && !lvl) ||
           (x[2:0] == 3'd0 && x != 6'd0 && y >= 5'd4 && y <= 5'd27);
  endfunction

  typedef enum logic [1:0] {T_NONE, T_TEXT, T_WAVE} tkind_t;
  tkind_t     kind1, kind_c;
  logic       bit1, bit_c, hl1, hl_c;
  logic [5:0] px1, px_c;
  logic [4:0] py1, py_c;
  logic       pix;

  // stage 1: which template, which bit, where inside the template
  always_comb begin
    int x, y, r, c;
    kind_c = T_NONE; bit_c = 1'b0; hl_c = 1'b0; px_c = '0; py_c = '0;
    x = int'(hcount); y = int'(vcount); r = 0; c = 0;
    if (x >= TX0 && x < TX0 + 8*NCHAR && y >= TY0 && y < TY0 + NUM_SLOTS*ROW_PITCH) begin
      r = (y - TY0) / ROW_PITCH;
      c = (x - TX0) / 8;
      if ((y - TY0) % ROW_PITCH < 16 && slot_valid[r]) begin
        kind_c = T_TEXT;
        bit_c  = (c < 22) ? SIG22[21 - c] : user_codes[r][USER_BITS - 1 - (c - 22)];
        hl_c   = (3'(r) == id_select);
        px_c   = 6'((x - TX0) % 8);
        py_c   = 5'((y - TY0) % ROW_PITCH);
      end
    end else if (x >= WX0 && x < WX0 + 8*WTILE_W && y >= WY0 && y < WY0 + 4*WPITCH) begin
      r = (y - WY0) / WPITCH;
      c = (x - WX0) / WTILE_W;
      if ((y - WY0) % WPITCH < WTILE_H && slot_valid[id_select]) begin
        kind_c = T_WAVE;
        bit_c  = user_codes[id_select][USER_BITS - 1 - (8*r + c)];
        px_c   = 6'((x - WX0) % WTILE_W);
        py_c   = 5'((y - WY0) % WPITCH);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      kind1 <= T_NONE; bit1 <= 1'b0; hl1 <= 1'b0; px1 <= '0; py1 <= '0;
      pix <= 1'b0;
    end else begin
      kind1 <= kind_c; bit1 <= bit_c; hl1 <= hl_c; px1 <= px_c; py1 <= py_c;
      // stage 2: template ROM read
      unique case (kind1)
        T_TEXT:  pix <= (bit1 ? GLYPH1[7'd127 - {py1[3:0], px1[2:0]}]
                                : GLYPH0[7'd127 - {py1[3:0], px1[2:0]}]) ^ hl1;
        T_WAVE:  pix <= wave_pix(bit1, px1, py1);
        default: pix <= 1'b0;
      endcase
    end
  end

  assign red   = {8{pix}};
  assign green = {8{pix}};
  assign blue  = {8{pix}};
endmodule
