// tb_image_sprite: scans a whole 1280x720 frame with random user codes,
// slots 0..6 filled (slot 7 empty) and slot 5 selected, and compares every
// RGB value, two clocks after its position, with a pixel model written
// from the layout: text rows at (32 + 8c, 32 + 24r) of 8x16 glyphs, 22
// constant bits then 32 user bits, the selected row inverted; waveform
// tiles 64x32 at (704 + 64c, 32 + 48r), square wave with rails on rows 4
// and 27 and edges every 8 pixels, starting high for a 1.
module tb_image_sprite;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [10:0] h; logic [9:0] v;
  user_code_t codes [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] valid;
  logic [2:0] sel;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0, n_text = 0, n_hl = 0, n_wave = 0;

  image_sprite dut (.clk, .rst, .hcount(h), .vcount(v), .user_codes(codes),
                    .slot_valid(valid), .id_select(sel), .red(r), .green(g), .blue(b));

  // glyph rows, '0' and '1'
  byte unsigned font0 [16] = '{0,0,8'h3C,8'h66,8'h66,8'h6E,8'h76,8'h66,8'h66,8'h66,8'h66,8'h3C,0,0,0,0};
  byte unsigned font1 [16] = '{0,0,8'h18,8'h38,8'h78,8'h18,8'h18,8'h18,8'h18,8'h18,8'h18,8'h7E,0,0,0,0};

  function automatic logic model(int x, int y, output int kind);
    logic [53:0] row;
    kind = 0;
    if (x >= 32 && x < 32 + 54 * 8 && y >= 32 && y < 32 + 8 * 24 && (y - 32) % 24 < 16) begin
      int rr, cc, gx, gy; logic bv; byte unsigned line;
      rr = (y - 32) / 24; cc = (x - 32) / 8; gx = (x - 32) % 8; gy = (y - 32) % 24;
      if (!valid[rr]) return 1'b0;
      row = {2'b00, MIT_SIG, codes[rr]};
      bv = row[53 - cc];
      line = bv ? font1[gy] : font0[gy];
      kind = (rr == int'(sel)) ? 2 : 1;
      return line[7 - gx] ^ (rr == int'(sel));
    end
    if (x >= 704 && x < 704 + 512 && y >= 32 && y < 32 + 4 * 48 && (y - 32) % 48 < 32) begin
      int tr, tc, tx, ty; logic bv, lvl;
      tr = (y - 32) / 48; tc = (x - 704) / 64; tx = (x - 704) % 64; ty = (y - 32) % 48;
      if (!valid[sel]) return 1'b0;
      bv = codes[sel][31 - (8 * tr + tc)];
      lvl = ((tx / 8) % 2 == 0) ? bv : !bv;
      kind = 3;
      return (ty == 4 && lvl) || (ty == 27 && !lvl) || (tx % 8 == 0 && tx > 0 && ty >= 4 && ty <= 27);
    end
    return 1'b0;
  endfunction

  initial begin
    for (int i = 0; i < NUM_SLOTS; i++) codes[i] = $urandom;
    valid = 8'h7F; sel = 3'd5;
    h = 0; v = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int y = 0; y < 720; y++)
      for (int x = 0; x < 1280 + 1; x++) begin
        h = 11'(x); v = 10'(y);
        @(posedge clk);
        #1;
        // h = x was taken at this edge; the output now is that of x - 1,
        // presented one edge earlier: two register stages from h to RGB
        if (x >= 1) begin
          int kind; logic e;
          e = model(x - 1, y, kind);
          checks++;
          if (r !== {8{e}} || g !== r || b !== r) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) rgb %h expected %b", x - 1, y, r, e);
          end
          if (e && kind == 1) n_text++;
          if (e && kind == 2) n_hl++;
          if (e && kind == 3) n_wave++;
        end
      end
    checks++;
    if (n_text == 0 || n_hl == 0 || n_wave == 0) begin failures++; $display("region not drawn"); end
    $display("text %0d highlighted %0d wave %0d", n_text, n_hl, n_wave);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
