// rfid_duplicator: 125 kHz BPSK RFID reader, ID store, card emulator and
// T5577 tag writer, with an HDMI status display.
// Receive path (clk_100): adc_reader samples the received antenna signal
// at 1 MSPS -> peak_finder finds one peak per carrier period ->
// bitflip_detector marks phase flips -> id_decoder rebuilds and checks the
// 224-bit MIT ID and lights led_valid. btn_store saves it in slot
// sw[15:13] of id_memory, btn_discard drops it.
// Transmit path (clk_100): carrier_gen makes the 125 kHz sine. tx_select
// sends to the DAC either the plain carrier (reading), the spoofer's replay
// of slot sw[15:13] (sw[2] high), or the carrier gated by t5577_writer
// (btn_write with sw[1]=1, sw[0]=0: the selected ID into blocks 1..7) or
// t5577_config (btn_write with sw[1]=sw[0]=1: configuration word into
// block 0, then reset).
// Display path (clk_pix, 74.25 MHz): video_sig_gen -> image_sprite (two
// clocks) -> three tmds_encoders; syncs are delayed two clocks to match.
// The 10-bit TMDS words leave on ports and through three tmds_serializers
// as bit pairs on clk_5x (371.25 MHz, edge-aligned with clk_pix) for
// external DDR output cells. The clock generator and the differential pads
// are outside this module; the TMDS clock lane is clk_pix itself.
// Buttons are taken as clean and used on their rising edge. The stored
// user codes and switches reach the pixel domain through two register
// stages; they change only when a user acts, so a frame may show at most
// one line drawn from the old value. The partitioning follows the design
// description; button handling and the write-mode switch setting are this
// design's choice.
module rfid_duplicator #(
  parameter int CARRIER_DIV = 800
) (
  input  logic        clk_100,
  input  logic        clk_pix,
  input  logic        clk_5x,
  input  logic        rst,
  input  logic        adc_sdata,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  input  logic [15:0] sw,
  input  logic        btn_store,
  input  logic        btn_discard,
  input  logic        btn_write,
  output logic [7:0]  dac,
  output logic        led_valid,
  output logic        led_busy,
  output logic [9:0]  tmds_red,
  output logic [9:0]  tmds_green,
  output logic [9:0]  tmds_blue,
  output logic [1:0]  tmds_red_pair,
  output logic [1:0]  tmds_green_pair,
  output logic [1:0]  tmds_blue_pair
);
  import rfid_pkg::*;

  // ---------------- buttons ----------------
  logic [2:0] btn_q;
  logic       store_p, discard_p, write_p;
  always_ff @(posedge clk_100) begin
    if (rst) btn_q <= '0;
    else     btn_q <= {btn_store, btn_discard, btn_write};
  end
  assign store_p   = btn_store   && !btn_q[2];
  assign discard_p = btn_discard && !btn_q[1];
  assign write_p   = btn_write   && !btn_q[0];

  // ---------------- receive ----------------
  sample_t sample, peak_mag;
  logic    sample_valid, peak_valid, peak_out, bit_flip;
  logic    id_valid, start_pulse, reject_pulse;
  id_t     rx_id;

  adc_reader u_adc (.clk(clk_100), .rst, .adc_sdata, .adc_cs_n, .adc_sclk,
                    .sample, .sample_valid);
  peak_finder u_peak (.clk(clk_100), .rst, .sample_valid, .sample,
                      .peak_valid, .peak_mag);
  bitflip_detector u_flip (.clk(clk_100), .rst, .peak_valid, .peak_mag,
                           .peak_out, .bit_flip);
  id_decoder u_dec (.clk(clk_100), .rst, .peak_valid(peak_out), .bit_flip,
                    .store(store_p), .discard(discard_p), .id_valid,
                    .id_data(rx_id), .start_pulse, .reject_pulse);
  assign led_valid = id_valid;

  // ---------------- storage ----------------
  id_t        sel_id;
  user_code_t user_codes [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] slot_valid;
  id_memory u_mem (.clk(clk_100), .rst, .we(store_p && id_valid),
                   .waddr(sw[15:13]), .wdata(rx_id), .raddr(sw[15:13]),
                   .rdata(sel_id), .user_codes, .slot_valid);

  // ---------------- transmit ----------------
  logic signed [7:0] wave;
  logic       tick, frame_start;
  logic [7:0] spoof_dac;
  logic       wr_cen, wr_busy, wr_done, cfg_cen, cfg_busy, cfg_done;
  logic [2:0] wr_block;

  carrier_gen #(.CARRIER_DIV(CARRIER_DIV)) u_car (.clk(clk_100), .rst,
                                                  .wave, .cycle_start(tick));
  spoofer u_spoof (.clk(clk_100), .rst, .enable(sw[2]), .wave, .cycle_start(tick),
                   .id_data(sel_id), .dac(spoof_dac), .frame_start);
  t5577_writer u_wr (.clk(clk_100), .rst, .tick,
                     .start(write_p && sw[1] && !sw[0] && !cfg_busy),
                     .id_data(sel_id), .carrier_en(wr_cen), .busy(wr_busy),
                     .done(wr_done), .block(wr_block));
  t5577_config u_cfg (.clk(clk_100), .rst, .tick,
                      .start(write_p && sw[1] && sw[0] && !wr_busy),
                      .carrier_en(cfg_cen), .busy(cfg_busy), .done(cfg_done));
  tx_select u_txs (.clk(clk_100), .rst, .wave, .spoof_dac, .spoof_sel(sw[2]),
                   .downlink_active(wr_busy || cfg_busy),
                   .carrier_en(wr_busy ? wr_cen : cfg_cen), .dac);
  assign led_busy = wr_busy || cfg_busy;

  // ---------------- display (clk_pix) ----------------
  logic [1:0] rst_pix_q;
  logic       rst_pix;
  always_ff @(posedge clk_pix) rst_pix_q <= {rst_pix_q[0], rst};
  assign rst_pix = rst_pix_q[1];

  user_code_t codes_m [NUM_SLOTS], codes_p [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] valid_m, valid_p;
  logic [2:0] sel_m, sel_p;
  always_ff @(posedge clk_pix) begin
    codes_m <= user_codes; codes_p <= codes_m;
    valid_m <= slot_valid; valid_p <= valid_m;
    sel_m   <= sw[15:13];  sel_p   <= sel_m;
  end

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, active, new_frame;
  logic [5:0]  frame_count;
  logic [7:0]  red, green, blue;
  logic [1:0]  hs_d, vs_d, act_d;

  video_sig_gen u_vsg (.clk(clk_pix), .rst(rst_pix), .hcount, .vcount, .hsync,
                       .vsync, .active, .new_frame, .frame_count);
  image_sprite u_spr (.clk(clk_pix), .rst(rst_pix), .hcount, .vcount,
                      .user_codes(codes_p), .slot_valid(valid_p), .id_select(sel_p),
                      .red, .green, .blue);
  // match the two-clock sprite pipeline
  always_ff @(posedge clk_pix) begin
    if (rst_pix) begin
      hs_d <= '0; vs_d <= '0; act_d <= '0;
    end else begin
      hs_d <= {hs_d[0], hsync}; vs_d <= {vs_d[0], vsync}; act_d <= {act_d[0], active};
    end
  end
  tmds_encoder u_tmds_r (.clk(clk_pix), .rst(rst_pix), .data(red),   .ctrl(2'b00),
                         .active(act_d[1]), .tmds(tmds_red));
  tmds_encoder u_tmds_g (.clk(clk_pix), .rst(rst_pix), .data(green), .ctrl(2'b00),
                         .active(act_d[1]), .tmds(tmds_green));
  tmds_encoder u_tmds_b (.clk(clk_pix), .rst(rst_pix), .data(blue),
                         .ctrl({vs_d[1], hs_d[1]}), .active(act_d[1]), .tmds(tmds_blue));

  // 10:1 serialisers, two bits per 371.25 MHz cycle for the output DDR cells
  tmds_serializer u_ser_r (.clk_pix, .clk_5x, .rst(rst_pix), .word(tmds_red),   .pair(tmds_red_pair));
  tmds_serializer u_ser_g (.clk_pix, .clk_5x, .rst(rst_pix), .word(tmds_green), .pair(tmds_green_pair));
  tmds_serializer u_ser_b (.clk_pix, .clk_5x, .rst(rst_pix), .word(tmds_blue),  .pair(tmds_blue_pair));
endmodule
