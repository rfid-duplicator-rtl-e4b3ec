// tb_rfid_duplicator: end-to-end run of the whole duplicator at its default
// sizes (100 MHz system clock, 74.25 MHz pixel clock, 800-clock carrier).
// A card model answers the carrier: one carrier period per peak, amplitude
// alternating high/low, with the level repeated at each bit change, sampled
// peaks about 62 LSB apart (the 50 mV clearance of a real card) with
// +-8 LSB of noise, through the AD7476A model. The run:
//  1. the card first sends a frame with a wrong constant field (rejected),
//     then a good ID; led_valid must rise with that ID;
//  2. btn_discard drops it; the next capture is stored into slot 3;
//  3. spoof mode on slot 3 with the DAC looped back into the ADC: the
//     reader must decode the same ID from the duplicator's own waveform;
//  4. btn_write (sw[1:0]=10) writes slot 3 to a tag: the DAC is decoded
//     with the tag-side monitor into 7 packets carrying the ID;
//  5. btn_write (sw[1:0]=11) sends the configuration write and the reset;
//  6. meanwhile the display must draw stored data and send sync words,
//     also found in the rebuilt serial stream of the blue lane.
// Each mechanism is counted and must occur at least once.
module tb_rfid_duplicator;
  import rfid_pkg::*;
  logic clk_100 = 0, clk_pix = 0, rst = 1;
  always #5 clk_100 = ~clk_100;
  logic clk_5x = 0;
  always #6.734 clk_pix = ~clk_pix;
  always #1.3468 clk_5x = ~clk_5x;

  logic adc_sdata, adc_cs_n, adc_sclk;
  logic [15:0] sw;
  logic btn_store, btn_discard, btn_write;
  logic [7:0] dac;
  logic led_valid, led_busy;
  logic [9:0] tr, tg, tbl;
  logic [1:0] pr, pg, pb;
  int checks = 0, failures = 0;

  rfid_duplicator dut (.clk_100, .clk_pix, .clk_5x, .rst, .adc_sdata, .adc_cs_n, .adc_sclk, .sw,
                       .btn_store, .btn_discard, .btn_write, .dac, .led_valid, .led_busy,
                       .tmds_red(tr), .tmds_green(tg), .tmds_blue(tbl),
                       .tmds_red_pair(pr), .tmds_green_pair(pg), .tmds_blue_pair(pb));

  // ---------------- card model and ADC ----------------
  logic [11:0] analog;
  int conversions; logic [11:0] last_value;
  ad7476a_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .value(analog), .sdata(adc_sdata),
                     .conversions, .last_value);

  id_t frames [3];        // frames the card sends in turn; the last repeats
  logic loopback = 0;
  longint t = 0;
  int  period = 0, fidx = 0, bitn = 0, pcnt = 0;
  logic amp_hi = 0, prev_bit = 0;
  always @(posedge clk_100) begin
    int ph;
    real sv;
    t++;
    ph = int'(t % 800);
    if (ph == 0) begin
      // next carrier period of the card
      logic b;
      b = frames[fidx][ID_BITS-1-bitn];
      if (!(pcnt == 0 && b != prev_bit)) amp_hi = !amp_hi;
      prev_bit = b;
      pcnt++;
      if (pcnt == PEAKS_PER_BIT) begin
        pcnt = 0;
        bitn++;
        if (bitn == ID_BITS) begin bitn = 0; if (fidx < 2) fidx++; end
      end
    end
    sv = $sin(2.0 * 3.14159265 * real'(ph) / 800.0) * (amp_hi ? 1600.0 : 1535.0);
    // +-8 LSB of noise on the card's signal
    analog = loopback ? {dac, 4'h0} : 12'(2048 + int'(sv) + $urandom_range(0, 16) - 8);
  end

  // ---------------- event counters ----------------
  int n_peak = 0, n_flip = 0, n_start = 0, n_reject = 0, n_capture = 0, n_store = 0,
      n_discard = 0, n_spoof_frame = 0, n_frame = 0, n_white = 0, n_sync = 0;
  logic led_q = 0;
  always @(posedge clk_100) begin
    if (dut.peak_valid) n_peak++;
    if (dut.peak_out && dut.bit_flip) n_flip++;
    if (dut.start_pulse) n_start++;
    if (dut.reject_pulse) n_reject++;
    if (led_valid && !led_q) n_capture++;
    if (dut.frame_start) n_spoof_frame++;
    led_q <= led_valid;
  end
  always @(posedge clk_pix) begin
    if (dut.new_frame) n_frame++;
    if (dut.red == 8'hFF) n_white++;
    if (tbl == 10'b0101010100 || tbl == 10'b0010101011 || tbl == 10'b1010101011) n_sync++;
  end

  // serial blue lane: count the hsync control word in the rebuilt bit stream
  logic [19:0] blue_bits = '0;
  int n_serial_sync = 0;
  always @(posedge clk_5x) begin
    #0.1;
    blue_bits = {pb[1], pb[0], blue_bits[19:2]};
    if (blue_bits[19:10] == 10'b0010101011) n_serial_sync++;
  end

  // ---------------- tag-side view of the DAC ----------------
  logic mon_tick = 0, on_q = 1, mon_en = 0;   // the monitor listens from step 4 on
  int nz = 0;
  always @(posedge clk_100) begin
    mon_tick <= dut.tick && mon_en;
    if (dut.tick) begin on_q <= (nz > 400); nz = 0; end
    else if (dac != 8'd128) nz++;
  end
  downlink_monitor mon (.clk(clk_100), .tick(mon_tick), .carrier_en(on_q));

  function automatic id_t make_id(logic [SIG_BITS-1:0] sig, logic [31:0] user);
    id_t f;
    logic [ID_BITS-USER_POS-USER_BITS-1:0] fill;
    for (int i = 0; i < $bits(fill); i++) fill[i] = (i % 6 == 0) ? 1'b1 : 1'($urandom);
    return {{LEAD_ZEROS{1'b0}}, sig, user, fill};
  endfunction

  task automatic press(ref logic btn);
    @(negedge clk_100); btn = 1;
    repeat (3) @(negedge clk_100); btn = 0;
  endtask

  task automatic wait_led(input string what);
    longint t0;
    t0 = t;
    while (!led_valid && t - t0 < 4 * ID_BITS * PEAKS_PER_BIT * 800) @(posedge clk_100);
    checks++;
    if (!led_valid) begin failures++; $display("%s: no ID decoded", what); end
  endtask

  initial begin
    id_t good, stored;
    sw = 16'h0; btn_store = 0; btn_discard = 0; btn_write = 0;
    good = make_id(MIT_SIG, 32'hC0DE_5EED);
    frames[0] = make_id(MIT_SIG ^ 20'h00001, 32'h0BAD_0BAD);
    frames[1] = good;
    frames[2] = good;
    repeat (10) @(posedge clk_100);
    rst = 0;

    // 1. capture
    wait_led("capture");
    checks++;
    if (dut.rx_id !== good) begin failures++; $display("captured ID differs"); end
    // 2. discard, capture again, store into slot 3
    press(btn_discard);
    checks++;
    if (led_valid) begin failures++; $display("discard ignored"); end
    n_discard++;
    wait_led("second capture");
    sw[15:13] = 3'd3;
    press(btn_store);
    n_store++;
    stored = dut.u_mem.mem[3];
    checks++;
    if (led_valid || stored !== good || !dut.slot_valid[3]) begin
      failures++; $display("store failed");
    end
    // 3. spoof with loopback
    sw[2] = 1;
    loopback = 1;
    repeat (ID_BITS * PEAKS_PER_BIT * 800 / 2) @(posedge clk_100);
    press(btn_discard);        // drop anything caught during the switch-over
    wait_led("spoof loopback");
    checks++;
    if (dut.rx_id !== good) begin failures++; $display("spoofed ID differs"); end
    press(btn_discard);
    loopback = 0;
    sw[2] = 0;
    // 4. write slot 3 to a tag
    mon_en = 1;
    repeat (800 * 3) @(posedge clk_100);
    sw[1:0] = 2'b10;
    press(btn_write);
    checks++;
    if (!led_busy) begin failures++; $display("write did not start"); end
    while (led_busy) @(posedge clk_100);
    repeat (800 * 4) @(posedge clk_100);
    mon.flush();
    checks++;
    if (mon.npkts != 7) begin failures++; $display("write packets %0d", mon.npkts); end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (mon.pkt_n[k] != PKT_BITS ||
          mon.pkt_bits[k][37:0] != {OP_WRITE_P0, 1'b0, good[ID_BITS-1-32*k -: 32], 3'(k + 1)}) begin
        failures++; $display("block %0d packet %h", k + 1, mon.pkt_bits[k]);
      end
    end
    // 5. configure
    sw[1:0] = 2'b11;
    press(btn_write);
    while (led_busy) @(posedge clk_100);
    repeat (800 * 4) @(posedge clk_100);
    mon.flush();
    checks++;
    if (mon.npkts != 9 || mon.pkt_bits[7][37:0] != {2'b10, 1'b0, T5577_CONFIG, 3'd0} ||
        mon.pkt_n[8] != 2 || mon.pkt_bits[8][1:0] != 2'b00) begin
      failures++; $display("configuration packets wrong (%0d)", mon.npkts);
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("downlink timing errors %0d", mon.errors); end

    // mechanisms
    $display("peaks %0d flips %0d starts %0d rejects %0d captures %0d discards %0d stores %0d",
             n_peak, n_flip, n_start, n_reject, n_capture, n_discard, n_store);
    $display("spoof frames %0d write packets %0d video frames %0d white pixels %0d sync words %0d serial %0d",
             n_spoof_frame, mon.npkts, n_frame, n_white, n_sync, n_serial_sync);
    begin
      int ev [11];
      ev = '{n_peak, n_flip, n_start, n_reject, n_capture, n_discard, n_store,
             n_spoof_frame, mon.npkts, n_frame, n_white};
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
      checks++;
      if (n_sync == 0) begin failures++; $display("no sync words"); end
      checks++;
      if (n_serial_sync == 0) begin failures++; $display("no sync words on the serial lane"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;   // 1 s of simulated time
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
