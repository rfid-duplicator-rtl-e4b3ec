// tb_spoofer: drives the spoofer with a short 16-clock test carrier
// (triangle, peak 100) and measures the peak DAC code of every carrier
// period. Peaks must be 228 (full) or 203 (3/4), must alternate except at
// the first period of a bit whose value differs from the previous bit,
// where the level repeats, and the frame start must come every 224 bits.
module tb_spoofer;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en, cs, fs;
  logic signed [7:0] wave;
  logic [7:0] dac;
  id_t id;
  int checks = 0, failures = 0, n_repeat = 0, n_frames = 0;
  int ph = 0;

  spoofer dut (.clk, .rst, .enable(en), .wave, .cycle_start(cs), .id_data(id), .dac,
               .frame_start(fs));

  // test carrier
  always @(posedge clk) ph <= (ph == 15) ? 0 : ph + 1;
  always_comb begin
    cs   = (ph == 0);
    wave = (ph < 8) ? 8'(25 * ((ph < 4) ? ph : 8 - ph))
                    : -8'(25 * ((ph < 12) ? ph - 8 : 16 - ph));
  end

  // per-period peak of the DAC (dac lags wave by one clock)
  int cur_max = 0, period = -1, last_peak = 0;
  always @(posedge clk) if (en && !rst) begin
    if (ph == 1) begin
      if (period >= 1) begin
        int b, pb;
        logic rep, exp_rep;
        b  = (period / PEAKS_PER_BIT) % ID_BITS;
        pb = (b == 0) ? ID_BITS - 1 : b - 1;
        rep = (cur_max == last_peak);
        exp_rep = (period % PEAKS_PER_BIT == 0) && (id[ID_BITS-1-b] != id[ID_BITS-1-pb]);
        checks++;
        if (rep != exp_rep || (cur_max != 228 && cur_max != 203)) begin
          failures++;
          $display("period %0d: peak %0d last %0d repeat expected %b", period, cur_max, last_peak, exp_rep);
        end
        if (rep) n_repeat++;
      end
      if (period >= 0) last_peak = cur_max;
      period++;
      cur_max = 0;
    end
    if (int'(dac) > cur_max) cur_max = int'(dac);
  end
  always @(posedge clk) if (fs) begin
    n_frames++;
    checks++;
    // frame_start is seen just before the period count advances
    if (period != (n_frames - 1) * ID_BITS * PEAKS_PER_BIT - 1) begin
      failures++; $display("frame start at period %0d", period);
    end
  end

  initial begin
    en = 0;
    for (int i = 0; i < ID_BITS; i += 32) id[i +: 32] = $urandom;
    id[ID_BITS-1 -: 30] = '0;
    repeat (5) @(posedge clk);
    rst = 0;
    @(posedge clk iff ph == 15);
    en = 1;
    repeat (2 * ID_BITS * PEAKS_PER_BIT * 16 + 40) @(posedge clk);
    checks++;
    if (n_repeat == 0 || n_frames < 3) begin failures++; $display("repeats %0d frames %0d", n_repeat, n_frames); end
    $display("repeats %0d frames %0d", n_repeat, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
