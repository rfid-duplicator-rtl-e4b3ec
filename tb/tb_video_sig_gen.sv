// tb_video_sig_gen: runs two full 720p frames and checks, against counters
// kept in the testbench: hcount/vcount sequence (1650 x 750), 1280 x 720
// active pixels per frame, hsync 40 clocks starting at h = 1390, vsync on
// lines 725..729, one new_frame per 1,237,500 clocks at (0, 720).
module tb_video_sig_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [10:0] h; logic [9:0] v;
  logic hs, vs, act, nf;
  logic [5:0] fc;
  int checks = 0, failures = 0;
  int eh = 0, ev = 0, nact = 0, nframes = 0;
  longint t = 0, last_nf = -1;

  video_sig_gen dut (.clk, .rst, .hcount(h), .vcount(v), .hsync(hs), .vsync(vs),
                     .active(act), .new_frame(nf), .frame_count(fc));

  always @(posedge clk) if (!rst) begin
    logic bad;
    t++;
    bad = (h != 11'(eh)) || (v != 10'(ev)) ||
          (act != (eh < 1280 && ev < 720)) ||
          (hs != (eh >= 1390 && eh < 1430)) ||
          (vs != (ev >= 725 && ev < 730)) ||
          (nf != (eh == 0 && ev == 720));
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("t=%0d h=%0d v=%0d exp %0d %0d act=%b hs=%b vs=%b nf=%b", t, h, v, eh, ev, act, hs, vs, nf);
    end
    if (act) nact++;
    if (nf) begin
      if (last_nf >= 0) begin
        checks++;
        if (t - last_nf != 1650 * 750) begin failures++; $display("frame period %0d", t - last_nf); end
        checks++;
        if (nact != 1280 * 720) begin failures++; $display("active %0d", nact); end
      end
      nact = 0;
      last_nf = t;
      nframes++;
    end
    eh = (eh == 1649) ? 0 : eh + 1;
    if (eh == 0) ev = (ev == 749) ? 0 : ev + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    eh = 0; ev = 0;
    repeat (1650 * 750 * 2 + 2000) @(posedge clk);
    checks++;
    if (nframes < 2 || fc != 6'(nframes)) begin failures++; $display("frames %0d fc %0d", nframes, fc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
