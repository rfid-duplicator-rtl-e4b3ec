// tb_tx_select: random inputs against the priority rule, one clock later:
// downlink active -> carrier or mid-scale 128 by carrier_en; else spoof
// selected -> spoofer code; else carrier (128 + wave).
module tb_tx_select;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [7:0] wave;
  logic [7:0] spoof, dac, expv;
  logic sel, dl, cen;
  int checks = 0, failures = 0;
  int seen [4];

  tx_select dut (.clk, .rst, .wave, .spoof_dac(spoof), .spoof_sel(sel),
                 .downlink_active(dl), .carrier_en(cen), .dac);

  initial begin
    wave = 0; spoof = 0; sel = 0; dl = 0; cen = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (dac !== 8'd128) begin failures++; $display("reset value %0d", dac); end
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wave = 8'($urandom); spoof = 8'($urandom);
      sel = 1'($urandom); dl = 1'($urandom); cen = 1'($urandom);
      if (dl) begin expv = cen ? 8'(128 + int'(wave)) : 8'd128; seen[cen ? 1 : 0]++; end
      else if (sel) begin expv = spoof; seen[2]++; end
      else begin expv = 8'(128 + int'(wave)); seen[3]++; end
      @(negedge clk);
      checks++;
      if (dac !== expv) begin failures++; $display("dac %0d expected %0d", dac, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
