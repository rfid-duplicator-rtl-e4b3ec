// tb_downlink_tx: sends random packets of random length (1..38 bits) with
// random hold times and decodes the carrier with the tag-side monitor.
// Each packet must come back with the same bits, exact gap and on-times,
// and a carrier-on hold of exactly hold_cycles periods before `done`.
module tb_downlink_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick, start, cen, busy, done;
  logic [5:0] nbits;
  logic [37:0] bits;
  logic [15:0] hold;
  int checks = 0, failures = 0, tcnt = 0;

  always @(posedge clk) tcnt <= (tcnt == 3) ? 0 : tcnt + 1;
  assign tick = (tcnt == 3);

  downlink_tx dut (.clk, .rst, .tick, .start, .nbits, .bits, .hold_cycles(hold),
                   .carrier_en(cen), .busy, .done);
  downlink_monitor mon (.clk, .tick, .carrier_en(cen));

  initial begin
    logic [63:0] expv;
    int n_ticks;
    start = 0; nbits = 0; bits = '0; hold = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      nbits = 6'($urandom_range(1, 38));
      bits  = {$urandom, 6'($urandom)};
      hold  = 16'($urandom_range(70, 300));
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) begin failures++; $display("not busy"); end
      n_ticks = 0;
      while (!done) begin
        @(negedge clk);
        if (tick) n_ticks++;
      end
      // carrier stays on a few periods so the monitor sees the run end
      checks++;
      if (cen !== 1'b1) begin failures++; $display("carrier off when idle"); end
      mon.flush();
      expv = 64'(bits >> (38 - nbits));
      checks++;
      if (mon.npkts != k + 1 || mon.pkt_n[k] != int'(nbits) ||
          (mon.pkt_bits[k] & ((64'd1 << nbits) - 1)) != expv) begin
        failures++;
        $display("packet %0d: got %0d bits %h, sent %0d bits %h", k, mon.pkt_n[k], mon.pkt_bits[k], nbits, expv);
      end
      checks++;
      if (mon.pkt_hold[k] != int'(hold)) begin
        failures++; $display("hold %0d expected %0d", mon.pkt_hold[k], hold);
      end
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("monitor errors %0d", mon.errors); end
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
