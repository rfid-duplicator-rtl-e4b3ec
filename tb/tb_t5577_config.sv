// tb_t5577_config: runs the configuration sequence and decodes it with the
// tag-side monitor: a 38-bit write of 0x000810E0 to block 0 (opcode 10,
// lock 0), a 700-period programming hold, then a 2-bit reset command 00.
module tb_t5577_config;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick, start, cen, busy, done;
  int checks = 0, failures = 0, tcnt = 0;

  always @(posedge clk) tcnt <= (tcnt == 3) ? 0 : tcnt + 1;
  assign tick = (tcnt == 3);

  t5577_config dut (.clk, .rst, .tick, .start, .carrier_en(cen), .busy, .done);
  downlink_monitor mon (.clk, .tick, .carrier_en(cen));

  initial begin
    start = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy"); end
    while (!done) @(negedge clk);
    mon.flush();
    checks++;
    if (mon.npkts != 2) begin failures++; $display("packets %0d", mon.npkts); end
    checks++;
    if (mon.pkt_n[0] != 38 || mon.pkt_bits[0][37:0] != {2'b10, 1'b0, 32'h0008_10E0, 3'd0}) begin
      failures++; $display("config packet %h", mon.pkt_bits[0]);
    end
    checks++;
    if (mon.pkt_hold[0] < T_PROG || mon.pkt_hold[0] > T_PROG + 1) begin
      failures++; $display("hold %0d", mon.pkt_hold[0]);
    end
    checks++;
    if (mon.pkt_n[1] != 2 || mon.pkt_bits[1][1:0] != 2'b00) begin
      failures++; $display("reset packet %0d bits %h", mon.pkt_n[1], mon.pkt_bits[1]);
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("monitor errors %0d", mon.errors); end
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
