// tb_t5577_writer: writes a random 224-bit ID and decodes the carrier with
// the tag-side monitor. There must be exactly 7 packets of 38 bits, block k
// carrying opcode 10, lock 0, ID bits [223-32(k-1) -: 32] and address k,
// each followed by the 700-period programming hold.
module tb_t5577_writer;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick, start, cen, busy, done;
  logic [2:0] block;
  id_t id;
  int checks = 0, failures = 0, tcnt = 0;

  always @(posedge clk) tcnt <= (tcnt == 3) ? 0 : tcnt + 1;
  assign tick = (tcnt == 3);

  t5577_writer dut (.clk, .rst, .tick, .start, .id_data(id), .carrier_en(cen), .busy,
                    .done, .block);
  downlink_monitor mon (.clk, .tick, .carrier_en(cen));

  initial begin
    start = 0;
    for (int i = 0; i < ID_BITS; i += 32) id[i +: 32] = $urandom;
    repeat (5) @(posedge clk);
    rst = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    id = ~id;                       // the writer must use the latched copy
    while (!done) @(negedge clk);
    id = ~id;
    mon.flush();
    checks++;
    if (mon.npkts != 7) begin failures++; $display("packets %0d", mon.npkts); end
    for (int k = 0; k < 7 && k < mon.npkts; k++) begin
      logic [37:0] expv;
      expv = {OP_WRITE_P0, 1'b0, id[ID_BITS-1-32*k -: 32], 3'(k + 1)};
      checks++;
      if (mon.pkt_n[k] != 38 || mon.pkt_bits[k][37:0] != expv) begin
        failures++; $display("block %0d: %h expected %h", k + 1, mon.pkt_bits[k][37:0], expv);
      end
      checks++;
      // the next packet waits for a tick boundary: one extra on period at most
      if (mon.pkt_hold[k] < T_PROG || mon.pkt_hold[k] > T_PROG + 1) begin
        failures++; $display("hold %0d", mon.pkt_hold[k]);
      end
    end
    checks++;
    if (mon.errors != 0 || busy) begin failures++; $display("monitor errors %0d", mon.errors); end
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
