// downlink_monitor: testbench decoder for the T5577 downlink (not synthesizable).
// It samples carrier_en once per carrier period (on `tick`, seeing the
// level of the period just ended) and decodes it the way the tag does:
// a gap of 25..50 periods starts a packet, a gap of 8..20 ends a bit,
// and the carrier-on time before it gives the bit (16..31 -> 0,
// 48..63 -> 1). A carrier-on run longer than 64 periods ends the packet;
// its length is recorded as the hold time once the next packet starts or
// `flush` is called. Every gap or on-time outside the expected values
// counts in `errors`; exact expected timings are checked too.
module downlink_monitor #(
  parameter int START_GAP = 30, parameter int WRITE_GAP = 12,
  parameter int ZERO_ON = 24, parameter int ONE_ON = 56
) (
  input logic clk,
  input logic tick,
  input logic carrier_en
);
  logic [63:0] pkt_bits [32];
  int          pkt_n    [32];
  int          pkt_hold [32];
  int          npkts = 0, errors = 0, n_gaps = 0;
  int          run = 0;
  logic        lvl = 1'b1;
  logic        in_pkt = 1'b0;
  int          last_on = 0;

  task automatic end_run();
    if (!lvl) begin                       // a gap ended
      n_gaps++;
      if (run >= 25 && run <= 50) begin
        if (in_pkt) begin errors++; $display("monitor: start gap inside packet"); end
        if (run != START_GAP) begin errors++; $display("monitor: start gap %0d", run); end
        if (npkts > 0) pkt_hold[npkts-1] = last_on;
        in_pkt = 1'b1;
        pkt_bits[npkts] = '0;
        pkt_n[npkts] = 0;
        pkt_hold[npkts] = -1;
        npkts++;
      end else if (run >= 8 && run <= 20 && in_pkt) begin
        if (run != WRITE_GAP) begin errors++; $display("monitor: write gap %0d", run); end
      end else begin
        errors++; $display("monitor: bad gap %0d", run);
      end
    end else begin                        // a carrier-on run ended by a gap
      last_on = run;
      if (in_pkt && run > 64) begin
        in_pkt = 1'b0;
      end else if (in_pkt && npkts > 0) begin
        if (run == ZERO_ON || run == ONE_ON) begin
          pkt_bits[npkts-1] = {pkt_bits[npkts-1][62:0], (run == ONE_ON)};
          pkt_n[npkts-1]++;
        end else begin
          errors++; $display("monitor: on-time %0d", run);
        end
      end
    end
  endtask

  always @(posedge clk) if (tick) begin
    if (carrier_en === lvl) run++;
    else begin
      end_run();
      lvl = carrier_en;
      run = 1;
    end
  end

  // close the packet in flight: the current carrier-on run is its hold time
  task automatic flush();
    if (lvl && npkts > 0 && pkt_hold[npkts-1] < 0) pkt_hold[npkts-1] = run;
  endtask
endmodule
