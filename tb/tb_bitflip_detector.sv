// tb_bitflip_detector: feeds alternating high/low peaks 62 LSB apart
// (about 50 mV at 0.8 mV per LSB) with +-8 LSB of noise, and
// inserts a repeated level at known places. bit_flip must be set exactly at
// the repeated peaks (and never on the first peak), qualified by peak_out
// one clock after peak_valid.
module tb_bitflip_detector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pv, po, flip;
  logic [11:0] pm;
  int checks = 0, failures = 0, nflips = 0;
  bitflip_detector dut (.clk, .rst, .peak_valid(pv), .peak_mag(pm),
                                          .peak_out(po), .bit_flip(flip));

  initial begin
    logic hi;
    logic expect_flip;
    pv = 0; pm = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    hi = 1;
    for (int i = 0; i < 2000; i++) begin
      // every so often keep the same level: a phase flip
      expect_flip = (i > 0) && ($urandom_range(0, 9) == 0);
      if (!expect_flip) hi = !hi;
      @(negedge clk);
      pv = 1;
      pm = 12'((hi ? 2462 : 2400) + $urandom_range(0, 16) - 8);
      @(negedge clk);
      pv = 0;
      checks++;
      if (!po || flip !== expect_flip) begin
        failures++; $display("peak %0d: out=%b flip=%b expected %b", i, po, flip, expect_flip);
      end
      if (expect_flip) nflips++;
      repeat ($urandom_range(1, 4)) begin
        @(negedge clk); checks++;
        if (po || flip) begin failures++; $display("spurious strobe"); end
      end
    end
    checks++;
    if (nflips == 0) failures++;
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
