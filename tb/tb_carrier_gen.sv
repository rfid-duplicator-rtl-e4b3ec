// tb_carrier_gen: the carrier must repeat every 800 clocks (125 kHz at
// 100 MHz), cycle_start must come once per period on a zero sample, the
// wave must stay within 6 % of full scale of an ideal sine of amplitude
// 127, and reach +127 and -127.
module tb_carrier_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [7:0] wave;
  logic cs;
  int checks = 0, failures = 0, maxv = -200, minv = 200;
  longint n = -1, last_cs = -1, t = 0;

  carrier_gen dut (.clk, .rst, .wave, .cycle_start(cs));

  always @(posedge clk) if (!rst) begin
    t++;
    if (cs) begin
      if (last_cs >= 0) begin
        checks++;
        if (t - last_cs != 800) begin failures++; $display("period %0d", t - last_cs); end
      end
      checks++;
      if (wave != 0) begin failures++; $display("cycle_start at %0d", wave); end
      last_cs = t;
      n = 0;
    end
    if (n >= 0) begin
      real ideal;
      ideal = 127.0 * $sin(2.0 * 3.14159265 * real'(n) / 800.0);
      checks++;
      if ((real'(wave) - ideal) > 8.0 || (ideal - real'(wave)) > 8.0) begin
        failures++; $display("n=%0d wave=%0d ideal=%f", n, wave, ideal);
      end
      if (int'(wave) > maxv) maxv = int'(wave);
      if (int'(wave) < minv) minv = int'(wave);
      n++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (800 * 6) @(posedge clk);
    checks++;
    if (maxv != 127 || minv != -127) begin failures++; $display("range %0d..%0d", minv, maxv); end
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
