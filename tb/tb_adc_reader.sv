// tb_adc_reader: checks the AD7476A reader against the ADC model.
// Random values are presented to the model; each strobe must carry the
// value converted in that frame, one sample every 100 clocks, with 16 SCLK
// falling edges per frame and SCLK at 20 MHz (5 clocks per period).
module tb_adc_reader;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sdata, cs_n, sclk, sv;
  logic [11:0] sample, value, last_value;
  int conversions, checks = 0, failures = 0;
  int falls, last_t, nsamp = 0;
  longint cyc = 0;

  adc_reader dut (.clk, .rst, .adc_sdata(sdata), .adc_cs_n(cs_n), .adc_sclk(sclk),
                  .sample, .sample_valid(sv));
  ad7476a_model adc (.cs_n, .sclk, .value, .sdata, .conversions, .last_value);

  always @(posedge clk) cyc++;
  always @(negedge cs_n) falls = 0;
  always @(negedge sclk) if (!cs_n) falls++;
  // new random input while CS is high
  always @(posedge cs_n) value = 12'($urandom);
  longint fall_t;
  always @(negedge sclk) begin
    if (!cs_n && falls > 1) begin
      checks++;
      if (cyc - fall_t != 5) begin failures++; $display("SCLK period %0d", cyc - fall_t); end
    end
    fall_t = cyc;
  end

  always @(posedge clk) if (!rst && sv) begin
    nsamp++;
    checks++;
    if (sample !== last_value) begin
      failures++; $display("sample %h expected %h", sample, last_value);
    end
    checks++;
    if (falls != 16) begin failures++; $display("falls %0d", falls); end
    if (nsamp > 1) begin
      checks++;
      if (cyc - last_t != 100) begin failures++; $display("interval %0d", cyc - last_t); end
    end
    last_t = int'(cyc);
    if (nsamp == 200) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    value = 12'hABC;
    repeat (3) @(posedge clk);
    rst = 0;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
