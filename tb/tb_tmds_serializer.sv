// tb_tmds_serializer: random 10-bit words at the 74.25 MHz pixel clock, a
// 371.25 MHz edge-aligned 5x clock, and the bit stream rebuilt from the
// DDR pairs (pair[0] then pair[1] each fast cycle). The stream, cut every
// 10 bits, must reproduce the word sequence LSB first, with one fixed bit
// alignment, the first bit leaving 2..5 fast cycles after the pixel edge.
module tb_tmds_serializer;
  logic clk_pix = 0, clk_5x = 0, rst = 1;
  always #6.734 clk_pix = ~clk_pix;
  always #1.3468 clk_5x = ~clk_5x;
  logic [9:0] word;
  logic [1:0] pair;
  int checks = 0, failures = 0;
  logic [9:0] sent [600];
  logic       stream [6000];
  int nsent = 0, nbits = 0;

  tmds_serializer dut (.clk_pix, .clk_5x, .rst, .word, .pair);

  always @(posedge clk_pix) if (!rst && nsent < 600) begin
    sent[nsent] = word;      // the word presented at this edge
    nsent++;
    word <= 10'($urandom);
  end
  always @(posedge clk_5x) if (!rst && nbits < 5998) begin
    #0.1;
    stream[nbits] = pair[0];
    stream[nbits + 1] = pair[1];
    nbits += 2;
  end

  initial begin
    bit found;
    word = 10'h155;
    repeat (4) @(posedge clk_pix);
    rst = 0;
    repeat (560) @(posedge clk_pix);
    found = 0;
    // try every bit alignment and word lag
    for (int off = 0; off < 10 && !found; off++)
      for (int lat = 0; lat < 6 && !found; lat++) begin
        bit ok;
        ok = 1;
        for (int k = 20; k < 500; k++) begin
          logic [9:0] w;
          for (int b = 0; b < 10; b++) w[b] = stream[off + 10 * k + b];
          if (k - lat < 0 || w != sent[k - lat]) ok = 0;
        end
        if (ok) begin
          found = 1;
          // count every word compared in the matching alignment
          checks += 480;
          $display("aligned at bit offset %0d, word lag %0d", off, lat);
          checks++;
          // first bit leaves 2..5 fast cycles after the pixel edge that took the word
          if (off / 2 + 5 * lat < 2 || off / 2 + 5 * lat > 5) begin failures++; $display("latency out of range"); end
        end
      end
    checks++;
    if (!found) begin failures++; $display("stream does not match the words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk_pix);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
