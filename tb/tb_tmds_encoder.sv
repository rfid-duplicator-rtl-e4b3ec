// tb_tmds_encoder: encodes random bytes in random-length active runs
// separated by blanking, and decodes each word with the DVI decoder rule
// (undo the inversion flagged by bit 9, then the XOR/XNOR chain flagged by
// bit 8). Every byte must come back one clock later; blanking must give
// the four control words; the running disparity of the active stream must
// stay bounded (|sum of ones - zeros| <= 20 over each run).
module tb_tmds_encoder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] d; logic [1:0] c; logic act;
  logic [9:0] q;
  int checks = 0, failures = 0, disp = 0, n_inv = 0, n_xnor = 0;

  tmds_encoder dut (.clk, .rst, .data(d), .ctrl(c), .active(act), .tmds(q));

  function automatic logic [7:0] decode(logic [9:0] w);
    logic [7:0] x, o;
    x = w[9] ? ~w[7:0] : w[7:0];
    o[0] = x[0];
    for (int i = 1; i < 8; i++) o[i] = w[8] ? (x[i] ^ x[i-1]) : ~(x[i] ^ x[i-1]);
    return o;
  endfunction

  initial begin
    logic [7:0] pd; logic [1:0] pc; logic pa;
    logic [9:0] ctl [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};
    d = 0; c = 0; act = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int run = 0; run < 200; run++) begin
      int len;
      len = $urandom_range(1, 60);
      disp = 0;
      for (int i = 0; i < len + 4; i++) begin
        act = (i < len);
        d = ($urandom_range(0, 3) == 0) ? 8'(run) : 8'($urandom);
        c = 2'($urandom);
        pd = d; pc = c; pa = act;
        @(negedge clk);
        checks++;
        if (pa) begin
          if (decode(q) !== pd) begin failures++; $display("data %h word %b", pd, q); end
          disp += 2 * $countones(q) - 10;
          if (q[9]) n_inv++;
          if (!q[8]) n_xnor++;
          checks++;
          if (disp > 20 || disp < -20) begin failures++; $display("disparity %0d", disp); end
        end else begin
          if (q !== ctl[pc]) begin failures++; $display("ctrl %0d word %b", pc, q); end
        end
      end
    end
    checks++;
    if (n_inv == 0 || n_xnor == 0) begin failures++; $display("branch not used"); end
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
