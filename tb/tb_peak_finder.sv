// tb_peak_finder: random and sine-like sample streams against a reference
// window model. Small random values make flat tops frequent, so both the
// strict-maximum and the two-sample flat-top rule are exercised; each must
// fire at least once. peak_valid must come exactly one clock after the
// sample that completes the window.
module tb_peak_finder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sv, pv;
  logic [11:0] s, pm;
  int checks = 0, failures = 0, n_strict = 0, n_flat = 0;
  logic [11:0] w [4];
  int nin = 0;
  logic exp_pv; logic [11:0] exp_pm;

  peak_finder dut (.clk, .rst, .sample_valid(sv), .sample(s), .peak_valid(pv), .peak_mag(pm));

  task automatic push(input logic [11:0] v);
    @(negedge clk);
    sv = 1; s = v;
    // reference: judge w[1] with w[0] = v as the following sample
    exp_pv = 0;
    if (nin >= 3) begin
      if (w[1] > w[2] && w[1] > v) begin exp_pv = 1; n_strict++; end
      else if (w[1] == w[2] && w[1] > w[3] && w[1] > v) begin exp_pv = 1; n_flat++; end
    end
    exp_pm = w[1];
    @(negedge clk);
    sv = 0;
    checks++;
    if (pv !== exp_pv || (exp_pv && pm !== exp_pm)) begin
      failures++;
      $display("sample %0d: pv=%b pm=%0d expected %b %0d", nin, pv, pm, exp_pv, exp_pm);
    end
    w[3] = w[2]; w[2] = w[1]; w[1] = v;
    nin++;
    // gap of a few idle clocks: no strobe may appear
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk); checks++;
      if (pv) begin failures++; $display("spurious peak"); end
    end
  endtask

  // 8 samples per period with samples at +-22.5 deg of the crest: flat tops
  int sine8 [8] = '{2048, 2831, 3154, 3154, 2831, 2048, 1265, 942};

  initial begin
    sv = 0; s = 0;
    w[1] = 0; w[2] = 0; w[3] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) push(12'($urandom_range(0, 5)));
    for (int i = 0; i < 200; i++) push(12'(sine8[i % 8] + ((i / 8) % 2 ? 300 : 0)));
    for (int i = 0; i < 500; i++) push(12'($urandom));
    checks++;
    if (n_strict == 0 || n_flat == 0) begin failures++; $display("rule not exercised"); end
    $display("strict peaks %0d flat-top peaks %0d", n_strict, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
