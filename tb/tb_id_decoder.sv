// tb_id_decoder: drives the decoder with peak/flip strobes of whole card
// frames (30 zeros, the 20 constant bits, 32 user bits, filler), 32 peaks
// per bit, a flip on the first peak of every bit that differs from the
// one before. Sequence: a frame with a wrong constant field (must be
// rejected), a frame with a stray flip inside a bit (must be rejected),
// then a good frame that must come out complete on id_valid exactly at the
// first peak after its last bit; it is discarded, a second ID is captured
// and stored. Every start, reject, discard and store is counted.
module tb_id_decoder;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pv, flip, store, discard, id_valid, sp, rp;
  id_t  id_data;
  int checks = 0, failures = 0, n_start = 0, n_reject = 0;
  logic prev_bit;

  id_decoder dut (.clk, .rst, .peak_valid(pv), .bit_flip(flip), .store, .discard,
                  .id_valid, .id_data, .start_pulse(sp), .reject_pulse(rp));

  always @(posedge clk) begin
    if (sp) n_start++;
    if (rp) n_reject++;
  end

  function automatic id_t make_id(logic [SIG_BITS-1:0] sig, logic [31:0] user);
    id_t f;
    logic [ID_BITS-USER_POS-USER_BITS-1:0] fill;
    for (int i = 0; i < $bits(fill); i++) fill[i] = (i % 6 == 0) ? 1'b1 : 1'($urandom);
    f = {{LEAD_ZEROS{1'b0}}, sig, user, fill};
    return f;
  endfunction

  task automatic peak(input logic f);
    @(negedge clk); pv = 1; flip = f;
    @(negedge clk); pv = 0; flip = 0;
  endtask

  // send one frame; stray >= 0 inserts a false flip at that peak index
  task automatic send(input id_t f, input int stray);
    for (int b = 0; b < ID_BITS; b++) begin
      logic bitv;
      bitv = f[ID_BITS-1-b];
      for (int p = 0; p < PEAKS_PER_BIT; p++)
        peak((p == 0 && bitv != prev_bit) || (b * PEAKS_PER_BIT + p == stray));
      prev_bit = bitv;
    end
  endtask

  task automatic check_held(input id_t f, input string what);
    // the first peak after the frame completes it
    peak(f[ID_BITS-1] != prev_bit);
    @(negedge clk);
    checks++;
    if (!id_valid || id_data !== f) begin
      failures++; $display("%s: valid=%b data mismatch", what, id_valid);
    end
  endtask

  initial begin
    id_t good, bad, second;
    int rej0;
    pv = 0; flip = 0; store = 0; discard = 0; prev_bit = 0;
    good   = make_id(MIT_SIG, 32'hDEAD_BEEF);
    second = make_id(MIT_SIG, 32'h1234_5678);
    bad    = make_id(MIT_SIG ^ 20'h00100, 32'hCAFE_F00D);
    repeat (3) @(posedge clk);
    rst = 0;
    // leading frames bring the decoder into lock
    send(bad, -1);
    send(bad, -1);
    checks++;
    if (id_valid || n_reject == 0) begin failures++; $display("bad signature not rejected"); end
    rej0 = n_reject;
    send(good, LEAD_ZEROS * PEAKS_PER_BIT + 70 * PEAKS_PER_BIT + 9);
    checks++;
    if (id_valid || n_reject != rej0 + 1) begin failures++; $display("stray flip not rejected"); end
    send(good, -1);
    check_held(good, "first capture");
    // held while the card keeps sending
    for (int i = 0; i < 100; i++) peak(1'b0);
    prev_bit = 0;   // the zeros continue
    checks++;
    if (!id_valid || id_data !== good) begin failures++; $display("not held"); end
    @(negedge clk); discard = 1; @(negedge clk); discard = 0;
    checks++;
    if (id_valid) begin failures++; $display("discard ignored"); end
    for (int i = 0; i < PEAKS_PER_BIT * (LEAD_ZEROS - 3) - 100; i++) peak(1'b0);
    for (int i = 0; i < PEAKS_PER_BIT * 3; i++) peak(1'b0);
    send(second, -1);
    check_held(second, "second capture");
    @(negedge clk); store = 1; @(negedge clk); store = 0;
    checks++;
    if (id_valid) begin failures++; $display("store did not release"); end
    checks++;
    if (n_start < 3) begin failures++; $display("starts %0d", n_start); end
    $display("starts %0d rejects %0d", n_start, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
