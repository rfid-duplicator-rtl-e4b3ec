// tb_id_memory: random writes to the eight slots against a reference copy.
// After every write the selected read port, all eight user codes (bits
// 173..142 of each ID) and the valid flags are compared; slots start empty.
module tb_id_memory;
  import rfid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we;
  logic [2:0] waddr, raddr;
  id_t wdata, rdata;
  user_code_t codes [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] valid;
  id_t ref_mem [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] ref_valid;
  int checks = 0, failures = 0;

  id_memory dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata, .user_codes(codes),
                 .slot_valid(valid));

  function automatic id_t rand_id();
    id_t v;
    for (int i = 0; i < ID_BITS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0; ref_valid = '0;
    for (int i = 0; i < NUM_SLOTS; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (valid !== 8'h00) begin failures++; $display("not empty after reset"); end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      waddr = 3'($urandom); wdata = rand_id();
      @(negedge clk);
      if (we) begin ref_mem[waddr] = wdata; ref_valid[waddr] = 1'b1; end
      we = 0;
      for (int r = 0; r < NUM_SLOTS; r++) begin
        raddr = 3'(r);
        #1;
        checks++;
        if (rdata !== ref_mem[r] || codes[r] !== ref_mem[r][173:142]) begin
          failures++; $display("slot %0d mismatch", r);
        end
      end
      checks++;
      if (valid !== ref_valid) begin failures++; $display("valid %b vs %b", valid, ref_valid); end
    end
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
