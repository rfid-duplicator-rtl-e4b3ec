// tmds_encoder: DVI/HDMI TMDS 8b/10b encoder for one colour channel.
// During active video the byte is first transition-minimised (XOR or XNOR
// chain, whichever gives fewer transitions, flagged in bit 8) and then
// DC-balanced: a running disparity decides whether the low 8 bits are sent
// inverted (flagged in bit 9). During blanking one of the four fixed
// control words for ctrl[1:0] is sent and the disparity is cleared.
// This is the standard DVI 1.0 algorithm. One clock of latency; `tmds` is
// registered.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic [1:0] ctrl,
  input  logic       active,
  output logic [9:0] tmds
);
  logic [8:0]        qm;
  logic [7:0]        chain;
  logic              use_xnor;
  logic [3:0]        n1_d, n1_qm, n0_qm;
  logic signed [4:0] cnt, cnt_n;
  logic [9:0]        word;

  // transition-minimising XOR / XNOR chain
  function automatic logic [7:0] min_trans(logic [7:0] d, logic xn);
    logic [7:0] q;
    q[0] = d[0];
    for (int i = 1; i < 8; i++) q[i] = xn ? ~(q[i-1] ^ d[i]) : (q[i-1] ^ d[i]);
    return q;
  endfunction

  always_comb begin
    n1_d = 4'($countones(data));
    use_xnor = (n1_d > 4) || (n1_d == 4 && !data[0]);
    chain    = min_trans(data, use_xnor);
    qm = {!use_xnor, chain};
    n1_qm = 4'($countones(qm[7:0]));
    n0_qm = 4'd8 - n1_qm;
    if (cnt == 0 || n1_qm == n0_qm) begin
      word  = {~qm[8], qm[8], qm[8] ? qm[7:0] : ~qm[7:0]};
      cnt_n = qm[8] ? cnt + 5'(n1_qm) - 5'(n0_qm) : cnt + 5'(n0_qm) - 5'(n1_qm);
    end else if ((cnt > 0 && n1_qm > n0_qm) || (cnt < 0 && n0_qm > n1_qm)) begin
      word  = {1'b1, qm[8], ~qm[7:0]};
      cnt_n = cnt + 5'({qm[8], 1'b0}) + 5'(n0_qm) - 5'(n1_qm);
    end else begin
      word  = {1'b0, qm[8], qm[7:0]};
      cnt_n = cnt - 5'({~qm[8], 1'b0}) + 5'(n1_qm) - 5'(n0_qm);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tmds <= '0;
      cnt  <= '0;
    end else if (active) begin
      tmds <= word;
      cnt  <= cnt_n;
    end else begin
      cnt <= '0;
      unique case (ctrl)
        2'b00: tmds <= 10'b1101010100;
        2'b01: tmds <= 10'b0010101011;
        2'b10: tmds <= 10'b0101010100;
        2'b11: tmds <= 10'b1010101011;
      endcase
    end
  end
endmodule
