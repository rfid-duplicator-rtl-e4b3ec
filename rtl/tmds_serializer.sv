// tmds_serializer: 10:1 serialiser for one TMDS channel, double data rate.
// The 10-bit word, registered on the pixel clock, is sent LSB first as five
// bit pairs on the 5x clock (371.25 MHz for 74.25 MHz pixels); an output
// DDR register then sends pair[0] on the rising and pair[1] on the falling
// edge, giving 742.5 Mbit/s. The two clocks must come from one source with
// aligned edges. To find the pixel boundary the pixel domain toggles a flag
// every pixel clock; the fast domain resynchronises it through two
// flip-flops and restarts its 0..4 slot counter on each change, loading
// the new word three fast cycles after a pixel edge, when it is stable.
// The 5x DDR scheme follows the clock frequencies of the source design;
// the boundary-finding method is this design's choice. The DDR output cell
// and differential pad are outside this module.
// Latency: the first bit of a word leaves three or four fast cycles after
// the pixel edge that registers it.
module tmds_serializer (
  input  logic       clk_pix,
  input  logic       clk_5x,
  input  logic       rst,        // pixel-domain reset
  input  logic [9:0] word,
  output logic [1:0] pair
);
  logic [9:0] word_q;
  logic       tog;
  always_ff @(posedge clk_pix) begin
    if (rst) begin
      tog    <= 1'b0;
      word_q <= '0;
    end else begin
      tog    <= !tog;
      word_q <= word;
    end
  end

  logic [2:0] tog_s;          // two synchroniser stages and one for edge detect
  logic [2:0] slot;
  logic [9:0] sh;
  always_ff @(posedge clk_5x) begin
    tog_s <= {tog_s[1:0], tog};
    if (tog_s[2] != tog_s[1]) begin
      slot <= 3'd1;
      sh   <= word_q;             // stable: updated three fast cycles ago
      pair <= word_q[1:0];
    end else if (slot == 3'd0) begin   // free-running fallback
      slot <= 3'd1;
      sh   <= word_q;
      pair <= word_q[1:0];
    end else begin
      slot <= (slot == 3'd4) ? 3'd0 : slot + 3'd1;
      pair <= sh[2*slot +: 2];
    end
  end
endmodule
