// video_sig_gen: 1280x720 at 60 Hz video timing (74.25 MHz pixel clock).
// Two counters walk the 1650 x 750 raster. hcount/vcount give the pixel
// position; `active` is high inside the 1280 x 720 picture; hsync and
// vsync are high (positive polarity) during the sync pulses; `new_frame`
// pulses for one clock at the first blanking pixel after the last visible
// line, and `frame_count` counts frames mod 64. The pixel clock is the one
// the design names; the CEA-861 720p numbers are the standard ones.
// All outputs are registered and update together.
module video_sig_gen #(
  parameter int ACTIVE_H = 1280, parameter int H_FP = 110,
  parameter int H_SYNC   = 40,   parameter int H_BP = 220,
  parameter int ACTIVE_V = 720,  parameter int V_FP = 5,
  parameter int V_SYNC   = 5,    parameter int V_BP = 20
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        active,
  output logic        new_frame,
  output logic [5:0]  frame_count
);
  localparam int H_TOT = ACTIVE_H + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = ACTIVE_V + V_FP + V_SYNC + V_BP;
  logic [10:0] h_n;
  logic [9:0]  v_n;

  always_comb begin
    h_n = (32'(hcount) == H_TOT - 1) ? '0 : hcount + 11'd1;
    v_n = vcount;
    if (32'(hcount) == H_TOT - 1)
      v_n = (32'(vcount) == V_TOT - 1) ? '0 : vcount + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0; vcount <= '0;
      hsync <= 1'b0; vsync <= 1'b0; active <= 1'b1;   // (0,0) is visible
      new_frame <= 1'b0; frame_count <= '0;
    end else begin
      hcount <= h_n;
      vcount <= v_n;
      active <= (32'(h_n) < ACTIVE_H) && (32'(v_n) < ACTIVE_V);
      hsync  <= (32'(h_n) >= ACTIVE_H + H_FP) && (32'(h_n) < ACTIVE_H + H_FP + H_SYNC);
      vsync  <= (32'(v_n) >= ACTIVE_V + V_FP) && (32'(v_n) < ACTIVE_V + V_FP + V_SYNC);
      new_frame <= (32'(h_n) == 0) && (32'(v_n) == ACTIVE_V);
      if ((32'(h_n) == 0) && (32'(v_n) == ACTIVE_V)) frame_count <= frame_count + 6'd1;
    end
  end
endmodule
