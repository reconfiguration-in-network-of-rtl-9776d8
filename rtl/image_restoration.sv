// image_restoration: single-step 3x3 restoration (sharpening) filter placed in
// the pixel stream.
//
// The iterative restoration is unrolled into one evaluation per pixel of a
// high-pass kernel with weight 2 on the centre pixel and -1/8 on each of its
// eight neighbours (the weights sum to one, so flat areas keep their
// intensity). The sum is formed exactly in integers as 16*c - sum(neighbours),
// divided by 8 with rounding to nearest (halves up) and clamped to 0..255.
// Pixels on the image border, whose window is incomplete, and all pixels while
// `enable` is low, pass through unchanged, so the stream timing is the same
// with the filter on or off and the filter can be switched between frames.
//
// Interface: raster stream in (in_valid/in_sof/in_pix), same stream out with
// out_eof marking the last pixel. Latency is one row plus four cycles
// (img_w + 4); the module adds img_w + 1 idle cycles of flush after each frame
// (see window_gen). img_w/img_h and enable must be stable during a frame.
//
// The kernel weights and the 3x3 window follow the camera design; rounding,
// clamping and the border pass-through are this design's choices.
module image_restoration
  import tracker_pkg::*;
#(
  parameter int unsigned MAX_W = 1280
) (
  input  logic clk,
  input  logic rst_n,
  input  dim_t img_w,
  input  dim_t img_h,
  input  logic enable,
  input  logic in_valid,
  input  logic in_sof,
  input  pix_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output logic out_eof,
  output pix_t out_pix,
  output logic busy
);

  logic w_valid, w_sof, w_eof, w_border, w_busy;
  pix_t [2:0][2:0] win;

  window_gen #(.MAX_W(MAX_W), .WIN(3)) u_win (
    .clk, .rst_n, .img_w, .img_h,
    .in_valid, .in_sof, .in_pix,
    .out_valid(w_valid), .out_sof(w_sof), .out_eof(w_eof),
    .out_border(w_border), .out_win(win), .busy(w_busy)
  );

  // 16*c - sum of 8 neighbours: range -2040 .. 4080, 14 bits signed.
  logic signed [13:0] acc;
  logic signed [13:0] rounded;
  pix_t               filtered;

  always_comb begin
    logic [10:0] nsum;
    nsum = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        if (!(i == 1 && j == 1)) nsum += 11'(win[i][j]);
    acc     = $signed({2'b00, win[1][1], 4'b0000}) - $signed({3'b000, nsum});
    rounded = (acc + 14'sd4) >>> 3;
    if (rounded < 0)             filtered = '0;
    else if (rounded > 14'sd255) filtered = '1;
    else                         filtered = rounded[PIX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= w_valid;
      out_sof   <= w_sof;
      out_eof   <= w_eof;
      if (w_valid) out_pix <= (enable && !w_border) ? filtered : win[1][1];
    end
  end

  assign busy = w_busy || out_valid;

endmodule
