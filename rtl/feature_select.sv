// feature_select: per-pixel feature test of the KLT feature selector with a
// threshold that can be changed at run time.
//
// For every pixel a 3x3 window is formed (two rows of line buffer). Inside
// the window the four 2x2 cells give intensity gradients
//   gx = (right column sum - left column sum), gy = (bottom row sum - top row sum)
// of each cell. Their products are summed over the four cells into the
// gradient matrix Z = [Sxx Sxy; Sxy Syy] / 16 (the 1/16 makes each entry the
// mean over the cells of the squared half-difference, so Z stays within the
// 16-bit threshold range). A pixel is a feature when the smaller eigenvalue of
// Z exceeds the threshold T. No square root is taken: lambda_min(Z) > T holds
// exactly when Z - T*I is positive definite, i.e. when
//   Sxx - 16T > 0  and  (Sxx - 16T)(Syy - 16T) > Sxy^2.
// Border pixels are never features.
//
// Interface: raster stream in; out_pix is the input pixel delayed, out_feature
// flags it. Latency is one row plus six cycles (img_w + 6), followed by
// img_w + 1 flush cycles per frame (see window_gen). thresh, img_w and img_h
// must be stable during a frame.
//
// The steps (gradients, summed gradient matrix, minimum eigenvalue against a
// threshold) and the 3x3 window with two stored rows follow the camera design.
// Plain differences instead of Gaussian-derivative kernels, the 2x2-cell
// summation and the 1/16 scaling of Z are this design's choices.
module feature_select
  import tracker_pkg::*;
#(
  parameter int unsigned MAX_W = 1280
) (
  input  logic    clk,
  input  logic    rst_n,
  input  dim_t    img_w,
  input  dim_t    img_h,
  input  thresh_t thresh,
  input  logic    in_valid,
  input  logic    in_sof,
  input  pix_t    in_pix,
  output logic    out_valid,
  output logic    out_sof,
  output logic    out_eof,
  output pix_t    out_pix,
  output logic    out_feature,
  output logic    busy
);

  logic w_valid, w_sof, w_eof, w_border, w_busy;
  pix_t [2:0][2:0] win;

  window_gen #(.MAX_W(MAX_W), .WIN(3)) u_win (
    .clk, .rst_n, .img_w, .img_h,
    .in_valid, .in_sof, .in_pix,
    .out_valid(w_valid), .out_sof(w_sof), .out_eof(w_eof),
    .out_border(w_border), .out_win(win), .busy(w_busy)
  );

  typedef logic signed [9:0]  grad_t;   // -510 .. 510
  typedef logic signed [21:0] sum_t;    // 4 * 510^2 = 1,040,400 fits in 21 bits + sign
  typedef logic signed [47:0] wide_t;

  // Stage A: gradients of the four 2x2 cells.
  grad_t [3:0] gx_a, gy_a;
  logic a_v, a_sof, a_eof, a_border;
  pix_t a_pix;

  always_ff @(posedge clk) begin
    if (w_valid) begin
      for (int a = 0; a < 2; a++) begin
        for (int b = 0; b < 2; b++) begin
          gx_a[2*a+b] <= grad_t'({2'b00, win[a][b+1]}) + grad_t'({2'b00, win[a+1][b+1]})
                       - grad_t'({2'b00, win[a][b]})   - grad_t'({2'b00, win[a+1][b]});
          gy_a[2*a+b] <= grad_t'({2'b00, win[a+1][b]}) + grad_t'({2'b00, win[a+1][b+1]})
                       - grad_t'({2'b00, win[a][b]})   - grad_t'({2'b00, win[a][b+1]});
        end
      end
      a_pix    <= win[1][1];
      a_border <= w_border;
    end
  end

  // Stage B: gradient matrix sums.
  sum_t sxx_b, sxy_b, syy_b;
  logic b_v, b_sof, b_eof, b_border;
  pix_t b_pix;

  always_ff @(posedge clk) begin
    if (a_v) begin
      sum_t sxx, sxy, syy;
      sxx = '0; sxy = '0; syy = '0;
      for (int c = 0; c < 4; c++) begin
        sxx += sum_t'(gx_a[c] * gx_a[c]);
        sxy += sum_t'(gx_a[c] * gy_a[c]);
        syy += sum_t'(gy_a[c] * gy_a[c]);
      end
      sxx_b    <= sxx;
      sxy_b    <= sxy;
      syy_b    <= syy;
      b_pix    <= a_pix;
      b_border <= a_border;
    end
  end

  // Stage C: minimum-eigenvalue test against the threshold.
  logic  is_feature;
  wide_t dxx, dyy;
  always_comb begin
    dxx = wide_t'(sxx_b) - wide_t'({thresh, 4'b0000});
    dyy = wide_t'(syy_b) - wide_t'({thresh, 4'b0000});
    is_feature = !b_border && (dxx > 0) && (dxx * dyy > wide_t'(sxy_b) * wide_t'(sxy_b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v <= 1'b0; a_sof <= 1'b0; a_eof <= 1'b0;
      b_v <= 1'b0; b_sof <= 1'b0; b_eof <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eof <= 1'b0;
      out_pix <= '0; out_feature <= 1'b0;
    end else begin
      a_v <= w_valid; a_sof <= w_sof; a_eof <= w_eof;
      b_v <= a_v;     b_sof <= a_sof; b_eof <= a_eof;
      out_valid <= b_v; out_sof <= b_sof; out_eof <= b_eof;
      if (b_v) begin
        out_pix     <= b_pix;
        out_feature <= is_feature;
      end
    end
  end

  assign busy = w_busy || a_v || b_v || out_valid;

endmodule
