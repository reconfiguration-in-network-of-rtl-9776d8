// window_gen: streaming n x n window generator for a raster pixel stream.
//
// Pixels arrive in raster order and cannot be stalled. The module keeps the
// last (WIN-1) rows in a line buffer (one memory word per column holding that
// column's WIN-1 older pixels) plus a WIN x WIN register window, i.e. about
// (WIN-1)*width + WIN pixels, and presents for every pixel of the frame the
// window centred on it. The centre of the window lags the incoming pixel by
// HALF rows and HALF pixels (HALF = (WIN-1)/2). After the last pixel of a frame
// the module keeps stepping on its own for those HALF*width+HALF cycles (zeros
// are shifted in), so every frame produces exactly width*height outputs; the
// source must leave at least that many idle cycles (plus 3) before the next
// start of frame. Windows that reach outside the image are marked with
// out_border and their off-image entries are meaningless; the centre pixel is
// always correct.
//
// Interface: in_valid/in_sof/in_pix, with in_sof on the first pixel of a frame;
// img_w/img_h are sampled at that pixel. out_win[i][j] is row i (0 = top),
// column j (0 = left); out_win[HALF][HALF] is the centre. Outputs appear two
// clock cycles after the input step that completes the window.
//
// The line-buffer size and the 3x3 default window follow the restoration
// window of the camera pipeline; the flush after the frame, the border flag
// and the packed column memory are this design's choices.
module window_gen
  import tracker_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,  // widest row the line buffer holds
  parameter int unsigned WIN   = 3      // window size, odd, >= 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  dim_t   img_w,
  input  dim_t   img_h,
  input  logic   in_valid,
  input  logic   in_sof,
  input  pix_t   in_pix,
  output logic   out_valid,
  output logic   out_sof,
  output logic   out_eof,
  output logic   out_border,
  output pix_t [WIN-1:0][WIN-1:0] out_win,
  output logic   busy
);

  localparam int unsigned HALF = (WIN - 1) / 2;
  localparam int unsigned AW   = (MAX_W > 1) ? $clog2(MAX_W) : 1;
  localparam int unsigned LBW  = (WIN - 1) * PIX_W;

  typedef logic [2*DIM_W-1:0] idx_t;

  // Line buffer: word c holds, for column c, rows r-1 .. r-WIN+1 (slot 0 = r-1).
  logic [LBW-1:0] lbuf [MAX_W];

  // Frame state
  dim_t w_q, h_q;
  idx_t delay_q;       // HALF*w + HALF
  idx_t total_q;       // w*h
  logic receiving, flushing;
  idx_t flush_cnt;
  dim_t pc;            // column of the next push
  idx_t k;             // pushes so far in this frame

  logic start;
  logic accept;
  logic step;
  pix_t push_pix;
  dim_t push_col;
  idx_t push_k;
  logic last_in;

  assign start    = in_valid && in_sof;
  assign accept   = in_valid && (in_sof || receiving);
  assign step     = accept || flushing;
  assign push_pix = flushing ? '0 : in_pix;
  assign push_col = start ? '0 : pc;
  assign push_k   = start ? '0 : k;
  assign last_in  = accept && (push_k == (start ? idx_t'(img_w) * idx_t'(img_h) : total_q) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q       <= '0;
      h_q       <= '0;
      delay_q   <= '0;
      total_q   <= '0;
      receiving <= 1'b0;
      flushing  <= 1'b0;
      flush_cnt <= '0;
      pc        <= '0;
      k         <= '0;
    end else begin
      if (start) begin
        w_q     <= img_w;
        h_q     <= img_h;
        delay_q <= idx_t'(HALF) * idx_t'(img_w) + idx_t'(HALF);
        total_q <= idx_t'(img_w) * idx_t'(img_h);
      end
      if (step) begin
        k  <= push_k + 1'b1;
        pc <= (push_col == (start ? img_w : w_q) - 1'b1) ? '0 : push_col + 1'b1;
      end
      if (last_in) begin
        receiving <= 1'b0;
        flushing  <= 1'b1;
        flush_cnt <= start ? idx_t'(HALF) * idx_t'(img_w) + idx_t'(HALF) : delay_q;
      end else if (start) begin
        receiving <= 1'b1;
      end
      if (flushing) begin
        flush_cnt <= flush_cnt - 1'b1;
        if (flush_cnt == idx_t'(1)) flushing <= 1'b0;
      end
    end
  end

  // Stage 0: read the column's older rows.
  logic [LBW-1:0] rd_q;
  pix_t           pix_d;
  logic [AW-1:0]  col_d;
  logic           s0_v;
  idx_t           k_d;

  always_ff @(posedge clk) begin
    if (step) rd_q <= lbuf[AW'(push_col)];
    pix_d <= push_pix;
    col_d <= AW'(push_col);
    k_d   <= push_k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s0_v <= 1'b0;
    else        s0_v <= step;
  end

  // Stage 1: write the updated column back and shift it into the window.
  pix_t [WIN-1:0] col_vec;  // col_vec[0] = newest row
  always_comb begin
    col_vec[0] = pix_d;
    for (int unsigned s = 1; s < WIN; s++) col_vec[s] = rd_q[(s-1)*PIX_W +: PIX_W];
  end

  always_ff @(posedge clk) begin
    if (s0_v) begin
      lbuf[col_d] <= {rd_q[LBW-PIX_W-1:0], pix_d};
    end
  end

  pix_t [WIN-1:0][WIN-1:0] win_q;
  always_ff @(posedge clk) begin
    if (s0_v) begin
      for (int unsigned i = 0; i < WIN; i++) begin
        for (int unsigned j = 0; j < WIN - 1; j++) win_q[i][j] <= win_q[i][j+1];
        win_q[i][WIN-1] <= col_vec[WIN-1-i];
      end
    end
  end

  // Output position counters: coordinates of the next centre to be emitted.
  dim_t orow, ocol;
  logic o_v, o_sof, o_eof, o_border;
  logic emit;
  assign emit = s0_v && (k_d >= delay_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orow <= '0; ocol <= '0;
      o_v <= 1'b0; o_sof <= 1'b0; o_eof <= 1'b0; o_border <= 1'b0;
    end else begin
      o_v <= emit;
      if (emit) begin
        o_sof    <= (k_d == delay_q);
        o_eof    <= (orow == h_q - 1'b1) && (ocol == w_q - 1'b1);
        o_border <= (orow < dim_t'(HALF)) || (orow >= h_q - dim_t'(HALF)) ||
                    (ocol < dim_t'(HALF)) || (ocol >= w_q - dim_t'(HALF));
        if (ocol == w_q - 1'b1) begin
          ocol <= '0;
          orow <= (orow == h_q - 1'b1) ? '0 : orow + 1'b1;
        end else begin
          ocol <= ocol + 1'b1;
        end
      end
      if (start) begin
        orow <= '0;
        ocol <= '0;
      end
    end
  end

  assign out_valid  = o_v;
  assign out_sof    = o_v && o_sof;
  assign out_eof    = o_v && o_eof;
  assign out_border = o_border;
  assign out_win    = win_q;
  assign busy       = receiving || flushing || s0_v || o_v;

  // Stream rules: a new frame must not start while one is still in flight,
  // and the image must be at least one window wide and high.
  property p_no_overlap;
    @(posedge clk) disable iff (!rst_n) start |-> !receiving && !flushing;
  endproperty
  a_no_overlap: assert property (p_no_overlap)
    else $error("window_gen: start of frame while the previous frame is in flight");

  property p_min_size;
    @(posedge clk) disable iff (!rst_n)
      start |-> (img_w >= dim_t'(WIN)) && (img_h >= dim_t'(WIN)) && (img_w <= dim_t'(MAX_W));
  endproperty
  a_min_size: assert property (p_min_size)
    else $error("window_gen: image size outside WIN..MAX_W");

endmodule
