// adaptive_fs_top: adaptive feature-selection stage of a smart camera's
// FPGA image pipeline.
//
// Pixels from the imager arrive at the pixel clock as a stream that cannot be
// stalled. They pass through an optional sharpening (restoration) filter and
// then a KLT feature selector that flags every pixel whose gradient matrix has
// a minimum eigenvalue above a threshold. A counter totals the features of
// each frame. The camera processor, on its own clock, reads that count
// through a small register file and adjusts the threshold (more features than
// wanted: raise it; fewer: lower it), and can switch the restoration filter on
// or off, so that the number of features handed to the tracker stays in a
// target range whatever the lighting, focus or scene.
//
// Clock domains: everything on the processor side (ctrl_regs) runs on cpu_clk;
// the pipeline runs on pix_clk. Configuration and results cross in whole words
// through two cdc_handshake instances. The pixel side keeps the configuration
// it received pending and applies it only while no frame is in flight, so a
// frame is always processed with one threshold, one filter setting and one
// image size, whenever the processor writes.
//
// Stream timing: the output stream (out_valid/out_sof/out_eof, out_pix,
// out_feature) carries every pixel of the frame, out_pix being the restored
// (or unchanged) pixel. Latency is two rows plus ten cycles (2*width + 10) for
// a stream without gaps. After the last input pixel of a frame the stage needs
// 2*width + 12 idle pixel-clock cycles before the next start of frame.
//
// What follows the camera design: filter, then feature selection, threshold
// in a processor-written register, feature count read by the processor,
// restoration switchable at run time. What is this design's own: the
// processor bus and register map, the clock-domain crossing, the
// apply-between-frames rule and the stream signalling.
module adaptive_fs_top
  import tracker_pkg::*;
#(
  parameter int unsigned MAX_W = 1280
) (
  // pixel clock domain
  input  logic        pix_clk,
  input  logic        pix_rst_n,
  input  logic        in_valid,
  input  logic        in_sof,
  input  pix_t        in_pix,
  output logic        out_valid,
  output logic        out_sof,
  output logic        out_eof,
  output pix_t        out_pix,
  output logic        out_feature,
  // processor clock domain
  input  logic        cpu_clk,
  input  logic        cpu_rst_n,
  input  logic [7:0]  cpu_addr,
  input  logic        cpu_wr,
  input  logic [31:0] cpu_wdata,
  input  logic        cpu_rd,
  output logic [31:0] cpu_rdata,
  output logic        cpu_rvalid
);

  // ---------------- processor side ----------------
  cfg_t    cfg_cpu;
  logic    cfg_send, cfg_ready;
  logic    res_valid_cpu;
  result_t res_cpu;

  ctrl_regs u_regs (
    .clk(cpu_clk), .rst_n(cpu_rst_n),
    .addr(cpu_addr), .wr_en(cpu_wr), .wr_data(cpu_wdata),
    .rd_en(cpu_rd), .rd_data(cpu_rdata), .rd_valid(cpu_rvalid),
    .cfg(cfg_cpu), .cfg_send, .cfg_ready,
    .res_valid(res_valid_cpu), .res_data(res_cpu)
  );

  // ---------------- crossings ----------------
  logic cfg_arrived;
  cfg_t cfg_rx;

  cdc_handshake #(.W($bits(cfg_t))) u_cfg_cdc (
    .src_clk(cpu_clk), .src_rst_n(cpu_rst_n),
    .src_send(cfg_send), .src_data(cfg_cpu), .src_ready(cfg_ready),
    .dst_clk(pix_clk), .dst_rst_n(pix_rst_n),
    .dst_valid(cfg_arrived), .dst_data(cfg_rx)
  );

  logic    res_send, res_ready, res_dirty;
  result_t res_pix;

  cdc_handshake #(.W($bits(result_t))) u_res_cdc (
    .src_clk(pix_clk), .src_rst_n(pix_rst_n),
    .src_send(res_send), .src_data(res_pix), .src_ready(res_ready),
    .dst_clk(cpu_clk), .dst_rst_n(cpu_rst_n),
    .dst_valid(res_valid_cpu), .dst_data(res_cpu)
  );

  // ---------------- pixel side: configuration ----------------
  cfg_t cfg_pending, cfg_active;
  logic in_frame;
  logic start;
  logic fs_eof;

  assign start = in_valid && in_sof;

  always_ff @(posedge pix_clk or negedge pix_rst_n) begin
    if (!pix_rst_n) begin
      cfg_pending <= CFG_RESET;
      cfg_active  <= CFG_RESET;
      in_frame    <= 1'b0;
    end else begin
      if (cfg_arrived) cfg_pending <= cfg_rx;
      if (!in_frame && !start) cfg_active <= cfg_pending;
      if (start)       in_frame <= 1'b1;
      else if (fs_eof) in_frame <= 1'b0;
    end
  end

  // ---------------- pixel side: pipeline ----------------
  logic r_valid, r_sof;
  pix_t r_pix;

  image_restoration #(.MAX_W(MAX_W)) u_restore (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .img_w(cfg_active.width), .img_h(cfg_active.height),
    .enable(cfg_active.restore_en),
    .in_valid, .in_sof, .in_pix,
    .out_valid(r_valid), .out_sof(r_sof), .out_eof(), .out_pix(r_pix),
    .busy()
  );

  logic fs_valid, fs_sof, fs_feature;
  pix_t fs_pix;

  feature_select #(.MAX_W(MAX_W)) u_fsel (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .img_w(cfg_active.width), .img_h(cfg_active.height),
    .thresh(cfg_active.thresh),
    .in_valid(r_valid), .in_sof(r_sof), .in_pix(r_pix),
    .out_valid(fs_valid), .out_sof(fs_sof), .out_eof(fs_eof),
    .out_pix(fs_pix), .out_feature(fs_feature),
    .busy()
  );

  logic      cnt_valid;
  count_t    cnt;
  frame_no_t cnt_frame;

  feature_counter u_count (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .in_valid(fs_valid), .in_sof(fs_sof), .in_eof(fs_eof), .in_feature(fs_feature),
    .count_valid(cnt_valid), .count(cnt), .frame_no(cnt_frame)
  );

  // Latest result waits here until the crossing is free (newest wins).
  always_ff @(posedge pix_clk or negedge pix_rst_n) begin
    if (!pix_rst_n) begin
      res_pix   <= '0;
      res_dirty <= 1'b0;
    end else begin
      if (cnt_valid) begin
        res_pix   <= '{count: cnt, frame_no: cnt_frame};
        res_dirty <= 1'b1;
      end else if (res_send) begin
        res_dirty <= 1'b0;
      end
    end
  end

  assign res_send = res_dirty && res_ready && !cnt_valid;

  assign out_valid   = fs_valid;
  assign out_sof     = fs_sof;
  assign out_eof     = fs_eof;
  assign out_pix     = fs_pix;
  assign out_feature = fs_feature;

  property p_no_start_in_frame;
    @(posedge pix_clk) disable iff (!pix_rst_n) start |-> !in_frame;
  endproperty
  a_no_start_in_frame: assert property (p_no_start_in_frame)
    else $error("adaptive_fs_top: start of frame before the previous frame left the pipeline");

endmodule
