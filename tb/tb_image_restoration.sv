// tb_image_restoration: streams frames (random noise, a textured scene and a
// blurred scene) through the restoration stage with the filter enabled and
// disabled and compares every output pixel with the software reference
// (tb_ref_pkg::restore_ref). Also checks frame markers, the output count and
// the latency of img_w + 4 cycles on a gap-free frame.
module tb_image_restoration;
  import tracker_pkg::*;
  import tb_ref_pkg::*;

  localparam int MAXW = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t img_w, img_h;
  logic enable, in_valid, in_sof;
  pix_t in_pix;
  logic out_valid, out_sof, out_eof, busy;
  pix_t out_pix;

  image_restoration #(.MAX_W(MAXW)) dut (
    .clk, .rst_n, .img_w, .img_h, .enable, .in_valid, .in_sof, .in_pix,
    .out_valid, .out_sof, .out_eof, .out_pix, .busy
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  img_t img, expect_img;
  int cur_w, cur_h, idx = 0, frames_out = 0, changed = 0;
  longint sof_cycle;
  bit gapless;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    check(out_pix == expect_img[idx], $sformatf("pixel %0d got %0d exp %0d", idx, out_pix, expect_img[idx]));
    check(out_sof == (idx == 0), "sof");
    check(out_eof == (idx == cur_w*cur_h - 1), "eof");
    if (idx == 0 && gapless) check(cyc - sof_cycle == longint'(cur_w + 4), $sformatf("latency %0d", cyc - sof_cycle));
    if (expect_img[idx] != img[idx]) changed++;
    if (idx == cur_w*cur_h - 1) begin idx = 0; frames_out++; end
    else idx++;
  end

  task automatic send_frame(img_t im, int w, int h, bit en, bit gaps);
    cur_w = w; cur_h = h; gapless = !gaps;
    img = im;
    expect_img = restore_ref(im, w, h, en);
    img_w = dim_t'(w); img_h = dim_t'(h); enable = en;
    for (int i = 0; i < w*h; i++) begin
      while (gaps && ($urandom % 3 == 0)) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_sof = (i == 0); in_pix = im[i];
      if (i == 0) sof_cycle = cyc + 1;
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (w + 8) @(negedge clk);
  endtask

  initial begin
    img_t im;
    int nframes = 0;
    in_valid = 0; in_sof = 0; in_pix = 0; enable = 0; img_w = 8; img_h = 8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    im = new[20*12]; foreach (im[i]) im[i] = byte'($urandom);
    send_frame(im, 20, 12, 1, 0); nframes++;
    send_frame(im, 20, 12, 0, 1); nframes++;
    im = make_scene(40, 30, 3, 100, 0);
    send_frame(im, 40, 30, 1, 1); nframes++;
    im = make_scene(33, 17, 5, 60, 1);
    send_frame(im, 33, 17, 1, 0); nframes++;
    im = new[3*3]; foreach (im[i]) im[i] = byte'($urandom);
    send_frame(im, 3, 3, 1, 0); nframes++;
    repeat (10) @(negedge clk);
    check(frames_out == nframes, "frame count");
    check(changed > 100, $sformatf("filter changed %0d pixels", changed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
