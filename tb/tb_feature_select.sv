// tb_feature_select: streams textured, noisy, bright, dark and blurred frames
// through the feature selector at several thresholds and compares every
// output (pixel and feature flag) with the software reference, which computes
// the minimum eigenvalue with a square root in real arithmetic
// (tb_ref_pkg::feature_ref). Also checks that a higher threshold never selects
// more features, frame markers, and the latency of img_w + 6 cycles.
module tb_feature_select;
  import tracker_pkg::*;
  import tb_ref_pkg::*;

  localparam int MAXW = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t    img_w, img_h;
  thresh_t thresh;
  logic    in_valid, in_sof;
  pix_t    in_pix;
  logic    out_valid, out_sof, out_eof, out_feature, busy;
  pix_t    out_pix;

  feature_select #(.MAX_W(MAXW)) dut (
    .clk, .rst_n, .img_w, .img_h, .thresh, .in_valid, .in_sof, .in_pix,
    .out_valid, .out_sof, .out_eof, .out_pix, .out_feature, .busy
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  img_t   img;
  flags_t expect_f;
  int cur_w, cur_h, idx = 0, frames_out = 0, feats = 0, last_count = 0;
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
    check(out_pix == img[idx], $sformatf("pixel %0d", idx));
    check(out_feature == expect_f[idx],
          $sformatf("feature r%0d c%0d got %0d exp %0d", idx / cur_w, idx % cur_w, out_feature, expect_f[idx]));
    check(out_sof == (idx == 0), "sof");
    check(out_eof == (idx == cur_w*cur_h - 1), "eof");
    if (idx == 0 && gapless) check(cyc - sof_cycle == longint'(cur_w + 6), $sformatf("latency %0d", cyc - sof_cycle));
    feats += out_feature;
    if (idx == cur_w*cur_h - 1) begin idx = 0; frames_out++; last_count = feats; feats = 0; end
    else idx++;
  end

  task automatic send_frame(img_t im, int w, int h, int th, bit gaps);
    cur_w = w; cur_h = h; gapless = !gaps;
    img = im;
    expect_f = feature_ref(im, w, h, th);
    img_w = dim_t'(w); img_h = dim_t'(h); thresh = thresh_t'(th);
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
    int nframes = 0, prev;
    in_valid = 0; in_sof = 0; in_pix = 0; thresh = 0; img_w = 8; img_h = 8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    im = make_scene(48, 32, 1, 100, 0);
    prev = 1 << 30;
    for (int k = 0; k < 5; k++) begin
      int th = (k == 0) ? 0 : 40 << (2*k);   // 0, 160, 640, 2560, 10240
      send_frame(im, 48, 32, th, k[0]); nframes++;
      check(last_count <= prev, $sformatf("monotone in threshold: %0d after %0d", last_count, prev));
      if (k == 1) check(last_count > 0, "features found at threshold 160");
      prev = last_count;
    end
    im = make_scene(40, 24, 2, 160, 0); send_frame(im, 40, 24, 512, 1); nframes++;
    im = make_scene(40, 24, 2, 30, 0);  send_frame(im, 40, 24, 40, 0);  nframes++;
    im = make_scene(40, 24, 2, 100, 1); send_frame(im, 40, 24, 100, 1); nframes++;
    // Isolated dots of value 64 on black: the dot pixel has Z = 1024*I and its
    // four edge neighbours Z = 512*I, so thresholds 1024/1023 and 512/511 sit
    // exactly on and just below the eigenvalues (strict comparison).
    im = new[24*16];
    foreach (im[i]) im[i] = 0;
    for (int r = 2; r < 14; r += 4) for (int c = 2; c < 22; c += 4) im[r*24 + c] = 64;
    send_frame(im, 24, 16, 1024, 0); nframes++; check(last_count == 0,  "no feature at lambda == T (1024)");
    send_frame(im, 24, 16, 1023, 0); nframes++; check(last_count == 15, "one feature per dot at T = 1023");
    send_frame(im, 24, 16, 512, 0);  nframes++; check(last_count == 15, "dots only at T = 512");
    send_frame(im, 24, 16, 511, 0);  nframes++; check(last_count == 75, "dots and edge neighbours at T = 511");
    im = new[17*9]; foreach (im[i]) im[i] = byte'($urandom);
    send_frame(im, 17, 9, 1000, 0); nframes++;
    send_frame(im, 17, 9, 16'hFFFF, 0); nframes++;
    check(last_count == 0, "no features at maximum threshold");
    repeat (10) @(negedge clk);
    check(frames_out == nframes, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
