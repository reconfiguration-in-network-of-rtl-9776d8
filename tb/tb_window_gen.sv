// tb_window_gen: drives random frames of several sizes, with random gaps in
// the pixel stream, into 3x3, 5x5 and 15x15 window generators (15x15 only for frames of
// at least 15x15 pixels) and checks every
// window against the image: the centre of every output, every entry of
// interior windows, the border flag, start/end of frame markers, the number of
// outputs per frame and, for a gap-free frame, the latency (HALF*w + HALF + 2
// cycles from a pixel to the window centred on it).
module tb_window_gen;
  import tracker_pkg::*;

  localparam int MAXW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t img_w, img_h;
  logic in_valid, in_sof;
  pix_t in_pix;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  byte unsigned img[];
  int  cur_w, cur_h;
  longint sof_cycle;
  bit  gapless;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // One instance per window size.
  for (genvar g = 0; g < 3; g++) begin : g_dut
    localparam int WIN  = (g == 0) ? 3 : (g == 1) ? 5 : 15;
    localparam int HALF = (WIN - 1) / 2;
    logic o_valid, o_sof, o_eof, o_border, o_busy;
    pix_t [WIN-1:0][WIN-1:0] o_win;
    int idx = 0;
    int frames_out = 0;
    logic g_valid;
    // frames smaller than the window are not sent to this instance
    assign g_valid = in_valid && (cur_w >= WIN) && (cur_h >= WIN);

    window_gen #(.MAX_W(MAXW), .WIN(WIN)) dut (
      .clk, .rst_n, .img_w, .img_h, .in_valid(g_valid), .in_sof, .in_pix,
      .out_valid(o_valid), .out_sof(o_sof), .out_eof(o_eof),
      .out_border(o_border), .out_win(o_win), .busy(o_busy)
    );

    always @(posedge clk) if (rst_n && o_valid) begin
      int r, c;
      bit border;
      r = idx / cur_w; c = idx % cur_w;
      border = (r < HALF) || (c < HALF) || (r >= cur_h - HALF) || (c >= cur_w - HALF);
      check(o_sof == (idx == 0), $sformatf("WIN%0d sof idx %0d", WIN, idx));
      check(o_eof == (idx == cur_w*cur_h - 1), $sformatf("WIN%0d eof idx %0d", WIN, idx));
      check(o_border == border, $sformatf("WIN%0d border r%0d c%0d", WIN, r, c));
      check(o_win[HALF][HALF] == img[idx], $sformatf("WIN%0d centre r%0d c%0d", WIN, r, c));
      if (idx == 0 && gapless)
        check(cyc - sof_cycle == longint'(HALF*cur_w + HALF + 2),
              $sformatf("WIN%0d latency %0d", WIN, cyc - sof_cycle));
      if (!border) begin
        bit ok = 1;
        for (int i = 0; i < WIN; i++)
          for (int j = 0; j < WIN; j++)
            if (o_win[i][j] != img[(r - HALF + i)*cur_w + (c - HALF + j)]) ok = 0;
        check(ok, $sformatf("WIN%0d window r%0d c%0d", WIN, r, c));
      end
      if (idx == cur_w*cur_h - 1) begin idx = 0; frames_out++; end
      else idx++;
    end
  end

  task automatic send_frame(int w, int h, bit gaps);
    cur_w = w; cur_h = h;
    gapless = !gaps;
    img = new[w*h];
    foreach (img[i]) img[i] = byte'($urandom);
    img_w = dim_t'(w); img_h = dim_t'(h);
    for (int i = 0; i < w*h; i++) begin
      while (gaps && ($urandom % 4 == 0)) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_sof = (i == 0); in_pix = img[i];
      if (i == 0) sof_cycle = cyc + 1;
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    // blanking: at least the flush of the 15x15 window plus margin
    repeat (7*w + 7 + 6 + ($urandom % 5)) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_pix = 0; img_w = 12; img_h = 7;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    send_frame(12, 7, 0);
    send_frame(16, 9, 1);
    send_frame(5, 5, 1);
    send_frame(16, 6, 0);
    send_frame(7, 11, 1);
    send_frame(16, 15, 0);
    send_frame(15, 16, 1);
    send_frame(16, 16, 1);
    repeat (10) @(negedge clk);
    check(g_dut[0].frames_out == 8, "WIN3 frame count");
    check(g_dut[1].frames_out == 8, "WIN5 frame count");
    check(g_dut[2].frames_out == 3, "WIN15 frame count");
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
