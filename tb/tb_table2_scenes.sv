// tb_table2_scenes: fixed-threshold against adaptive-threshold feature
// selection on a set of synthetic scenes that mirror the published
// evaluation: normal, bright and dark lighting of one object; a smooth round
// object and a complex textured object; two objects of which one is out of
// focus, with and without restoration; a defocused scene with and without
// restoration. For every scene the top level first runs one frame at the fixed
// threshold 512 (the non-adaptive selector), then the processor model adjusts
// the threshold frame by frame until the count is within 150 +/- 10%
// (135..165). Every frame's COUNT is checked against the software reference.
// Checks: the adaptive loop reaches the band on every scene; the fixed
// threshold selects more features in bright than in dark light; restoration
// raises the settled threshold on the defocused and two-object scenes. The
// number of features on the right half (the blurred object of the two-object
// scene) is printed for information only. A table like the
// published one (threshold, count) is printed.
module tb_table2_scenes;
  import tracker_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 96, H = 72;
  localparam int LO = 135, HI = 165, FIX = 512;
  localparam int MAX_ITER = 24;

  logic pix_clk = 0, cpu_clk = 0, pix_rst_n = 0, cpu_rst_n = 0;
  always #5 pix_clk = ~pix_clk;
  always #3 cpu_clk = ~cpu_clk;

  logic in_valid, in_sof;
  pix_t in_pix;
  logic out_valid, out_sof, out_eof, out_feature;
  pix_t out_pix;
  logic [7:0]  cpu_addr;
  logic        cpu_wr, cpu_rd, cpu_rvalid;
  logic [31:0] cpu_wdata, cpu_rdata;

  adaptive_fs_top dut (
    .pix_clk, .pix_rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid, .out_sof, .out_eof, .out_pix, .out_feature,
    .cpu_clk, .cpu_rst_n, .cpu_addr, .cpu_wr, .cpu_wdata, .cpu_rd, .cpu_rdata, .cpu_rvalid
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // Features on the right half of the image (the out-of-focus object of the
  // two-object scene) in the most recent frame.
  int right_run = 0, right_last = 0, col = 0;
  always @(posedge pix_clk) if (pix_rst_n && out_valid) begin
    if (out_sof) begin right_run = 0; col = 0; end
    if (out_feature && col >= W/2) right_run++;
    col = (col == W - 1) ? 0 : col + 1;
    if (out_eof) right_last = right_run;
  end

  task automatic bus_wr(logic [7:0] a, logic [31:0] d);
    @(negedge cpu_clk); cpu_addr = a; cpu_wdata = d; cpu_wr = 1;
    @(negedge cpu_clk); cpu_wr = 0;
  endtask

  task automatic bus_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge cpu_clk); cpu_addr = a; cpu_rd = 1;
    @(negedge cpu_clk); cpu_rd = 0;
    d = cpu_rdata;
  endtask

  // Write the configuration and wait until the pixel side holds it.
  task automatic configure(int thresh, bit restore);
    logic [31:0] st;
    bus_wr(REG_THRESH, 32'(thresh));
    bus_wr(REG_CTRL, {31'b0, restore});
    do bus_rd(REG_STATUS, st); while (st[31]);
    repeat (6) @(negedge pix_clk);
  endtask

  // Stream one frame, wait for its count, check it against the reference.
  task automatic run_frame(img_t im, int thresh, bit restore, output int count);
    logic [31:0] st, cnt;
    int fno0, expected;
    img_t rst;
    flags_t f;
    rst = restore_ref(im, W, H, restore);
    f = feature_ref(rst, W, H, thresh);
    expected = count_flags(f);
    bus_rd(REG_STATUS, st); fno0 = int'(st[15:0]);
    for (int i = 0; i < W*H; i++) begin
      @(negedge pix_clk); in_valid = 1; in_sof = (i == 0); in_pix = im[i];
    end
    @(negedge pix_clk); in_valid = 0; in_sof = 0;
    do bus_rd(REG_STATUS, st); while (int'(st[15:0]) == fno0 || !st[30]);
    bus_rd(REG_COUNT, cnt);
    count = int'(cnt);
    check(count == expected, $sformatf("COUNT %0d, reference %0d", count, expected));
    repeat (2*W + 16) @(negedge pix_clk);
  endtask

  // Fixed threshold, then the adaptive loop (bisection between known bounds).
  task automatic evaluate(string name, img_t im, bit restore, output int fix_cnt,
                          output int auto_th, output int auto_cnt);
    int th = FIX, lo_b = 0, hi_b = -1, cnt, it;
    configure(FIX, restore);
    run_frame(im, FIX, restore, fix_cnt);
    cnt = fix_cnt;
    for (it = 0; it < MAX_ITER && (cnt < LO || cnt > HI); it++) begin
      if (cnt > HI) begin
        lo_b = th;
        if (hi_b >= 0 && hi_b <= lo_b + 1) hi_b = -1;
        th = (hi_b < 0) ? th * 2 : (lo_b + hi_b) / 2;
      end else begin
        hi_b = th;
        if (lo_b >= hi_b - 1) lo_b = 0;
        th = (lo_b + hi_b) / 2;
        if (th < 1) th = 1;
      end
      configure(th, restore);
      run_frame(im, th, restore, cnt);
    end
    auto_th = th; auto_cnt = cnt;
    $display("%-28s restore=%0d | FS-FIX 512: %5d features | FS-AUTO: threshold %5d, %4d features (%0d on right half), %0d frames",
             name, restore, fix_cnt, th, cnt, right_last, it);
    check(cnt >= LO && cnt <= HI, $sformatf("%s: adaptive count in band", name));
  endtask

  initial begin
    int fc[8], at[8], ac[8];
    in_valid = 0; in_sof = 0; in_pix = 0;
    cpu_addr = 0; cpu_wr = 0; cpu_rd = 0; cpu_wdata = 0;
    #20 pix_rst_n = 1; cpu_rst_n = 1;
    bus_wr(REG_IMG_SIZE, {16'(H), 16'(W)});
    evaluate("normal light",             make_scene(W, H, 3, 100, 0), 0, fc[0], at[0], ac[0]);
    evaluate("bright light",             make_scene(W, H, 3, 170, 0), 0, fc[1], at[1], ac[1]);
    evaluate("dark light",               make_scene(W, H, 3, 35, 0),  0, fc[2], at[2], ac[2]);
    evaluate("round object",             make_disc(W, H, 100),        0, fc[3], at[3], ac[3]);
    evaluate("complex object",           make_scene(W, H, 9, 130, 0), 0, fc[4], at[4], ac[4]);
    evaluate("two objects, one blurred", make_two_objects(W, H, 5),   0, fc[5], at[5], ac[5]);
    evaluate("two objects, restored",    make_two_objects(W, H, 5),   1, fc[6], at[6], ac[6]);
    evaluate("defocused, restored",      make_scene(W, H, 3, 100, 1), 1, fc[7], at[7], ac[7]);
    begin
      int bt, bc, f0;
      evaluate("defocused",              make_scene(W, H, 3, 100, 1), 0, f0, bt, bc);
      check(at[7] > bt, $sformatf("restoration raises the settled threshold (%0d > %0d)", at[7], bt));
    end
    check(fc[1] > fc[0] && fc[0] > fc[2], "fixed threshold: bright > normal > dark");
    check(at[1] > at[0] && at[0] > at[2], "adaptive threshold follows the lighting");
    check(at[6] > at[5], "restoration raises the threshold on the two-object scene");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge pix_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
