// tb_full_size: the adaptive feature-selection stage at its default size. Two
// full 1280x1024 frames (the reset image size) go through the pipeline: the
// first with the reset configuration (threshold 512, restoration off), the
// second after the processor has enabled restoration and written a new
// threshold during the first frame, so the change must take effect exactly at
// the second frame. Every output pixel and feature flag is compared with the
// software reference, each frame's COUNT register value with the reference
// count, and the first output pixel must leave 2*1280 + 10 cycles after the
// first input pixel.
module tb_full_size;
  import tracker_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 1280, H = 1024;

  logic pix_clk = 0, cpu_clk = 0, pix_rst_n = 0, cpu_rst_n = 0;
  always #5 pix_clk = ~pix_clk;
  always #4 cpu_clk = ~cpu_clk;

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

  longint cyc = 0;
  always @(posedge pix_clk) cyc++;

  img_t   img;
  img_t   exp_pix[2];
  flags_t exp_f[2];
  int     exp_cnt[2];
  int     frame = 0, idx = 0, bad = 0;
  longint sof_cyc;

  always @(posedge pix_clk) if (pix_rst_n && out_valid) begin
    if (out_sof && frame == 0) check(cyc - sof_cyc == longint'(2*W + 10), $sformatf("latency %0d", cyc - sof_cyc));
    if (out_sof) check(idx == 0, "sof at pixel 0");
    if (out_pix != exp_pix[frame][idx] || out_feature != exp_f[frame][idx]) begin
      bad++;
      if (bad < 10) $display("mismatch frame %0d pixel %0d", frame, idx);
    end
    check(out_eof == (idx == W*H - 1), "eof");
    if (idx == W*H - 1) begin
      check(bad == 0, $sformatf("frame %0d: %0d pixels differ", frame, bad));
      idx = 0; frame++; bad = 0;
    end else idx++;
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

  task automatic send_frame();
    for (int i = 0; i < W*H; i++) begin
      @(negedge pix_clk);
      in_valid = 1; in_sof = (i == 0); in_pix = img[i];
      if (i == 0) sof_cyc = cyc + 1;
    end
    @(negedge pix_clk); in_valid = 0; in_sof = 0;
  endtask

  initial begin
    logic [31:0] st, cnt;
    in_valid = 0; in_sof = 0; in_pix = 0;
    cpu_addr = 0; cpu_wr = 0; cpu_rd = 0; cpu_wdata = 0;
    img = make_scene(W, H, 11, 100, 1);
    exp_pix[0] = restore_ref(img, W, H, 0);
    exp_f[0]   = feature_ref(exp_pix[0], W, H, 512);
    exp_cnt[0] = count_flags(exp_f[0]);
    exp_pix[1] = restore_ref(img, W, H, 1);
    exp_f[1]   = feature_ref(exp_pix[1], W, H, 700);
    exp_cnt[1] = count_flags(exp_f[1]);
    $display("reference counts: %0d (threshold 512), %0d (restored, threshold 700)", exp_cnt[0], exp_cnt[1]);
    #20 pix_rst_n = 1; cpu_rst_n = 1;
    repeat (5) @(negedge pix_clk);
    fork
      send_frame();
      begin
        // processor reconfigures while frame 0 is streaming
        repeat (1000) @(negedge cpu_clk);
        bus_wr(REG_CTRL, 32'd1);
        bus_wr(REG_THRESH, 32'd700);
      end
    join
    repeat (2*W + 20) @(negedge pix_clk);
    send_frame();
    wait (frame == 2);
    for (int f = 0; f < 2; f++) begin
      do bus_rd(REG_STATUS, st); while (int'(st[15:0]) < f + 1);
      if (int'(st[15:0]) == f + 1) begin
        bus_rd(REG_COUNT, cnt);
        check(int'(cnt) == exp_cnt[f], $sformatf("COUNT frame %0d = %0d", f + 1, cnt));
      end
    end
    check(exp_cnt[0] > 0 && exp_cnt[1] > 0, "features present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge pix_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
