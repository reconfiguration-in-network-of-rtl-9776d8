// tb_adaptive_fs_top: end-to-end run of the adaptive feature-selection stage
// with a model of the camera processor closing the threshold loop.
//
// A pixel source streams 64x48 frames continuously (random blanking, some
// frames with gaps) through four lighting/focus phases: normal, bright, dark,
// defocused, then sharp again. Every output pixel and feature flag is compared
// with the software reference (restoration then feature selection) using the
// configuration the pipeline applied to that frame. The processor model runs
// on its own clock: it polls STATUS, reads COUNT, checks it against the
// reference count of that frame, and steers the threshold toward 150 features
// with 10% tolerance: raise when above 165, lower when below 135, bisecting
// between the last thresholds known to give too many and too few features and
// doubling the threshold while no upper bound is known. When the loop settles
// at a low threshold it enables restoration; at the last phase it disables it
// again. Counted mechanisms, each of which must occur: threshold raised,
// threshold lowered, count inside the target band, restoration switched on,
// switched off, a configuration arriving during a frame (held to the next
// frame), frames with gaps in the input stream. The configuration must never
// change while a frame is in flight.
module tb_adaptive_fs_top;
  import tracker_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 64, H = 48;
  localparam int TARGET = 150, LO = 135, HI = 165;
  localparam int RESTORE_BELOW = 120;   // settled threshold that suggests a blurred image
  localparam int PHASE_LEN = 24;
  localparam int NPHASE = 5;

  logic pix_clk = 0, cpu_clk = 0, pix_rst_n = 0, cpu_rst_n = 0;
  always #5   pix_clk = ~pix_clk;
  always #3.5 cpu_clk = ~cpu_clk;

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

  // mechanism counters
  int n_raise = 0, n_lower = 0, n_band = 0, n_rest_on = 0, n_rest_off = 0;
  int n_deferred = 0, n_gap_frames = 0;
  int band_in_phase[NPHASE];
  int phase_thresh[NPHASE];

  // ---------------- pixel source ----------------
  int   src_frames = 0;
  bit   src_done = 0;
  img_t in_q[$];
  cfg_t cfg_q[$];

  function automatic int phase_of(int f);
    return f / PHASE_LEN;
  endfunction

  function automatic img_t scene_for(int f);
    case (phase_of(f))
      0:       return make_scene(W, H, 7, 100, 0);   // normal light
      1:       return make_scene(W, H, 7, 170, 0);   // bright
      2:       return make_scene(W, H, 7, 40, 0);    // dark
      3:       return make_scene(W, H, 7, 100, 1);   // defocused
      default: return make_scene(W, H, 7, 100, 0);   // sharp again
    endcase
  endfunction

  initial begin
    in_valid = 0; in_sof = 0; in_pix = 0;
    wait (pix_rst_n);
    wait (dut.cfg_active.width == dim_t'(W) && dut.cfg_active.height == dim_t'(H));
    for (int f = 0; f < PHASE_LEN * NPHASE; f++) begin
      img_t im;
      bit gaps;
      im = scene_for(f);
      gaps = (f % 5 == 3);
      n_gap_frames += gaps;
      for (int i = 0; i < W*H; i++) begin
        while (gaps && ($urandom % 8 == 0)) begin @(negedge pix_clk); in_valid = 0; end
        @(negedge pix_clk);
        in_valid = 1; in_sof = (i == 0); in_pix = im[i];
        if (i == 0) begin
          in_q.push_back(im);
          cfg_q.push_back(dut.cfg_active);
        end
      end
      @(negedge pix_clk); in_valid = 0; in_sof = 0;
      src_frames++;
      repeat (2*W + 16 + ($urandom % (4*W))) @(negedge pix_clk);
    end
    src_done = 1;
  end

  // ---------------- output monitor ----------------
  img_t   exp_pix;
  flags_t exp_f;
  int idx = 0, out_frames = 0;
  int exp_count[int];      // by frame number (1-based)
  cfg_t frame_cfg[int];

  always @(posedge pix_clk) if (pix_rst_n && out_valid) begin
    if (out_sof) begin
      img_t im;
      cfg_t c;
      check(idx == 0, "sof at pixel 0");
      im = in_q.pop_front();
      c  = cfg_q.pop_front();
      exp_pix = restore_ref(im, W, H, c.restore_en);
      exp_f   = feature_ref(exp_pix, W, H, int'(c.thresh));
      exp_count[out_frames + 1] = count_flags(exp_f);
      frame_cfg[out_frames + 1] = c;
      idx = 0;
    end
    check(out_pix == exp_pix[idx] && out_feature == exp_f[idx],
          $sformatf("frame %0d pixel %0d", out_frames + 1, idx));
    check(out_eof == (idx == W*H - 1), "eof");
    if (idx == W*H - 1) begin idx = 0; out_frames++; end
    else idx++;
  end

  // configuration is held for a whole frame
  cfg_t cfg_prev;
  always @(posedge pix_clk) if (pix_rst_n) begin
    if (dut.in_frame) check(dut.cfg_active == cfg_prev, "configuration stable in frame");
    if (dut.cfg_arrived && dut.in_frame) n_deferred++;
    cfg_prev <= dut.cfg_active;
  end

  // ---------------- processor model ----------------
  task automatic bus_wr(logic [7:0] a, logic [31:0] d);
    @(negedge cpu_clk); cpu_addr = a; cpu_wdata = d; cpu_wr = 1;
    @(negedge cpu_clk); cpu_wr = 0;
  endtask

  task automatic bus_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge cpu_clk); cpu_addr = a; cpu_rd = 1;
    @(negedge cpu_clk); cpu_rd = 0;
    d = cpu_rdata;
  endtask

  initial begin
    logic [31:0] st, cnt;
    int thresh = 512, lo_b = 0, hi_b = -1, skip_until = 0, settled = 0;
    bit restore = 0;
    int ph_prev = 0;
    cpu_addr = 0; cpu_wr = 0; cpu_rd = 0; cpu_wdata = 0;
    foreach (band_in_phase[p]) begin band_in_phase[p] = 0; phase_thresh[p] = 0; end
    #20 cpu_rst_n = 1; pix_rst_n = 1;
    bus_wr(REG_IMG_SIZE, {16'(H), 16'(W)});
    forever begin
      int fno, ph;
      bus_rd(REG_STATUS, st);
      if (!st[30]) continue;
      bus_rd(REG_COUNT, cnt);
      fno = int'(st[15:0]);
      check(exp_count.exists(fno) && int'(cnt) == exp_count[fno],
            $sformatf("COUNT of frame %0d: %0d", fno, cnt));
      ph = phase_of(fno - 1);
      if (ph >= NPHASE) continue;
      if (ph != ph_prev) begin
        // new scene: forget the search bounds; sharp again -> filter off
        lo_b = 0; hi_b = -1; settled = 0; ph_prev = ph;
        if (ph == 4 && restore) begin
          restore = 0; n_rest_off++;
          bus_wr(REG_CTRL, 32'd0);
          skip_until = fno + 2;
        end
      end
      if (fno < skip_until) continue;
      if (frame_cfg[fno].thresh != thresh_t'(thresh)) continue;  // old setting
      if (int'(cnt) > HI) begin
        // too many features: this threshold is a lower bound
        lo_b = thresh;
        if (hi_b <= lo_b + 1) hi_b = -1;
        thresh = (hi_b < 0) ? thresh * 2 : (lo_b + hi_b) / 2;
        n_raise++; settled = 0;
      end else if (int'(cnt) < LO) begin
        // too few features: this threshold is an upper bound
        hi_b = thresh;
        if (lo_b >= hi_b - 1) lo_b = 0;
        thresh = (lo_b + hi_b) / 2;
        n_lower++; settled = 0;
        if (thresh < 1) thresh = 1;
      end else begin
        n_band++; band_in_phase[ph]++; phase_thresh[ph] = thresh; settled++;
        if (settled >= 2 && !restore && thresh < RESTORE_BELOW) begin
          restore = 1; n_rest_on++;
          bus_wr(REG_CTRL, 32'd1);
          lo_b = 0; hi_b = -1; settled = 0;
          skip_until = fno + 2;
        end
        continue;
      end
      if (thresh > 65535) thresh = 65535;
      if (ph == 2) $display("dark frame %0d count %0d -> threshold %0d", fno, cnt, thresh);
      repeat ($urandom % 1500) @(negedge cpu_clk);   // software response time
      bus_wr(REG_THRESH, 32'(thresh));
      skip_until = fno + 1;
    end
  end

  initial begin
    wait (src_done);
    wait (out_frames == src_frames);
    repeat (200) @(posedge pix_clk);
    check(out_frames == PHASE_LEN * NPHASE, "all frames out");
    for (int p = 0; p < NPHASE; p++) begin
      $display("phase %0d: in band %0d times, threshold %0d", p, band_in_phase[p], phase_thresh[p]);
      check(band_in_phase[p] > 0, $sformatf("phase %0d reached the target band", p));
    end
    $display("mechanisms: raised %0d lowered %0d in_band %0d restore_on %0d restore_off %0d deferred_cfg %0d gap_frames %0d",
             n_raise, n_lower, n_band, n_rest_on, n_rest_off, n_deferred, n_gap_frames);
    check(n_raise > 0, "threshold raised");
    check(n_lower > 0, "threshold lowered");
    check(n_band > 0, "count in band");
    check(n_rest_on > 0, "restoration switched on");
    check(n_rest_off > 0, "restoration switched off");
    check(n_deferred > 0, "configuration deferred to next frame");
    check(n_gap_frames > 0, "frames with gaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge pix_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
