// tb_feature_counter: drives frames of random length with random feature
// flags and gaps, and checks that each frame's count, published one cycle
// after its last pixel, equals the number of flagged pixels, and that the
// frame number advances by one per frame.
module tb_feature_counter;
  import tracker_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, in_eof, in_feature;
  logic count_valid;
  count_t count;
  frame_no_t frame_no;

  feature_counter dut (.clk, .rst_n, .in_valid, .in_sof, .in_eof, .in_feature,
                       .count_valid, .count, .frame_no);

  int checks = 0, failures = 0;
  int expected[$];
  int frames_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && count_valid) begin
    int e;
    e = expected.pop_front();
    check(count == count_t'(e), $sformatf("count %0d exp %0d", count, e));
    frames_seen++;
    check(frame_no == frame_no_t'(frames_seen), $sformatf("frame_no %0d", frame_no));
  end

  initial begin
    in_valid = 0; in_sof = 0; in_eof = 0; in_feature = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      int n, cnt, density;
      n = 1 + $urandom % 300;
      density = $urandom % 101;      // percent of flagged pixels, 0 .. 100
      if (f == 0) density = 100;
      if (f == 1) density = 0;
      cnt = 0;
      for (int i = 0; i < n; i++) begin
        while ($urandom % 4 == 0) begin
          @(negedge clk); in_valid = 0; in_feature = $urandom; in_sof = $urandom; in_eof = $urandom;
        end
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_eof = (i == n - 1);
        in_feature = ($urandom % 100) < density;
        cnt += in_feature;
      end
      expected.push_back(cnt);
      @(negedge clk); in_valid = 0; in_sof = 0; in_eof = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(frames_seen == 40, "all frames reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
