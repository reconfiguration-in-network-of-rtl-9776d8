// tb_cdc_handshake: sends random words from a 100 MHz-like clock to an
// unrelated 37 ns clock and back the other way through a second instance,
// each side sending as fast as src_ready allows and sometimes pausing, and
// checks that every word arrives once, unchanged and in order, and that a
// transfer finishes within a bounded number of destination cycles.
module tb_cdc_handshake;
  localparam int W = 24;

  logic clk_a = 0, clk_b = 0, rst_n = 0;
  always #5    clk_a = ~clk_a;
  always #18.5 clk_b = ~clk_b;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // a -> b
  logic ab_send, ab_ready, ab_valid;
  logic [W-1:0] ab_data, ab_out;
  cdc_handshake #(.W(W)) dut_ab (
    .src_clk(clk_a), .src_rst_n(rst_n), .src_send(ab_send), .src_data(ab_data), .src_ready(ab_ready),
    .dst_clk(clk_b), .dst_rst_n(rst_n), .dst_valid(ab_valid), .dst_data(ab_out));

  // b -> a
  logic ba_send, ba_ready, ba_valid;
  logic [W-1:0] ba_data, ba_out;
  cdc_handshake #(.W(W)) dut_ba (
    .src_clk(clk_b), .src_rst_n(rst_n), .src_send(ba_send), .src_data(ba_data), .src_ready(ba_ready),
    .dst_clk(clk_a), .dst_rst_n(rst_n), .dst_valid(ba_valid), .dst_data(ba_out));

  logic [W-1:0] q_ab[$], q_ba[$];
  int n_ab = 0, n_ba = 0;
  int wait_b = 0;

  always @(posedge clk_b) if (rst_n) begin
    if (ab_valid) begin
      check(q_ab.size() > 0 && ab_out == q_ab.pop_front(), "a->b word");
      n_ab++;
      check(wait_b <= 8, $sformatf("a->b took %0d destination cycles", wait_b));
      wait_b = 0;
    end else if (q_ab.size() > 0) wait_b++;
  end

  always @(posedge clk_a) if (rst_n && ba_valid) begin
    check(q_ba.size() > 0 && ba_out == q_ba.pop_front(), "b->a word");
    n_ba++;
  end

  initial begin
    ab_send = 0; ab_data = 0;
    repeat (3) @(negedge clk_a);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk_a);
      while (!ab_ready) @(negedge clk_a);
      ab_data = W'($urandom); ab_send = 1;
      q_ab.push_back(ab_data);
      @(negedge clk_a); ab_send = 0; ab_data = W'($urandom);
      repeat ($urandom % 20) @(negedge clk_a);
    end
  end

  initial begin
    ba_send = 0; ba_data = 0;
    @(posedge rst_n);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk_b);
      while (!ba_ready) @(negedge clk_b);
      ba_data = W'($urandom); ba_send = 1;
      q_ba.push_back(ba_data);
      @(negedge clk_b); ba_send = 0; ba_data = W'($urandom);
      repeat ($urandom % 4) @(negedge clk_b);
    end
  end

  initial begin
    wait (n_ab == 200 && n_ba == 100);
    repeat (20) @(posedge clk_b);
    check(q_ab.size() == 0 && q_ba.size() == 0, "no word left behind");
    check(n_ab == 200 && n_ba == 100, "no extra word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
