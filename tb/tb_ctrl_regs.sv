// tb_ctrl_regs: checks the register file on its own: reset values, write and
// read-back of CTRL, THRESH and IMG_SIZE, read-only COUNT and STATUS, zero on
// unused offsets, that a write offers the new configuration word once the
// crossing is ready (and not while it is busy), and that an arriving result
// sets the "new count" status bit, which reading COUNT clears.
module tb_ctrl_regs;
  import tracker_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  addr;
  logic        wr_en, rd_en, rd_valid;
  logic [31:0] wr_data, rd_data;
  cfg_t        cfg;
  logic        cfg_send, cfg_ready;
  logic        res_valid;
  result_t     res_data;

  ctrl_regs dut (.clk, .rst_n, .addr, .wr_en, .wr_data, .rd_en, .rd_data, .rd_valid,
                 .cfg, .cfg_send, .cfg_ready, .res_valid, .res_data);

  int checks = 0, failures = 0, sends = 0;
  cfg_t last_sent;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && cfg_send) begin
    check(cfg_ready, "send only when ready");
    sends++; last_sent = cfg;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); addr = a; wr_data = d; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd_en = 1;
    @(negedge clk); rd_en = 0;
    check(rd_valid, "rd_valid one cycle after rd_en");
    d = rd_data;
  endtask

  initial begin
    logic [31:0] d;
    addr = 0; wr_en = 0; rd_en = 0; wr_data = 0; cfg_ready = 1; res_valid = 0; res_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(REG_CTRL, d);     check(d == 32'd0, "reset CTRL");
    rd(REG_THRESH, d);   check(d == 32'd512, "reset THRESH");
    rd(REG_IMG_SIZE, d); check(d == {16'd1024, 16'd1280}, "reset IMG_SIZE");
    rd(REG_COUNT, d);    check(d == 32'd0, "reset COUNT");
    rd(REG_STATUS, d);   check(d == 32'd0, "reset STATUS");
    check(sends == 0, "no send without a write");

    wr(REG_THRESH, 32'hABCD_1552);
    repeat (2) @(negedge clk);
    check(sends == 1 && last_sent.thresh == 16'h1552, "threshold sent");
    rd(REG_THRESH, d); check(d == 32'h0000_1552, "THRESH read-back (16 bits)");

    // crossing busy: the write waits
    cfg_ready = 0;
    wr(REG_CTRL, 32'hFFFF_FFFF);
    wr(REG_IMG_SIZE, {16'd48, 16'd64});
    repeat (3) @(negedge clk);
    check(sends == 1, "no send while busy");
    rd(REG_STATUS, d); check(d[31] == 1'b1, "STATUS shows pending configuration");
    cfg_ready = 1;
    repeat (2) @(negedge clk);
    check(sends == 2, "one send after ready");
    check(last_sent.restore_en == 1 && last_sent.width == 64 && last_sent.height == 48 &&
          last_sent.thresh == 16'h1552, "whole configuration word sent");
    rd(REG_CTRL, d);     check(d == 32'd1, "CTRL read-back");
    rd(REG_IMG_SIZE, d); check(d == {16'd48, 16'd64}, "IMG_SIZE read-back");
    rd(REG_STATUS, d);   check(d[31] == 1'b0, "STATUS pending cleared");

    // read-only and unused offsets
    wr(REG_COUNT, 32'h1234);
    wr(8'h14, 32'h1234);
    rd(REG_COUNT, d); check(d == 32'd0, "COUNT read-only");
    rd(8'h14, d);     check(d == 32'd0, "unused offset reads 0");
    rd(8'h20, d);     check(d == 32'd0, "unused offset reads 0");

    // results
    for (int i = 1; i <= 5; i++) begin
      int n = $urandom % 2000;
      @(negedge clk); res_valid = 1; res_data = '{count: count_t'(n), frame_no: frame_no_t'(i)};
      @(negedge clk); res_valid = 0;
      rd(REG_STATUS, d);
      check(d[30] == 1'b1 && d[15:0] == 16'(i), "STATUS new count and frame number");
      rd(REG_COUNT, d);  check(d == 32'(n), $sformatf("COUNT %0d", d));
      rd(REG_STATUS, d); check(d[30] == 1'b0, "new-count bit cleared by COUNT read");
    end
    check(sends == 2, "no stray sends");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
