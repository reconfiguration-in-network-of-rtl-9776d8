// ctrl_regs: register file the camera processor reads and writes to steer the
// feature selection at run time.
//
// The processor, on its own clock, writes the feature threshold, the
// restoration enable and the image size, and reads back the feature count of
// the latest frame. Software running the threshold loop reads the count,
// raises the threshold when there were more features than its target and
// lowers it when there were fewer, and turns restoration on when only a low
// threshold reaches the target on a blurred image.
//
// Bus: single-cycle writes (wr_en, addr, wr_data); reads return rd_data with
// rd_valid one cycle after rd_en. Byte offsets (see tracker_pkg):
//   0x00 CTRL     [0] restore_en                                  RW
//   0x04 THRESH   [15:0] threshold (reset 512)                    RW
//   0x08 IMG_SIZE [15:0] width (reset 1280), [31:16] height (reset 1024) RW
//   0x0C COUNT    [20:0] feature count of the latest frame       RO
//   0x10 STATUS   [15:0] frame number of that count, [30] a count
//                 arrived since COUNT was last read, [31] written
//                 configuration not yet delivered to the pixel side RO
// Other offsets read 0. Any write to CTRL, THRESH or IMG_SIZE marks the
// configuration dirty; the whole cfg_t word is then offered on cfg_send as
// soon as the clock-crossing is ready (cfg_ready). The pixel side applies it
// between frames. Results arrive as res_valid/res_data from the crossing.
//
// The threshold register and its runtime update follow the camera design;
// the register map, the image-size register and the status bits are this
// design's choices.
module ctrl_regs
  import tracker_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic [7:0]  addr,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic        rd_valid,
  // towards the pixel clock domain
  output cfg_t        cfg,
  output logic        cfg_send,
  input  logic        cfg_ready,
  // from the pixel clock domain
  input  logic        res_valid,
  input  result_t     res_data
);

  cfg_t    cfg_q;
  logic    dirty;
  result_t res_q;
  logic    res_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q    <= CFG_RESET;
      dirty    <= 1'b0;
      res_q    <= '0;
      res_new  <= 1'b0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (cfg_send) dirty <= 1'b0;
      if (wr_en) begin
        unique case (addr)
          REG_CTRL:     begin cfg_q.restore_en <= wr_data[0];              dirty <= 1'b1; end
          REG_THRESH:   begin cfg_q.thresh     <= wr_data[TH_W-1:0];       dirty <= 1'b1; end
          REG_IMG_SIZE: begin cfg_q.width      <= wr_data[DIM_W-1:0];
                              cfg_q.height     <= wr_data[16 +: DIM_W];    dirty <= 1'b1; end
          default: ;
        endcase
      end
      if (res_valid) begin
        res_q   <= res_data;
        res_new <= 1'b1;
      end
      rd_valid <= rd_en;
      if (rd_en) begin
        unique case (addr)
          REG_CTRL:     rd_data <= {31'b0, cfg_q.restore_en};
          REG_THRESH:   rd_data <= 32'(cfg_q.thresh);
          REG_IMG_SIZE: rd_data <= {cfg_q.height, cfg_q.width};
          REG_COUNT:    begin
                          rd_data <= 32'(res_q.count);
                          if (!res_valid) res_new <= 1'b0;
                        end
          REG_STATUS:   rd_data <= {dirty || !cfg_ready, res_new, 14'b0, res_q.frame_no};
          default:      rd_data <= '0;
        endcase
      end
    end
  end

  assign cfg      = cfg_q;
  assign cfg_send = dirty && cfg_ready && !wr_en;

endmodule
