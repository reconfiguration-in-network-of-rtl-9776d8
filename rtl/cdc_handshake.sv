// cdc_handshake: moves a W-bit word from one clock domain to another with a
// toggle request / toggle acknowledge handshake.
//
// The processor may write the threshold at any moment, unrelated to the pixel
// clock, and the pixel pipeline must keep its own timing; this module is the
// boundary between the two. On src_send (accepted only while src_ready is high)
// the word is captured in a source-side holding register and the request
// toggle flips. The toggle crosses through two flip-flops; when the
// destination sees it change, the holding register has been stable for at
// least two destination cycles and is copied into dst_data, dst_valid pulses
// for one destination cycle and the acknowledge toggle is returned, again
// through two flip-flops. src_ready rises once the acknowledge has arrived.
// Only the toggles cross unsynchronized paths; the data bus is sampled while
// stable. A transfer takes about three destination plus three source cycles.
// The protocol choice is this design's.
module cdc_handshake #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_send,
  input  logic [W-1:0] src_data,
  output logic         src_ready,

  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic         dst_valid,
  output logic [W-1:0] dst_data
);

  logic [W-1:0] hold_q;
  logic         req_tgl;
  logic [1:0]   ack_sync;
  logic [1:0]   req_sync;
  logic         req_seen;
  logic         ack_tgl;

  // Source side
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold_q   <= '0;
      req_tgl  <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tgl};
      if (src_send && src_ready) begin
        hold_q  <= src_data;
        req_tgl <= ~req_tgl;
      end
    end
  end

  assign src_ready = (req_tgl == ack_sync[1]);

  // Destination side
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_sync  <= '0;
      req_seen  <= 1'b0;
      ack_tgl   <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      req_sync  <= {req_sync[0], req_tgl};
      dst_valid <= 1'b0;
      if (req_sync[1] != req_seen) begin
        req_seen  <= req_sync[1];
        dst_data  <= hold_q;
        dst_valid <= 1'b1;
        ack_tgl   <= req_sync[1];
      end
    end
  end

  property p_send_when_ready;
    @(posedge src_clk) disable iff (!src_rst_n) src_send |-> src_ready;
  endproperty
  a_send_when_ready: assert property (p_send_when_ready)
    else $error("cdc_handshake: src_send while a transfer is in progress");

endmodule
