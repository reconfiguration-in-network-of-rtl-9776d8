// feature_counter: counts the pixels flagged as features in each frame.
//
// The count restarts with the first pixel of a frame (in_sof) and is
// published with the frame's last pixel (in_eof): count holds the total and
// count_valid pulses for one cycle the cycle after that pixel, together with
// frame_no, the number of the frame (wrapping). This count is what the
// processor uses to raise the threshold when a frame gave too many features
// and lower it when it gave too few. The count width and the frame number are
// this design's choices.
module feature_counter
  import tracker_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_sof,
  input  logic      in_eof,
  input  logic      in_feature,
  output logic      count_valid,
  output count_t    count,
  output frame_no_t frame_no
);

  count_t running, next;

  assign next = (in_sof ? count_t'(0) : running) + count_t'(in_feature);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= '0;
      count       <= '0;
      count_valid <= 1'b0;
      frame_no    <= '0;
    end else begin
      count_valid <= 1'b0;
      if (in_valid) begin
        running <= next;
        if (in_eof) begin
          count       <= next;
          count_valid <= 1'b1;
          frame_no    <= frame_no + 1'b1;
        end
      end
    end
  end

endmodule
