// Edge decision: compares a gradient magnitude with a constant threshold and
// outputs a binary image, 255 (white) for an edge and 0 (black) otherwise.
//
// Stage 1 is the comparison, magnitude > THRESHOLD, giving a one-bit edge
// flag; stage 2 scales the flag by 255 into an 8-bit pixel. Latency 2
// cycles, one sample per cycle. The threshold value 95 and the
// compare / convert / multiply-by-255 chain follow the reference design; the
// direction of the comparison (strictly greater) is this design's choice,
// made so that edges come out white on black.
module edge_binarize
  import xsg_edge_pkg::*;
#(
  parameter int unsigned MAG_W     = PIX_W + 4,
  parameter int unsigned THRESHOLD = 95
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [MAG_W-1:0] mag,
  output pixel_t           pix_out,
  output logic             out_valid
);

  logic edge_q;
  logic vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_q    <= 1'b0;
      vld_q     <= 1'b0;
      pix_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      edge_q    <= (mag > MAG_W'(THRESHOLD));
      vld_q     <= in_valid;
      pix_out   <= edge_q ? PIX_MAX : '0;
      out_valid <= vld_q;
    end
  end

endmodule
