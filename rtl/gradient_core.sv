// Gradient magnitude of a 3x3 window, Sobel or Prewitt operator.
//
// Gx is the sum over the three rows of (right pixel - left pixel), Gy the
// sum over the three columns of (lower pixel - upper pixel); the Sobel
// operator weights the centre row and centre column by 2, which is a one-bit
// left shift, the Prewitt operator weights all of them by 1. The result is
// |Gx| + |Gy|. No multiplier is used.
//
// The adder tree follows the reference Sobel model: three differences per
// direction, the first two added, then the third, an absolute value per
// direction, and one final adder. Every stage is registered, so the
// latency is 5 cycles from in_valid to out_valid and one window is accepted
// per cycle. The third difference is delayed by one register so that all
// three operands of a sum come from the same window (a choice of this
// design). Operand widths are this design's choice: 12-bit signed sums hold
// the largest value, 4*255.
//
// Ports: win[i][j] with i = row (0 = upper), j = column (0 = left);
// mag is |Gx|+|Gy|, at most 2040.
module gradient_core
  import xsg_edge_pkg::*;
#(
  parameter filter_kind_e KIND = FILT_SOBEL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  pixel_t [2:0][2:0]     win,
  output logic [PIX_W+3:0]      mag,
  output logic                  out_valid
);

  localparam int unsigned GW      = PIX_W + 4;   // signed gradient width
  localparam int unsigned LATENCY = 5;

  typedef logic signed [GW-1:0] grad_t;

  function automatic grad_t diff(pixel_t a, pixel_t b);
    return grad_t'($signed({1'b0, a})) - grad_t'($signed({1'b0, b}));
  endfunction

  // Stage 1: row differences (for Gx) and column differences (for Gy).
  grad_t [2:0] dx, dy;
  // Stage 2: first partial sum, third difference carried along.
  grad_t       sx01, sy01, dx2_q, dy2_q;
  // Stage 3: full gradients.
  grad_t       gx, gy;
  // Stage 4: absolute values.
  grad_t       ax, ay;

  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dx <= '0; dy <= '0;
      sx01 <= '0; sy01 <= '0; dx2_q <= '0; dy2_q <= '0;
      gx <= '0; gy <= '0;
      ax <= '0; ay <= '0;
      mag <= '0;
      vld <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (k == 1 && KIND == FILT_SOBEL) begin
          dx[k] <= diff(win[k][2], win[k][0]) <<< 1;
          dy[k] <= diff(win[2][k], win[0][k]) <<< 1;
        end else begin
          dx[k] <= diff(win[k][2], win[k][0]);
          dy[k] <= diff(win[2][k], win[0][k]);
        end
      end
      sx01  <= dx[0] + dx[1];
      sy01  <= dy[0] + dy[1];
      dx2_q <= dx[2];
      dy2_q <= dy[2];
      gx    <= sx01 + dx2_q;
      gy    <= sy01 + dy2_q;
      ax    <= (gx < 0) ? -gx : gx;
      ay    <= (gy < 0) ? -gy : gy;
      mag   <= (PIX_W + 4)'(ax) + (PIX_W + 4)'(ay);
      vld   <= {vld[LATENCY-2:0], in_valid};
    end
  end

  assign out_valid = vld[LATENCY-1];

endmodule
