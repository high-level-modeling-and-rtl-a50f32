// General window filter: pixel result = sum over the K x K window of
// coefficient(i,j) * pixel(i,j), optionally divided by 2**norm_shift, then
// saturated to 0-255.
//
// The coefficient window is an input, so one instance can run any mask
// whose entries are in {-2,-1,0,1,2} (Laplacian, Sobel or Prewitt
// components, a smoothing mask with a power-of-two divisor, ...). Each
// product is formed with a negation and a one-bit shift, no multiplier; the
// division is an arithmetic right shift (rounding towards minus infinity).
//
// Pipeline: stage 1 registers the K*K products, stage 2 the sum, stage 3
// the shifted and saturated pixel. Latency 3 cycles, one window per cycle.
// The sum of products, the coefficient window and the final adjustment to
// 0-255 follow the reference design; the shift-based divisor, the pipeline and the
// widths are this design's choices.
module conv_window_filter
  import xsg_edge_pkg::*;
#(
  parameter int unsigned K = 3    // window size, 3 or 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  pixel_t [K-1:0][K-1:0]  win,
  input  coef_t  [K-1:0][K-1:0]  coef,
  input  logic   [2:0]           norm_shift,
  output pixel_t                 pix_out,
  output logic                   out_valid
);

  localparam int unsigned TW = PIX_W + 3;                 // one product
  localparam int unsigned SW = TW + $clog2(K * K);        // the sum

  typedef logic signed [TW-1:0] term_t;
  typedef logic signed [SW-1:0] sum_t;

  term_t [K-1:0][K-1:0] terms;
  sum_t                 acc;
  sum_t                 sum_c;
  sum_t                 scaled;
  pixel_t               clamped;
  logic  [2:0]          shift_q1, shift_q2;
  logic                 vld1, vld2;

  always_comb begin
    sum_c = '0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        sum_c += SW'(terms[i][j]);
  end

  assign scaled = acc >>> shift_q2;

  pixel_clamp #(.IN_W(SW)) u_clamp (
    .din (scaled),
    .dout(clamped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      terms     <= '0;
      acc       <= '0;
      shift_q1  <= '0;
      shift_q2  <= '0;
      vld1      <= 1'b0;
      vld2      <= 1'b0;
      pix_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++)
          terms[i][j] <= coef_term(win[i][j], coef[i][j]);
      shift_q1  <= norm_shift;
      vld1      <= in_valid;
      acc       <= sum_c;
      shift_q2  <= shift_q1;
      vld2      <= vld1;
      pix_out   <= clamped;
      out_valid <= vld2;
    end
  end

endmodule
