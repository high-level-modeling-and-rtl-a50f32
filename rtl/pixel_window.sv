// Sliding-window generator ("memory management" part of the filters).
//
// The pixel stream, one pixel per accepted cycle in raster order, runs
// through K rows chained as one long shift register. Every row holds one
// image line of IMG_W samples: a line delay of IMG_W-K samples followed by
// K window registers. Because the whole image shifts past them, the K x K
// window registers always hold the neighbourhood to be filtered at the same
// place, so the filter that reads them needs no addressing.
//
// win[i][j] is given in image orientation: i = 0 is the oldest (upper)
// image row and j = 0 the oldest (left) column; win[K-1][K-1] is the pixel
// accepted IMG_W-K samples ago. There is no border handling: at the start
// and end of a line the window spans the line wrap, as a plain shift
// register does.
//
// Timing: with pix_valid high the stream advances on that clock edge; the
// window registers change on the same edge and win_valid is high for the
// following cycle if the window then holds K*IMG_W or more accepted samples,
// i.e. no location left over from reset. win_valid is a one-cycle strobe per
// new window; with pix_valid low nothing moves.
//
// The row structure follows the reference design (K rows of IMG_W flip-flops, the
// window registers at the end of each row); writing the line delays as
// block-RAM line buffers (or, with LINE_RAM = 0, as plain registers), the
// valid strobe and the fill counter are this design's own. The handshake
// assertion at the end is disabled during reset; a linter may report rst_n
// as used both synchronously and asynchronously because of it, which does
// not concern the synthesised circuit.
module pixel_window
  import xsg_edge_pkg::*;
#(
  parameter int unsigned K     = 3,     // window size, 3 or 5
  parameter int unsigned IMG_W = 320,   // pixels per image line
  parameter bit          LINE_RAM = 1'b1 // line delays in block RAM (1) or registers (0)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pix_valid,
  input  pixel_t                    pix_in,
  output pixel_t [K-1:0][K-1:0]     win,
  output logic                      win_valid
);

  localparam int unsigned FILL  = K * IMG_W;
  localparam int unsigned CNT_W = $clog2(FILL + 1);

  initial begin
    assert (IMG_W >= K + 2) else $error("pixel_window: IMG_W must be at least K+2");
  end

  // taps[r][c]: row r of the chain (r = 0 is fed first), register c.
  pixel_t [K-1:0][K-1:0] taps;
  pixel_t [K-1:0]        row_in;   // input of each row's line delay
  pixel_t [K-1:0]        lb_out;   // output of each row's line delay

  for (genvar r = 0; r < K; r++) begin : g_row
    if (r == 0) begin : g_first
      assign row_in[r] = pix_in;
    end else begin : g_next
      assign row_in[r] = taps[r-1][K-1];
    end

    line_buffer #(.WIDTH(PIX_W), .DELAY(IMG_W - K), .USE_RAM(LINE_RAM)) u_line (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (pix_valid),
      .din  (row_in[r]),
      .dout (lb_out[r])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        taps[r] <= '0;
      end else if (pix_valid) begin
        taps[r][0] <= lb_out[r];
        for (int c = 1; c < K; c++) taps[r][c] <= taps[r][c-1];
      end
    end
  end

  // Image orientation: the newest chain row is the lowest image row and the
  // first register of a row the rightmost column.
  always_comb begin
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        win[i][j] = taps[K-1-i][K-1-j];
  end

  logic [CNT_W-1:0] fill_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt  <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (fill_cnt >= CNT_W'(FILL - 1));
      if (pix_valid && fill_cnt != CNT_W'(FILL)) fill_cnt <= fill_cnt + 1'b1;
    end
  end

  // A window strobe only ever follows an accepted pixel.
  assert property (@(posedge clk) disable iff (!rst_n) win_valid |-> $past(pix_valid))
    else $error("pixel_window: win_valid without an accepted pixel");

endmodule
