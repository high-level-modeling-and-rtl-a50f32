// Streaming edge-detection accelerator for 8-bit grey-level images.
//
// The image arrives as a raster-order pixel stream, one pixel per cycle with
// pix_valid high (the host has already turned the image matrix into this
// stream). One 3x3 sliding window, built from three rows of IMG_W shifting
// flip-flops, feeds three filters side by side:
//   * Sobel:   |Gx|+|Gy| of the Sobel operator, thresholded at THRESHOLD,
//              output 255 for an edge and 0 otherwise;
//   * Prewitt: the same with the Prewitt operator;
//   * a general 3x3 filter whose coefficient window (entries -2..2) and
//     power-of-two divisor are inputs, its result saturated to 0-255.
// Each output has its own valid strobe; the output stream of a filter holds
// one pixel per input pixel once the window has filled (3*IMG_W pixels after
// reset), with no border handling.
//
// Latency from an accepted input pixel to the output that its window
// completes: Sobel and Prewitt 8 cycles (1 window + 5 gradient + 2
// decision), general filter 4 cycles (1 window + 3 filter). coef and
// norm_shift are sampled one clock after a window is formed; change them
// only while the stream is paused, two clocks after the last pixel that
// uses the old setting. LINE_RAM selects block RAM (default) or registers
// for the line delays; the behaviour is identical. The strobe assertion is
// disabled during reset; a linter may report rst_n as used both
// synchronously and asynchronously because of it, which does not concern
// the synthesised circuit.
//
// Sobel, Prewitt, the threshold of 95, the shared window structure and the
// coefficient-window filter follow the reference design; the valid strobes, the
// pipeline depths and the sharing of one window by all three filters are
// this design's choices.
module xsg_edge_top
  import xsg_edge_pkg::*;
#(
  parameter int unsigned IMG_W     = 320,
  parameter int unsigned THRESHOLD = 95,
  parameter bit          LINE_RAM  = 1'b1   // line delays in block RAM or registers
) (
  input  logic                clk,
  input  logic                rst_n,
  // pixel stream in
  input  logic                pix_valid,
  input  pixel_t              pix_in,
  // general filter configuration
  input  coef_t [2:0][2:0]    coef,
  input  logic  [2:0]         norm_shift,
  // Sobel edge image
  output pixel_t              sobel_pix,
  output logic                sobel_valid,
  // Prewitt edge image
  output pixel_t              prewitt_pix,
  output logic                prewitt_valid,
  // general filter image
  output pixel_t              conv_pix,
  output logic                conv_valid
);

  localparam int unsigned MAG_W = PIX_W + 4;

  pixel_t [2:0][2:0] win;
  logic              win_valid;

  pixel_window #(.K(3), .IMG_W(IMG_W), .LINE_RAM(LINE_RAM)) u_window (
    .clk      (clk),
    .rst_n    (rst_n),
    .pix_valid(pix_valid),
    .pix_in   (pix_in),
    .win      (win),
    .win_valid(win_valid)
  );

  logic [MAG_W-1:0] sobel_mag, prewitt_mag;
  logic             sobel_mag_valid, prewitt_mag_valid;

  gradient_core #(.KIND(FILT_SOBEL)) u_sobel (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (win_valid),
    .win      (win),
    .mag      (sobel_mag),
    .out_valid(sobel_mag_valid)
  );

  edge_binarize #(.MAG_W(MAG_W), .THRESHOLD(THRESHOLD)) u_sobel_bin (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sobel_mag_valid),
    .mag      (sobel_mag),
    .pix_out  (sobel_pix),
    .out_valid(sobel_valid)
  );

  gradient_core #(.KIND(FILT_PREWITT)) u_prewitt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (win_valid),
    .win      (win),
    .mag      (prewitt_mag),
    .out_valid(prewitt_mag_valid)
  );

  edge_binarize #(.MAG_W(MAG_W), .THRESHOLD(THRESHOLD)) u_prewitt_bin (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (prewitt_mag_valid),
    .mag      (prewitt_mag),
    .pix_out  (prewitt_pix),
    .out_valid(prewitt_valid)
  );

  // Both edge paths have the same depth, so their strobes coincide.
  assert property (@(posedge clk) disable iff (!rst_n) sobel_valid == prewitt_valid)
    else $error("xsg_edge_top: Sobel and Prewitt strobes out of step");

  conv_window_filter #(.K(3)) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (win_valid),
    .win       (win),
    .coef      (coef),
    .norm_shift(norm_shift),
    .pix_out   (conv_pix),
    .out_valid (conv_valid)
  );

endmodule
