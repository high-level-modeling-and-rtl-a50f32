// End-to-end testbench of xsg_edge_top on 16-pixel lines: three 12-line
// frames of a synthetic image with random stalls in the pixel stream. The
// general filter runs the horizontal Sobel mask undivided in the first
// frame, a smoothing mask divided by 8 in the second and a sharpening mask
// divided by 2 in the third; the coefficients change only while the stream
// is idle. edge_stream_checker compares every output and counts the
// mechanisms exercised.
module tb_xsg_edge_top;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             pix_valid;
  pixel_t           pix_in;
  coef_t [2:0][2:0] coef;
  logic  [2:0]      norm_shift;
  pixel_t           sobel_pix, prewitt_pix, conv_pix;
  logic             sobel_valid, prewitt_valid, conv_valid;

  xsg_edge_top #(.IMG_W(W)) dut (.*);

  edge_stream_checker #(.IMG_W(W)) chk (.*);

  initial begin
    repeat (20000) @(posedge clk);
    chk.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  task automatic set_coef(int m[3][3], int sh);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) coef[i][j] = coef_t'(m[i][j]);
    norm_shift = 3'(sh);
  endtask

  task automatic drive_frame(int seed);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          pix_valid = 0;
          @(negedge clk);
        end
        pix_valid = 1;
        pix_in    = pixel_t'(synth_pixel(r, c, W, H, seed));
      end
    @(negedge clk) pix_valid = 0;
  endtask

  initial begin
    int sobel_x[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int smooth[3][3]  = '{'{1, 1, 1}, '{1, 2, 1}, '{1, 1, 1}};
    int sharpen[3][3] = '{'{0, -1, 0}, '{-1, 2, -1}, '{0, -1, 0}};
    pix_valid = 0; pix_in = 0; coef = '0; norm_shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_coef(sobel_x, 0);
    drive_frame(1);
    set_coef(smooth, 3);
    drive_frame(2);
    set_coef(sharpen, 1);
    drive_frame(3);
    repeat (12) @(negedge clk);
    chk.finish_checks();
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

endmodule
