// Full-size testbench: xsg_edge_top at its default parameters (320-pixel
// lines) processes one 320 x 256 frame of a synthetic image, the size of
// the larger test image the design targets, with random stalls. The
// general filter uses the horizontal Sobel mask for the upper half of the
// frame and a smoothing mask divided by 8 for the lower half (changed while
// the stream pauses). Every output is checked by edge_stream_checker.
module tb_xsg_edge_full;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 320;
  localparam int H = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             pix_valid;
  pixel_t           pix_in;
  coef_t [2:0][2:0] coef;
  logic  [2:0]      norm_shift;
  pixel_t           sobel_pix, prewitt_pix, conv_pix;
  logic             sobel_valid, prewitt_valid, conv_valid;

  xsg_edge_top dut (.*);

  edge_stream_checker #(.IMG_W(W)) chk (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic drive_rows(int r0, int r1);
    for (int r = r0; r < r1; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 15) == 0) begin
          pix_valid = 0;
          @(negedge clk);
        end
        pix_valid = 1;
        pix_in    = pixel_t'(synth_pixel(r, c, W, H, 7));
      end
    @(negedge clk) pix_valid = 0;
  endtask

  initial begin
    int sobel_x[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int smooth[3][3]  = '{'{1, 1, 1}, '{1, 2, 1}, '{1, 1, 1}};
    pix_valid = 0; pix_in = 0; coef = '0; norm_shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_coef(sobel_x, 0);
    drive_rows(0, H / 2);
    set_coef(smooth, 3);
    drive_rows(H / 2, H);
    repeat (12) @(negedge clk);
    chk.finish_checks();
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

endmodule
