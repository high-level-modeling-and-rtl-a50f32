// The two other image sizes the design is evaluated on, each on an instance
// built for its line length: a 320 x 250 frame (320-pixel lines, the
// default) and a 128 x 128 frame (128-pixel lines, line delays built from
// registers instead of block RAM). Synthetic images stand
// in for the photographs; the two streams run in parallel, each checked by
// its own edge_stream_checker. The general filter runs the horizontal Sobel
// mask on the first and a smoothing mask divided by 8 on the second.
module tb_xsg_edge_workloads;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks, failures;

  // ---- 320 x 250
  localparam int WA = 320, HA = 250;
  logic             a_valid;
  pixel_t           a_pix;
  coef_t [2:0][2:0] a_coef;
  logic  [2:0]      a_shift;
  pixel_t           a_sobel, a_prewitt, a_conv;
  logic             a_sv, a_pv, a_cv;

  xsg_edge_top #(.IMG_W(WA)) dut_a (
    .clk, .rst_n, .pix_valid(a_valid), .pix_in(a_pix), .coef(a_coef), .norm_shift(a_shift),
    .sobel_pix(a_sobel), .sobel_valid(a_sv), .prewitt_pix(a_prewitt), .prewitt_valid(a_pv),
    .conv_pix(a_conv), .conv_valid(a_cv));

  edge_stream_checker #(.IMG_W(WA)) chk_a (
    .clk, .rst_n, .pix_valid(a_valid), .pix_in(a_pix), .coef(a_coef), .norm_shift(a_shift),
    .sobel_pix(a_sobel), .sobel_valid(a_sv), .prewitt_pix(a_prewitt), .prewitt_valid(a_pv),
    .conv_pix(a_conv), .conv_valid(a_cv));

  // ---- 128 x 128
  localparam int WB = 128, HB = 128;
  logic             b_valid;
  pixel_t           b_pix;
  coef_t [2:0][2:0] b_coef;
  logic  [2:0]      b_shift;
  pixel_t           b_sobel, b_prewitt, b_conv;
  logic             b_sv, b_pv, b_cv;

  xsg_edge_top #(.IMG_W(WB), .LINE_RAM(1'b0)) dut_b (
    .clk, .rst_n, .pix_valid(b_valid), .pix_in(b_pix), .coef(b_coef), .norm_shift(b_shift),
    .sobel_pix(b_sobel), .sobel_valid(b_sv), .prewitt_pix(b_prewitt), .prewitt_valid(b_pv),
    .conv_pix(b_conv), .conv_valid(b_cv));

  edge_stream_checker #(.IMG_W(WB)) chk_b (
    .clk, .rst_n, .pix_valid(b_valid), .pix_in(b_pix), .coef(b_coef), .norm_shift(b_shift),
    .sobel_pix(b_sobel), .sobel_valid(b_sv), .prewitt_pix(b_prewitt), .prewitt_valid(b_pv),
    .conv_pix(b_conv), .conv_valid(b_cv));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a.checks + chk_b.checks,
             chk_a.failures + chk_b.failures + 1);
    $finish;
  end

  initial begin
    int sobel_x[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int smooth[3][3]  = '{'{1, 1, 1}, '{1, 2, 1}, '{1, 1, 1}};
    a_valid = 0; a_pix = 0; a_shift = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) a_coef[i][j] = coef_t'(sobel_x[i][j]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < HA; r++)
      for (int c = 0; c < WA; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 15) == 0) begin a_valid = 0; @(negedge clk); end
        a_valid = 1;
        a_pix   = pixel_t'(synth_pixel(r, c, WA, HA, 11));
      end
    @(negedge clk) a_valid = 0;
  end

  initial begin
    int smooth[3][3] = '{'{1, 1, 1}, '{1, 2, 1}, '{1, 1, 1}};
    b_valid = 0; b_pix = 0; b_shift = 3;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) b_coef[i][j] = coef_t'(smooth[i][j]);
    @(posedge rst_n);
    for (int r = 0; r < HB; r++)
      for (int c = 0; c < WB; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 15) == 0) begin b_valid = 0; @(negedge clk); end
        b_valid = 1;
        b_pix   = pixel_t'(synth_pixel(r, c, WB, HB, 12));
      end
    @(negedge clk) b_valid = 0;
  end

  initial begin
    @(posedge rst_n);
    wait (a_valid);
    wait (!a_valid && chk_a.n_accepted == WA * HA);
    repeat (12) @(negedge clk);
    chk_a.finish_checks(1'b0);
    chk_b.finish_checks(1'b0);
    checks   = chk_a.checks + chk_b.checks;
    failures = chk_a.failures + chk_b.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
