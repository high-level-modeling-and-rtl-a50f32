// Self-checking testbench of conv_window_filter for K = 3 and K = 5:
// random windows, random coefficient windows with entries -2..2 and random
// divisor shifts, compared with the sum of products, floor-divided and
// clamped to 0..255; latency must be 3 cycles.
module tb_conv_window_filter;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              in_valid;
  pixel_t [2:0][2:0] win3;
  coef_t  [2:0][2:0] coef3;
  pixel_t [4:0][4:0] win5;
  coef_t  [4:0][4:0] coef5;
  logic   [2:0]      norm_shift;
  pixel_t            out3, out5;
  logic              v3, v5;

  conv_window_filter #(.K(3)) u3 (.clk, .rst_n, .in_valid, .win(win3), .coef(coef3), .norm_shift,
                                  .pix_out(out3), .out_valid(v3));
  conv_window_filter #(.K(5)) u5 (.clk, .rst_n, .in_valid, .win(win5), .coef(coef5), .norm_shift,
                                  .pix_out(out5), .out_valid(v5));

  int e3[$], e5[$], et[$];
  int cycle = 0;
  int n_lo = 0, n_hi = 0, n_mid = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && v3) begin
    int a, b, t;
    a = e3.pop_front(); b = e5.pop_front(); t = et.pop_front();
    checks += 4;
    if (v5 != 1'b1) failures++;
    if (int'(out3) != a) begin failures++; if (failures < 10) $display("K3 got %0d exp %0d", out3, a); end
    if (int'(out5) != b) begin failures++; if (failures < 10) $display("K5 got %0d exp %0d", out5, b); end
    if (cycle - t != 3) begin failures++; if (failures < 10) $display("latency %0d", cycle - t); end
    if (a == 0) n_lo++; else if (a == 255) n_hi++; else n_mid++;
  end

  initial begin
    in_valid = 0; win3 = '0; win5 = '0; coef3 = '0; coef5 = '0; norm_shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int s3, s5, sh;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      sh = $urandom_range(0, 7);
      if (n % 4 == 0) sh = 0;
      norm_shift = 3'(sh);
      s3 = 0; s5 = 0;
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          int p, c;
          p = $urandom_range(0, 255);
          c = $urandom_range(0, 4) - 2;
          win5[i][j] = pixel_t'(p);
          coef5[i][j] = coef_t'(c);
          s5 += p * c;
          if (i < 3 && j < 3) begin
            win3[i][j] = pixel_t'(p);
            coef3[i][j] = coef_t'(c);
            s3 += p * c;
          end
        end
      if (in_valid) begin
        e3.push_back(clamp255(floor_shift(s3, sh)));
        e5.push_back(clamp255(floor_shift(s5, sh)));
        et.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    checks += 2;
    if (e3.size() != 0) failures++;
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin failures++; $display("range not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
