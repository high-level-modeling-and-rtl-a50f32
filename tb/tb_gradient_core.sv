// Self-checking testbench of gradient_core: random windows (with some flat
// and some extreme ones) into a Sobel and a Prewitt instance, random gaps in
// in_valid. Each result is compared with |Gx|+|Gy| from the operator
// definition and must appear exactly 5 cycles after its window.
module tb_gradient_core;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              in_valid;
  pixel_t [2:0][2:0] win;
  logic [11:0]       mag_s, mag_p;
  logic              vs, vp;

  gradient_core #(.KIND(FILT_SOBEL))   u_s (.clk, .rst_n, .in_valid, .win, .mag(mag_s), .out_valid(vs));
  gradient_core #(.KIND(FILT_PREWITT)) u_p (.clk, .rst_n, .in_valid, .win, .mag(mag_p), .out_valid(vp));

  int exp_s[$], exp_p[$], exp_t[$];
  int cycle = 0;
  int max_seen = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (vs != vp) failures++;
    if (vs) begin
      if (exp_s.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        int es, ep, et;
        es = exp_s.pop_front(); ep = exp_p.pop_front(); et = exp_t.pop_front();
        checks += 3;
        if (int'(mag_s) != es) begin failures++; if (failures < 10) $display("sobel got %0d exp %0d", mag_s, es); end
        if (int'(mag_p) != ep) begin failures++; if (failures < 10) $display("prewitt got %0d exp %0d", mag_p, ep); end
        if (cycle - et != 5) begin failures++; if (failures < 10) $display("latency %0d", cycle - et); end
        if (es > max_seen) max_seen = es;
      end
    end
  end

  initial begin
    int w[3][3];
    in_valid = 0; win = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int mode;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      mode = $urandom_range(0, 9);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          if (mode == 0)      w[i][j] = 77;                                      // flat
          else if (mode == 1) w[i][j] = (j == 2) ? 255 : ((j == 0) ? 0 : 128);  // largest Gx
          else if (mode == 2) w[i][j] = (i == 0) ? 255 : ((i == 2) ? 0 : 9);    // largest -Gy
          else                w[i][j] = $urandom_range(0, 255);
          win[i][j] = pixel_t'(w[i][j]);
        end
      if (in_valid) begin
        exp_s.push_back(grad_mag(w, 2));
        exp_p.push_back(grad_mag(w, 1));
        exp_t.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_s.size() != 0) begin failures++; $display("%0d results missing", exp_s.size()); end
    checks++;
    if (max_seen < 1020) begin failures++; $display("no large gradient seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
