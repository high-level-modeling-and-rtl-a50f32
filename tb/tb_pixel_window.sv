// Self-checking testbench of pixel_window for a 3x3 window on 8-pixel lines
// (block-RAM and register line delays) and a 5x5 window on 9-pixel lines. A random stream with random gaps is fed;
// after every accepted pixel k the window must hold
// win[i][j] = s[k - (K-1-i)*W - (W-K) - (K-1-j)] (the first row sits behind a
// line delay of W-K), and win_valid must pulse exactly
// when k >= K*W-1.
module tb_pixel_window;

  import xsg_edge_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W3 = 8;
  localparam int W5 = 9;

  logic   pix_valid;
  pixel_t pix_in;
  pixel_t [2:0][2:0] win3, win3r;
  pixel_t [4:0][4:0] win5;
  logic   v3, v3r, v5;

  pixel_window #(.K(3), .IMG_W(W3)) u3 (.clk, .rst_n, .pix_valid, .pix_in, .win(win3), .win_valid(v3));
  pixel_window #(.K(3), .IMG_W(W3), .LINE_RAM(1'b0)) u3r (.clk, .rst_n, .pix_valid, .pix_in, .win(win3r), .win_valid(v3r));
  pixel_window #(.K(5), .IMG_W(W5)) u5 (.clk, .rst_n, .pix_valid, .pix_in, .win(win5), .win_valid(v5));

  int s[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (k=%0d)", what, s.size() - 1);
    end
  endtask

  initial begin
    pix_valid = 0; pix_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      bit acc;
      pix_valid = ($urandom_range(0, 4) != 0);
      pix_in    = pixel_t'($urandom);
      acc       = pix_valid;
      @(posedge clk);
      if (acc) s.push_back(pix_in);
      @(negedge clk);
      begin
        automatic int k = s.size() - 1;
        check(v3 == (acc && k >= 3 * W3 - 1), "win_valid K=3");
        check(v3r == (acc && k >= 3 * W3 - 1), "win_valid K=3 registers");
        check(v5 == (acc && k >= 5 * W5 - 1), "win_valid K=5");
        if (k >= 3 * W3 - 1)
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              check(win3[i][j] == pixel_t'(s[k - (2 - i) * W3 - (W3 - 3) - (2 - j)]), "win K=3");
              check(win3r[i][j] == pixel_t'(s[k - (2 - i) * W3 - (W3 - 3) - (2 - j)]), "win K=3 registers");
            end
        if (k >= 5 * W5 - 1)
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              check(win5[i][j] == pixel_t'(s[k - (4 - i) * W5 - (W5 - 5) - (4 - j)]), "win K=5");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
