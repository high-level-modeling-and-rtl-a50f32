// Self-checking testbench of edge_binarize: magnitudes around the threshold
// (94, 95, 96), the extremes and random values; output must be 255 exactly
// when the magnitude exceeds 95, two cycles after the input.
module tb_edge_binarize;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid;
  logic [11:0] mag;
  pixel_t      pix_out;
  logic        out_valid;

  edge_binarize #(.MAG_W(12), .THRESHOLD(95)) dut (.clk, .rst_n, .in_valid, .mag, .pix_out, .out_valid);

  int exp_v[$], exp_t[$];
  int cycle = 0;
  int n_edge = 0, n_flat = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, t;
    e = exp_v.pop_front(); t = exp_t.pop_front();
    checks += 2;
    if (int'(pix_out) != e) begin failures++; if (failures < 10) $display("got %0d exp %0d", pix_out, e); end
    if (cycle - t != 2) begin failures++; if (failures < 10) $display("latency %0d", cycle - t); end
    if (e == 255) n_edge++; else n_flat++;
  end

  initial begin
    in_valid = 0; mag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int m;
      @(negedge clk);
      case (n % 8)
        0: m = 94;
        1: m = 95;
        2: m = 96;
        3: m = 0;
        4: m = 2040;
        default: m = $urandom_range(0, 400);
      endcase
      mag = 12'(m);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        exp_v.push_back(binarize(m, 95));
        exp_t.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (exp_v.size() != 0) failures++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
