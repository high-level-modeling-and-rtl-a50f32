// Scoreboard for xsg_edge_top. It watches the pixel stream going in, keeps
// every accepted pixel, and for each one whose window is complete works out
// the Sobel, Prewitt and general-filter results from the operator
// definitions. It then checks that every output strobe carries the expected
// value, with the expected latency (8 cycles for the edge outputs, 4 for the
// general filter), and that none is missing or extra. It also counts how
// often each mechanism of the design occurred: stalls in the input stream,
// accepted pixels while the window was still filling, edge and non-edge
// decisions of both operators, and saturation at 0 and at 255 and a divisor
// in the general filter.
module edge_stream_checker
  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;
#(
  parameter int IMG_W     = 16,
  parameter int THRESHOLD = 95
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_valid,
  input  pixel_t            pix_in,
  input  coef_t [2:0][2:0]  coef,
  input  logic  [2:0]       norm_shift,
  input  pixel_t            sobel_pix,
  input  logic              sobel_valid,
  input  pixel_t            prewitt_pix,
  input  logic              prewitt_valid,
  input  pixel_t            conv_pix,
  input  logic              conv_valid
);

  localparam int LAT_EDGE = 8;
  localparam int LAT_CONV = 4;

  int checks = 0, failures = 0;
  int n_stall = 0, n_filling = 0, n_accepted = 0;
  int n_sobel_edge = 0, n_sobel_flat = 0, n_prewitt_edge = 0, n_prewitt_flat = 0;
  int n_clamp_lo = 0, n_clamp_hi = 0, n_divided = 0;
  int n_sobel_out = 0, n_conv_out = 0;

  int s[$];
  int q_sobel[$], q_prewitt[$], q_conv[$], q_te[$], q_tc[$];
  int cycle = 0;

  task automatic fail(string msg);
    failures++;
    if (failures <= 10) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cycle <= 0;
    end else begin
      cycle <= cycle + 1;
      // ---- input side
      if (!pix_valid) n_stall++;
      else begin
        int k, w[3][3], c, sh, raw;
        s.push_back(int'(pix_in));
        n_accepted++;
        k = s.size() - 1;
        if (k < 3 * IMG_W - 1) n_filling++;
        else begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++)
              w[i][j] = s[k - (2 - i) * IMG_W - (IMG_W - 3) - (2 - j)];
          q_sobel.push_back(binarize(grad_mag(w, 2), THRESHOLD));
          q_prewitt.push_back(binarize(grad_mag(w, 1), THRESHOLD));
          raw = 0;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              c = int'(coef[i][j]);
              if (c < -2 || c > 2) c = 0;
              raw += c * w[i][j];
            end
          sh = int'(norm_shift);
          raw = floor_shift(raw, sh);
          if (raw < 0) n_clamp_lo++;
          if (raw > 255) n_clamp_hi++;
          if (sh > 0) n_divided++;
          q_conv.push_back(clamp255(raw));
          q_te.push_back(cycle);
          q_tc.push_back(cycle);
        end
      end
      // ---- output side
      checks++;
      if (sobel_valid != prewitt_valid) fail("Sobel and Prewitt strobes differ");
      if (sobel_valid) begin
        if (q_sobel.size() == 0) fail("unexpected edge output");
        else begin
          int es, ep, t;
          es = q_sobel.pop_front(); ep = q_prewitt.pop_front(); t = q_te.pop_front();
          checks += 3;
          n_sobel_out++;
          if (int'(sobel_pix) != es)   fail($sformatf("sobel %0d exp %0d", sobel_pix, es));
          if (int'(prewitt_pix) != ep) fail($sformatf("prewitt %0d exp %0d", prewitt_pix, ep));
          if (cycle - t != LAT_EDGE)   fail($sformatf("edge latency %0d", cycle - t));
          if (es == 255) n_sobel_edge++; else n_sobel_flat++;
          if (ep == 255) n_prewitt_edge++; else n_prewitt_flat++;
        end
      end
      if (conv_valid) begin
        if (q_conv.size() == 0) fail("unexpected filter output");
        else begin
          int ec, t;
          ec = q_conv.pop_front(); t = q_tc.pop_front();
          checks += 2;
          n_conv_out++;
          if (int'(conv_pix) != ec)  fail($sformatf("filter %0d exp %0d", conv_pix, ec));
          if (cycle - t != LAT_CONV) fail($sformatf("filter latency %0d", cycle - t));
        end
      end
    end
  end

  // Called at the end: everything expected has come out and, if
  // require_all is set, every mechanism happened at least once.
  task automatic finish_checks(bit require_all = 1'b1);
    checks++;
    if (q_sobel.size() != 0 || q_conv.size() != 0)
      fail($sformatf("%0d edge / %0d filter results missing", q_sobel.size(), q_conv.size()));
    checks++;
    if (n_accepted - n_filling != n_sobel_out) fail("edge output count");
    checks++;
    if (n_accepted - n_filling != n_conv_out) fail("filter output count");
    if (require_all) begin
      check_seen("input stall", n_stall);
      check_seen("window filling", n_filling);
      check_seen("Sobel edge", n_sobel_edge);
      check_seen("Sobel non-edge", n_sobel_flat);
      check_seen("Prewitt edge", n_prewitt_edge);
      check_seen("Prewitt non-edge", n_prewitt_flat);
      check_seen("filter saturated at 0", n_clamp_lo);
      check_seen("filter saturated at 255", n_clamp_hi);
      check_seen("filter divisor", n_divided);
    end
    $display("pixels %0d, stall cycles %0d, filling %0d, outputs %0d/%0d",
             n_accepted, n_stall, n_filling, n_sobel_out, n_conv_out);
    $display("Sobel edge/non-edge %0d/%0d, Prewitt %0d/%0d, saturated 0/255 %0d/%0d, divided %0d",
             n_sobel_edge, n_sobel_flat, n_prewitt_edge, n_prewitt_flat,
             n_clamp_lo, n_clamp_hi, n_divided);
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) fail({what, " never happened"});
  endtask

endmodule
