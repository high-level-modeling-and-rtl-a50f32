// Self-checking testbench of line_buffer: random data, random enable; after
// the k-th accepted sample the output must equal sample k-DELAY+1, and must
// hold while the enable is low. Two delays are tested, each in the
// block-RAM and the register implementation.
module tb_line_buffer;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       en;
  logic [7:0] din;
  logic [7:0] dout_a, dout_b, dout_c, dout_d;

  localparam int DA = 5;
  localparam int DB = 317;

  line_buffer #(.WIDTH(8), .DELAY(DA)) u_a (.clk, .rst_n, .en, .din, .dout(dout_a));
  line_buffer #(.WIDTH(8), .DELAY(DB)) u_b (.clk, .rst_n, .en, .din, .dout(dout_b));
  line_buffer #(.WIDTH(8), .DELAY(DA), .USE_RAM(1'b0)) u_c (.clk, .rst_n, .en, .din, .dout(dout_c));
  line_buffer #(.WIDTH(8), .DELAY(DB), .USE_RAM(1'b0)) u_d (.clk, .rst_n, .en, .din, .dout(dout_d));

  int hist[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      @(posedge clk);
      if (en) hist.push_back(din);
      @(negedge clk);
      begin
        automatic int k = hist.size() - 1;
        if (k >= DA - 1) begin
          checks++;
          if (dout_a !== 8'(hist[k - DA + 1])) begin
            failures++;
            if (failures < 10) $display("A: k=%0d got %0d exp %0d", k, dout_a, hist[k-DA+1]);
          end
        end
        // register version: reset to 0, so also checked while filling
        checks += 2;
        if (dout_c !== ((k >= DA - 1) ? 8'(hist[k - DA + 1]) : 8'd0)) begin
          failures++;
          if (failures < 10) $display("C: k=%0d got %0d", k, dout_c);
        end
        if (dout_d !== ((k >= DB - 1) ? 8'(hist[k - DB + 1]) : 8'd0)) begin
          failures++;
          if (failures < 10) $display("D: k=%0d got %0d", k, dout_d);
        end
        if (k >= DB - 1) begin
          checks++;
          if (dout_b !== 8'(hist[k - DB + 1])) begin
            failures++;
            if (failures < 10) $display("B: k=%0d got %0d exp %0d", k, dout_b, hist[k-DB+1]);
          end
        end
      end
      // pull the edge back so the loop's next negedge is the following one
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
