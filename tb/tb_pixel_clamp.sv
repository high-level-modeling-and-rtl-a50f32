// Self-checking testbench of pixel_clamp: every value of a 12-bit signed
// input must saturate to 0..255 and pass unchanged inside that range.
module tb_pixel_clamp;

  import xsg_edge_pkg::*;
  import edge_ref_pkg::*;

  int checks = 0, failures = 0;

  logic signed [11:0] din;
  pixel_t             dout;

  pixel_clamp #(.IN_W(12)) dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      din = 12'(v);
      #1;
      checks++;
      if (int'(dout) != clamp255(v)) begin
        failures++;
        if (failures < 10) $display("in %0d got %0d", v, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
