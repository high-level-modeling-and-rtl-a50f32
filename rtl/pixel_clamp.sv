// Data adjustment: saturates a signed filter result into the 8-bit pixel
// range 0-255 (negative values become 0, values above 255 become 255).
// Purely combinational. The 0-255 range is the reference design's; saturation,
// rather than wrap-around or absolute value, is this design's reading of
// "adjustment".
module pixel_clamp
  import xsg_edge_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0] din,
  output pixel_t                 dout
);

  always_comb begin
    if (din < 0)                             dout = '0;
    else if (din > $signed(IN_W'(PIX_MAX)))  dout = PIX_MAX;
    else                                     dout = din[PIX_W-1:0];
  end

endmodule
