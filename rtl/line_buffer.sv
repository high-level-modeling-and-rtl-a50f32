// Line buffer: delays a pixel stream by DELAY accepted samples.
//
// It is one row of DELAY shifting flip-flops (one image line minus the
// window width). Two implementations give the same behaviour, selected by
// USE_RAM, matching the two synthesis options of the reference design
// (with or without block RAM):
//   * USE_RAM = 1: a circular buffer of DELAY-1 words followed by an output
//     register, which maps onto block RAM. The memory is not reset (block RAM
//     cannot be), so whoever reads dout must wait until DELAY samples have
//     gone in; pixel_window counts them.
//   * USE_RAM = 0: a plain chain of DELAY registers, all reset to 0.
// Each cycle with en high one sample enters; after the k-th accepted sample
// dout holds sample k-DELAY+1, exactly like the last of DELAY chained
// registers. With en low nothing moves.
module line_buffer #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned DELAY   = 317,  // 320-pixel line minus a 3-pixel window
  parameter bit          USE_RAM = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  initial begin
    assert (DELAY >= 2) else $error("line_buffer: DELAY must be at least 2");
  end

  if (USE_RAM) begin : g_ram
    localparam int unsigned DEPTH = DELAY - 1;
    localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

    logic [WIDTH-1:0] mem [DEPTH];
    logic [AW-1:0]    ptr;
    logic [WIDTH-1:0] out_q;

    always_ff @(posedge clk) begin
      if (en) mem[ptr] <= din;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr   <= '0;
        out_q <= '0;
      end else if (en) begin
        out_q <= mem[ptr];
        ptr   <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end

    assign dout = out_q;
  end else begin : g_regs
    logic [DELAY-1:0][WIDTH-1:0] sr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  sr <= '0;
      else if (en) sr <= {sr[DELAY-2:0], din};
    end

    assign dout = sr[DELAY-1];
  end

endmodule
