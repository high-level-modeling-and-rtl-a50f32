// Shared types and constants of the streaming edge-detection datapath.
//
// Pixels are 8-bit unsigned grey levels (0-255). Filter coefficients are
// limited to {-2,-1,0,1,2}, the set used by the gradient operators, so that
// every product reduces to a negation and/or a one-bit left shift. The
// gradient unit computes either the Sobel or the Prewitt operator, chosen by
// the filter_kind_e parameter.
package xsg_edge_pkg;

  localparam int unsigned PIX_W  = 8;   // grey-level pixel width
  localparam int unsigned COEF_W = 3;   // signed coefficient, -2..2

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Operator computed by gradient_core.
  typedef enum logic [0:0] {
    FILT_SOBEL   = 1'b0,   // centre row/column weighted by 2
    FILT_PREWITT = 1'b1    // all weights 1
  } filter_kind_e;

  localparam pixel_t PIX_MAX = pixel_t'((1 << PIX_W) - 1);

  // Product of a pixel and a coefficient in {-2..2} with add/shift only.
  // A coefficient outside that set (only -4 or 3 fit in COEF_W bits) is
  // treated as 0.
  function automatic logic signed [PIX_W+2:0] coef_term(pixel_t p, coef_t c);
    logic signed [PIX_W+2:0] v;
    v = $signed({3'b000, p});
    unique case (c)
      3'sd1:   return v;
      3'sd2:   return v <<< 1;
      -3'sd1:  return -v;
      -3'sd2:  return -(v <<< 1);
      default: return '0;
    endcase
  endfunction

endpackage
