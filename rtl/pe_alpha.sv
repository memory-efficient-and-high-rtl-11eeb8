// pe_alpha: processing element for the predict (alpha) lifting step.
//
// Forward (INVERSE = 0):  y = a + alpha*(b + c) = a - ((b + c) >>> 1)
// Inverse (INVERSE = 1):  y = a - alpha*(b + c) = a + ((b + c) >>> 1)
//
// With alpha = -1/2 the multiplication is an arithmetic right shift, so the
// element is two adders and a wired shift, no multiplier. a is the odd
// sample (or high-pass coefficient), b and c are its two even neighbours.
// The sum b + c is formed one bit wider so that it cannot overflow.
// Purely combinational; the surrounding filter registers the result.
module pe_alpha
  import dwt53_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  coef_t a,
  input  coef_t b,
  input  coef_t c,
  output coef_t y
);

  logic signed [COEF_W:0] sum;
  coef_t                  half;

  always_comb begin
    sum  = {b[COEF_W-1], b} + {c[COEF_W-1], c};
    half = coef_t'(sum >>> ALPHA_SHIFT);
    if (INVERSE) y = coef_t'(a + half);
    else         y = coef_t'(a - half);
  end

endmodule
