// pe_beta: processing element for the update (beta) lifting step.
//
// Forward (INVERSE = 0):  y = a + beta*(b + c) = a + ((b + c + 2) >>> 2)
// Inverse (INVERSE = 1):  y = a - beta*(b + c) = a - ((b + c + 2) >>> 2)
//
// With beta = 1/4 the multiplication is an arithmetic right shift by two;
// the +2 rounds to nearest, as in the reversible 5/3 filter of JPEG 2000
// (the rounding is this design's choice). a is the even sample (or low-pass
// coefficient), b and c are the two neighbouring high-pass coefficients.
// Purely combinational; the surrounding filter registers the result.
module pe_beta
  import dwt53_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  coef_t a,
  input  coef_t b,
  input  coef_t c,
  output coef_t y
);

  logic signed [COEF_W+1:0] sum;
  coef_t                    quarter;

  always_comb begin
    sum     = {{2{b[COEF_W-1]}}, b} + {{2{c[COEF_W-1]}}, c} + (COEF_W+2)'(BETA_ROUND);
    quarter = coef_t'(sum >>> BETA_SHIFT);
    if (INVERSE) y = coef_t'(a - quarter);
    else         y = coef_t'(a + quarter);
  end

endmodule
