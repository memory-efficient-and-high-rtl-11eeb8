// idwt53_ihf: inverse horizontal filter (IHF) of the 2-D 5/3 lifting IDWT.
//
// Rebuilds each image row from its low-pass and high-pass halves:
//   x(2j)   = L(j) - beta *(H(j) + H(j-1))          (PE(beta))
//   x(2j+1) = H(j) - alpha*(x(2j) + x(2j+2))         (PE(alpha))
// One (L(j), H(j)) pair enters and one pixel pair (x(2j), x(2j+1)) leaves
// per clock. x(2j+1) needs x(2j+2), computed from the next pair, so the
// filter keeps one pair pending: when pair j arrives, PE(beta) forms x(2j)
// and PE(alpha), chained in the same cycle, completes the pending pair
// j-1. Row edges use symmetric extension (H(-1) = H(0), x(2M) = x(2M-2)).
// The last pair of a row is completed by the first pair of the next row,
// or by a one-cycle flush after the last row of a frame.
//
// Interface: cfg_m = pairs per row, constant for a frame; in_valid may drop
// at any time. Outputs are registered: a pair leaves two cycles after its
// input, or one cycle after flush.
module idwt53_ihf
  import dwt53_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned M  = N / 2,
  localparam int unsigned MW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] cfg_m,
  input  logic          in_valid,
  input  coef_t         in_l,
  input  coef_t         in_h,
  input  logic          flush,
  output logic          out_valid,
  output coef_t         out_even,
  output coef_t         out_odd
);

  logic          pend_vld;
  coef_t         pend_x, pend_h;
  logic [MW-1:0] pend_col;
  logic [MW-1:0] in_col;

  logic  step, pend_last;
  coef_t h_left, x_even, next_even, x_odd;

  assign step      = in_valid || (flush && pend_vld);
  assign pend_last = (pend_col == cfg_m - MW'(1));
  assign h_left    = (in_col == '0) ? in_h : pend_h;
  assign next_even = pend_last ? pend_x : x_even;

  pe_beta  #(.INVERSE(1'b1)) u_pe_b (.a(in_l),   .b(in_h),   .c(h_left),    .y(x_even));
  pe_alpha #(.INVERSE(1'b1)) u_pe_a (.a(pend_h), .b(pend_x), .c(next_even), .y(x_odd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_vld  <= 1'b0;
      pend_x    <= '0;
      pend_h    <= '0;
      pend_col  <= '0;
      in_col    <= '0;
      out_valid <= 1'b0;
      out_even  <= '0;
      out_odd   <= '0;
    end else begin
      out_valid <= step && pend_vld;
      if (step && pend_vld) begin
        out_even <= pend_x;
        out_odd  <= x_odd;
      end
      if (in_valid) begin
        pend_vld <= 1'b1;
        pend_x   <= x_even;
        pend_h   <= in_h;
        pend_col <= in_col;
        in_col   <= (in_col == cfg_m - MW'(1)) ? '0 : in_col + MW'(1);
      end else if (flush) begin
        pend_vld <= 1'b0;
        in_col   <= '0;
      end
    end
  end

endmodule
