// dwt53_hf: horizontal filter (HF) of the 2-D 5/3 lifting DWT.
//
// Applies the 1-D 5/3 lifting transform along each image row:
//   H(j) = x(2j+1) + alpha*(x(2j) + x(2j+2))      (predict, PE(alpha))
//   L(j) = x(2j)   + beta *(H(j) + H(j-1))         (update,  PE(beta))
// The row arrives as one even/odd sample pair (x(2j), x(2j+1)) per clock,
// and one (L(j), H(j)) pair leaves per clock, so the filter is fully used.
//
// H(j) needs x(2j+2), the even sample of the next pair, so the filter keeps
// one pair pending: when pair j arrives it completes pair j-1 (PE(alpha)
// then PE(beta), chained in one cycle) and registers the result. The row
// edges use symmetric extension, x(2M) = x(2M-2) and H(-1) = H(0), as the
// 5/3 filter of JPEG 2000 does; the reference architecture leaves edge
// handling open. Because the last pair of a row is completed by the first pair
// of the next row, rows follow each other without a bubble. After the last
// pair of a frame a one-cycle flush completes the pending pair.
//
// Interface: cfg_m is the number of pairs per row (image width / 2) and
// must stay constant during a frame. in_valid may drop at any time (the
// filter then waits). out_valid/out_l/out_h are registered, so a pair's
// result appears two cycles after it was given, or one cycle after flush.
module dwt53_hf
  import dwt53_pkg::*;
#(
  parameter int unsigned N = 8,                     // largest image width
  localparam int unsigned M  = N / 2,
  localparam int unsigned MW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] cfg_m,
  input  logic          in_valid,
  input  coef_t         in_even,
  input  coef_t         in_odd,
  input  logic          flush,
  output logic          out_valid,
  output coef_t         out_l,
  output coef_t         out_h
);

  // Pending pair and the H of the pair before it.
  logic          pend_vld;
  coef_t         pend_e, pend_o;
  logic [MW-1:0] pend_col;
  coef_t         h_prev;
  logic [MW-1:0] in_col;          // column of the next arriving pair

  logic  step;
  logic  pend_last, pend_first;
  coef_t next_even, h_new, h_left, l_new;

  assign step       = in_valid || (flush && pend_vld);
  assign pend_last  = (pend_col == cfg_m - MW'(1));
  assign pend_first = (pend_col == '0);
  // Right edge: mirror x(2M) = x(2M-2).
  assign next_even  = pend_last ? pend_e : in_even;
  // Left edge: mirror H(-1) = H(0).
  assign h_left     = pend_first ? h_new : h_prev;

  pe_alpha #(.INVERSE(1'b0)) u_pe_a (.a(pend_o), .b(pend_e), .c(next_even), .y(h_new));
  pe_beta  #(.INVERSE(1'b0)) u_pe_b (.a(pend_e), .b(h_new),  .c(h_left),    .y(l_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_vld  <= 1'b0;
      pend_e    <= '0;
      pend_o    <= '0;
      pend_col  <= '0;
      h_prev    <= '0;
      in_col    <= '0;
      out_valid <= 1'b0;
      out_l     <= '0;
      out_h     <= '0;
    end else begin
      out_valid <= step && pend_vld;
      if (step && pend_vld) begin
        out_l  <= l_new;
        out_h  <= h_new;
        h_prev <= h_new;
      end
      if (in_valid) begin
        pend_vld <= 1'b1;
        pend_e   <= in_even;
        pend_o   <= in_odd;
        pend_col <= in_col;
        in_col   <= (in_col == cfg_m - MW'(1)) ? '0 : in_col + MW'(1);
      end else if (flush) begin
        pend_vld <= 1'b0;
        in_col   <= '0;
      end
    end
  end

endmodule
