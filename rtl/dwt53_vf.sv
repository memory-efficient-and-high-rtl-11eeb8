// dwt53_vf: vertical filter (VF) of the 2-D 5/3 lifting DWT.
//
// Takes the row-filtered stream of the horizontal filter, one (L(r,j),
// H(r,j)) pair per clock, row r by row, and lifts down the columns:
//   HH(i,j) = H(2i+1,j) + alpha*(H(2i,j) + H(2i+2,j))
//   HL(i,j) = H(2i,j)   + beta *(HH(i,j) + HH(i-1,j))
//   LH(i,j) = L(2i+1,j) + alpha*(L(2i,j) + L(2i+2,j))
//   LL(i,j) = L(2i,j)   + beta *(LH(i,j) + LH(i-1,j))
// Each output needs one alpha and one beta operation and on average the
// stream delivers one H-column pair and one L-column pair of work per two
// rows, so a single PE(alpha) and a single PE(beta) are shared by the two
// streams and kept busy every cycle:
//   * while even row 2i+2 arrives, the H stream of pair i is lifted and
//     (HL(i,j), HH(i,j)) leave (pass PASS_H);
//   * while odd row 2i+3 arrives, the L stream of pair i is lifted from
//     stored rows and (LL(i,j), LH(i,j)) leave (pass PASS_L).
// Rows 0 and 1 are only stored. The bottom edge uses symmetric extension
// (row 2M mirrors row 2M-2, HH(-1) = HH(0)), so pair M-1 needs no further
// input: after the last row the filter runs two rows' worth of cycles on
// its own (E1: H stream, E2: L stream) and then signals frame_done.
//
// Storage is seven line delays of M words, 3.5N words in all:
//   h_even H(2i)   h_odd H(2i+1)   hh_prev HH(i-1)
//   l_even L(2i)   l_odd L(2i+1)   l_new L(2i+2)   lh_prev LH(i-1)
// each read and rewritten at the current column. Four PEs per processor,
// shared PEs in this filter and 3.5N words of line storage follow the
// reference architecture; the buffer roles, the output order and the
// self-timed flush rows are this design's own.
//
// Interface: cfg_m = pairs per row (columns per subband row), constant for
// a frame; the frame is 2*cfg_m rows. in_valid must stay low while busy
// (the two flush rows). Outputs are registered: a result leaves the cycle
// after the input (or flush step) that produced it, tagged with its pass,
// subband row and column.
module dwt53_vf
  import dwt53_pkg::*;
#(
  parameter int unsigned N = 8,                     // largest image size
  localparam int unsigned M  = N / 2,
  localparam int unsigned MW = $clog2(M + 1),
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] cfg_m,
  input  logic          in_valid,
  input  coef_t         in_l,
  input  coef_t         in_h,
  output logic          busy,
  output logic          out_valid,
  output pass_e         out_pass,
  output logic [CW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output coef_t         out_lo,      // HL or LL
  output coef_t         out_hi,      // HH or LH
  output logic          frame_done
);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [RW-1:0] rows2m;             // 2*cfg_m: index of flush row E1

  logic step, last_col, h_pass, l_pass, flush_row, first_pair;
  logic [CW-1:0] pair_i;

  coef_t h_even_q, h_odd_q, hh_prev_q, l_even_q, l_odd_q, l_new_q, lh_prev_q;
  logic  h_even_we, h_odd_we, hh_prev_we, l_even_we, l_odd_we, l_new_we, lh_prev_we;
  coef_t l_even_d;

  coef_t a_a, a_b, a_c, alpha_y;
  coef_t b_a, b_c, beta_y;

  assign rows2m     = RW'(cfg_m) << 1;
  assign busy       = (row >= rows2m);
  assign step       = busy || in_valid;
  assign last_col   = (MW'(col) == cfg_m - MW'(1));
  assign flush_row  = busy;
  assign h_pass     = (row >= RW'(2)) && !row[0];
  assign l_pass     = (row >= RW'(3)) &&  row[0];
  assign pair_i     = CW'((row >> 1) - RW'(1));
  assign first_pair = ((row >> 1) == RW'(1));

  // Shared PE(alpha): predicts HH or LH.
  always_comb begin
    if (h_pass) begin
      a_a = h_odd_q;
      a_b = h_even_q;
      a_c = flush_row ? h_even_q : in_h;
    end else begin
      a_a = l_odd_q;
      a_b = l_even_q;
      a_c = flush_row ? l_even_q : l_new_q;
    end
  end
  pe_alpha #(.INVERSE(1'b0)) u_pe_a (.a(a_a), .b(a_b), .c(a_c), .y(alpha_y));

  // Shared PE(beta): updates HL or LL.
  always_comb begin
    b_a = h_pass ? h_even_q : l_even_q;
    if (first_pair)  b_c = alpha_y;
    else if (h_pass) b_c = hh_prev_q;
    else             b_c = lh_prev_q;
  end
  pe_beta #(.INVERSE(1'b0)) u_pe_b (.a(b_a), .b(alpha_y), .c(b_c), .y(beta_y));

  // Line-delay write enables.
  always_comb begin
    h_even_we  = step && !flush_row && ((row == '0) || h_pass);
    h_odd_we   = step && !flush_row && row[0];
    hh_prev_we = step && !flush_row && h_pass;
    l_new_we   = step && !flush_row && h_pass;
    l_even_we  = step && !flush_row && ((row == '0) || l_pass);
    l_odd_we   = step && !flush_row && row[0];
    lh_prev_we = step && !flush_row && l_pass;
    l_even_d   = (row == '0) ? in_l : l_new_q;
  end

  line_buffer #(.DEPTH(M)) u_h_even  (.clk, .addr(col), .we(h_even_we),  .wdata(in_h),     .rdata(h_even_q));
  line_buffer #(.DEPTH(M)) u_h_odd   (.clk, .addr(col), .we(h_odd_we),   .wdata(in_h),     .rdata(h_odd_q));
  line_buffer #(.DEPTH(M)) u_hh_prev (.clk, .addr(col), .we(hh_prev_we), .wdata(alpha_y),  .rdata(hh_prev_q));
  line_buffer #(.DEPTH(M)) u_l_even  (.clk, .addr(col), .we(l_even_we),  .wdata(l_even_d), .rdata(l_even_q));
  line_buffer #(.DEPTH(M)) u_l_odd   (.clk, .addr(col), .we(l_odd_we),   .wdata(in_l),     .rdata(l_odd_q));
  line_buffer #(.DEPTH(M)) u_l_new   (.clk, .addr(col), .we(l_new_we),   .wdata(in_l),     .rdata(l_new_q));
  line_buffer #(.DEPTH(M)) u_lh_prev (.clk, .addr(col), .we(lh_prev_we), .wdata(alpha_y),  .rdata(lh_prev_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col        <= '0;
      row        <= '0;
      out_valid  <= 1'b0;
      out_pass   <= PASS_H;
      out_row    <= '0;
      out_col    <= '0;
      out_lo     <= '0;
      out_hi     <= '0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= step && (h_pass || l_pass);
      frame_done <= 1'b0;
      if (step) begin
        if (h_pass || l_pass) begin
          out_pass <= h_pass ? PASS_H : PASS_L;
          out_row  <= pair_i;
          out_col  <= col;
          out_lo   <= beta_y;
          out_hi   <= alpha_y;
        end
        if (last_col) begin
          col <= '0;
          if (row == rows2m + RW'(1)) begin
            row        <= '0;
            frame_done <= 1'b1;
          end else begin
            row <= row + RW'(1);
          end
        end else begin
          col <= col + CW'(1);
        end
      end
    end
  end

  // No input may arrive while the filter flushes the last pair of rows.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_valid)
    else $error("dwt53_vf: input offered during flush rows");

endmodule
