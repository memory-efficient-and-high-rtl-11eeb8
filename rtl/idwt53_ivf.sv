// idwt53_ivf: inverse vertical filter (IVF) of the 2-D 5/3 lifting IDWT.
//
// Undoes the column lifting of the forward transform:
//   H(2i,j)   = HL(i,j) - beta *(HH(i,j) + HH(i-1,j))
//   H(2i+1,j) = HH(i,j) - alpha*(H(2i,j) + H(2i+2,j))
//   L(2i,j)   = LL(i,j) - beta *(LH(i,j) + LH(i-1,j))
//   L(2i+1,j) = LH(i,j) - alpha*(L(2i,j) + L(2i+2,j))
// Subband row i arrives as two beat rows of cfg_m beats, in the order the
// forward processor produces them: (HL(i,j), HH(i,j)) then (LL(i,j),
// LH(i,j)). During the H beat row of subband row i the filter computes
// H(2i) (PE(beta), from the inputs) and then H(2i-1) (PE(alpha), chained),
// during the L beat row L(2i) and L(2i-1); so one PE(beta) and one
// PE(alpha) are busy every cycle. The output is the row stream the inverse
// horizontal filter needs, one (L(r,j), H(r,j)) pair per clock, rows in
// order: row 2i-2 (both values stored) leaves during the H beat row of
// subband row i, row 2i-1 (L fresh, H stored) during its L beat row. The
// bottom edge uses symmetric extension (H(2M) = H(2M-2), HH(-1) = HH(0)),
// so after the last input the filter runs two flush beat rows on its own
// that emit rows 2M-2 and 2M-1, then pulses frame_done.
//
// Storage is five line delays of M words (2.5N words):
//   hh_prev HH(i-1)  h_even H(2i-2)  h_odd H(2i-1)  lh_prev LH(i-1)  l_even L(2i-2)
// The lifting equations and the one-PE(alpha)-one-PE(beta) budget follow
// the reference architecture; this schedule, which needs half a line more
// than the 2N + 15 registers quoted for its inverse processor, is this
// design's own.
//
// Interface: cfg_m = columns per subband row, constant for a frame.
// in_valid must stay low while busy. Outputs are registered (one cycle
// after the step that produced them) and tagged with image row and column.
module idwt53_ivf
  import dwt53_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned M  = N / 2,
  localparam int unsigned MW = $clog2(M + 1),
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] cfg_m,
  input  logic          in_valid,
  input  coef_t         in_lo,       // HL or LL
  input  coef_t         in_hi,       // HH or LH
  output logic          busy,
  output logic          out_valid,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output coef_t         out_l,
  output coef_t         out_h,
  output logic          frame_done
);

  logic [CW-1:0] col;
  logic [RW-1:0] ph;                 // beat row: 2i = H pass, 2i+1 = L pass
  logic [RW-1:0] rows2m;

  logic step, last_col, h_pass, first_row, emit;

  coef_t hh_prev_q, h_even_q, h_odd_q, lh_prev_q, l_even_q;
  logic  hh_prev_we, h_even_we, h_odd_we, lh_prev_we, l_even_we;

  coef_t b_c, beta_y;
  coef_t a_a, a_b, a_c, alpha_y;
  coef_t res_l, res_h;

  assign rows2m    = RW'(cfg_m) << 1;
  assign busy      = (ph >= rows2m);
  assign step      = busy || in_valid;
  assign last_col  = (MW'(col) == cfg_m - MW'(1));
  assign h_pass    = !ph[0];
  assign first_row = (ph < RW'(2));
  assign emit      = !first_row;

  // PE(beta): even row from the low band of the current beat.
  assign b_c = first_row ? in_hi : (h_pass ? hh_prev_q : lh_prev_q);
  pe_beta #(.INVERSE(1'b1)) u_pe_b (.a(in_lo), .b(in_hi), .c(b_c), .y(beta_y));

  // PE(alpha): odd row between the stored and the new even row.
  always_comb begin
    a_a = h_pass ? hh_prev_q : lh_prev_q;
    a_b = h_pass ? h_even_q  : l_even_q;
    a_c = busy   ? a_b       : beta_y;
  end
  pe_alpha #(.INVERSE(1'b1)) u_pe_a (.a(a_a), .b(a_b), .c(a_c), .y(alpha_y));

  always_comb begin
    res_l = h_pass ? l_even_q : alpha_y;
    res_h = h_pass ? h_even_q : h_odd_q;
  end

  always_comb begin
    hh_prev_we = step && !busy && h_pass;
    h_even_we  = step && !busy && h_pass;
    h_odd_we   = step && h_pass && emit;
    lh_prev_we = step && !busy && !h_pass;
    l_even_we  = step && !busy && !h_pass;
  end

  line_buffer #(.DEPTH(M)) u_hh_prev (.clk, .addr(col), .we(hh_prev_we), .wdata(in_hi),   .rdata(hh_prev_q));
  line_buffer #(.DEPTH(M)) u_h_even  (.clk, .addr(col), .we(h_even_we),  .wdata(beta_y),  .rdata(h_even_q));
  line_buffer #(.DEPTH(M)) u_h_odd   (.clk, .addr(col), .we(h_odd_we),   .wdata(alpha_y), .rdata(h_odd_q));
  line_buffer #(.DEPTH(M)) u_lh_prev (.clk, .addr(col), .we(lh_prev_we), .wdata(in_hi),   .rdata(lh_prev_q));
  line_buffer #(.DEPTH(M)) u_l_even  (.clk, .addr(col), .we(l_even_we),  .wdata(beta_y),  .rdata(l_even_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col        <= '0;
      ph         <= '0;
      out_valid  <= 1'b0;
      out_row    <= '0;
      out_col    <= '0;
      out_l      <= '0;
      out_h      <= '0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= step && emit;
      frame_done <= 1'b0;
      if (step) begin
        if (emit) begin
          out_row <= ph - RW'(2);
          out_col <= col;
          out_l   <= res_l;
          out_h   <= res_h;
        end
        if (last_col) begin
          col <= '0;
          if (ph == rows2m + RW'(1)) begin
            ph         <= '0;
            frame_done <= 1'b1;
          end else begin
            ph <= ph + RW'(1);
          end
        end else begin
          col <= col + CW'(1);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_valid)
    else $error("idwt53_ivf: input offered during flush rows");

endmodule
