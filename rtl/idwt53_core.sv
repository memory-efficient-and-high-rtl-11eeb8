// idwt53_core: 2-D 5/3 lifting-based inverse DWT processor.
//
// Reconstructs one decomposition level: the inverse vertical filter
// (idwt53_ivf) rebuilds the L and H row streams from the four subbands and
// the inverse horizontal filter (idwt53_ihf) rebuilds each image row from
// them. Four processing elements in all, one PE(alpha) and one PE(beta) per
// filter, each busy every cycle of a frame.
//
// Input: per subband row i, cfg_m beats (HL(i,j), HH(i,j)) followed by
// cfg_m beats (LL(i,j), LH(i,j)), two coefficients per clock with a
// valid/ready handshake; this is exactly the order dwt53_core produces, so
// the two processors can be chained directly.
// Output: the image of 2*cfg_m x 2*cfg_m samples, row by row, one pair
// (x(r,2j), x(r,2j+1)) per clock tagged with row r and pair index j; no
// back-pressure. frame_done is high together with the last pair.
//
// Control: the core counts accepted beats. After the last beat of a frame
// it drops in_ready while the vertical filter runs its two flush beat rows
// and the horizontal filter its one-cycle flush. cfg_m is sampled with the
// first beat of a frame. With input every cycle, the last pixel pair
// leaves N + 3 cycles after the last input beat.
module idwt53_core
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
  output logic          in_ready,
  input  coef_t         in_lo,       // HL, then LL
  input  coef_t         in_hi,       // HH, then LH
  output logic          out_valid,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output coef_t         out_even,
  output coef_t         out_odd,
  output logic          frame_done
);

  logic          in_frame, draining, ihf_flush;
  logic [MW-1:0] m_q, m_eff;
  logic [CW-1:0] in_col;
  logic [RW-1:0] in_ph;
  logic          accept, last_beat;

  logic          ivf_valid, ivf_busy, ivf_done;
  logic [RW-1:0] ivf_row;
  logic [CW-1:0] ivf_col;
  coef_t         ivf_l, ivf_h;
  logic          ihf_valid;
  logic [RW-1:0] pend_row;
  logic [CW-1:0] pend_col;

  assign in_ready  = !draining;
  assign accept    = in_valid && in_ready;
  assign m_eff     = (in_frame || draining) ? m_q : cfg_m;
  assign last_beat = (MW'(in_col) == m_eff - MW'(1)) &&
                     (in_ph == (RW'(m_eff) << 1) - RW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame   <= 1'b0;
      draining   <= 1'b0;
      ihf_flush  <= 1'b0;
      m_q        <= MW'(M);
      in_col     <= '0;
      in_ph      <= '0;
      out_row    <= '0;
      out_col    <= '0;
      pend_row   <= '0;
      pend_col   <= '0;
      frame_done <= 1'b0;
    end else begin
      ihf_flush  <= ivf_done;
      frame_done <= ihf_flush;
      if (accept) begin
        if (!in_frame) m_q <= cfg_m;
        in_frame <= 1'b1;
        if (MW'(in_col) == m_eff - MW'(1)) begin
          in_col <= '0;
          in_ph  <= in_ph + RW'(1);
        end else begin
          in_col <= in_col + CW'(1);
        end
        if (last_beat) begin
          draining <= 1'b1;
          in_ph    <= '0;
          in_frame <= 1'b0;
        end
      end
      if (frame_done) draining <= 1'b0;
      // The horizontal filter holds one pair back: remember where the held
      // pair belongs and publish that position when it is emitted.
      if (ivf_valid) begin
        pend_row <= ivf_row;
        pend_col <= ivf_col;
      end
      if (ivf_valid || ihf_flush) begin
        out_row <= pend_row;
        out_col <= pend_col;
      end
    end
  end

  idwt53_ivf #(.N(N)) u_ivf (
    .clk, .rst_n,
    .cfg_m     (m_eff),
    .in_valid  (accept),
    .in_lo, .in_hi,
    .busy      (ivf_busy),
    .out_valid (ivf_valid),
    .out_row   (ivf_row),
    .out_col   (ivf_col),
    .out_l     (ivf_l),
    .out_h     (ivf_h),
    .frame_done(ivf_done)
  );

  idwt53_ihf #(.N(N)) u_ihf (
    .clk, .rst_n,
    .cfg_m    (m_eff),
    .in_valid (ivf_valid),
    .in_l     (ivf_l),
    .in_h     (ivf_h),
    .flush    (ihf_flush),
    .out_valid(ihf_valid),
    .out_even, .out_odd
  );

  assign out_valid = ihf_valid;

  assert property (@(posedge clk) disable iff (!rst_n) ivf_busy |-> !accept)
    else $error("idwt53_core: beat accepted during the vertical flush");

endmodule
