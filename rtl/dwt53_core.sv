// dwt53_core: 2-D 5/3 lifting-based forward DWT processor.
//
// One decomposition level of an image of 2*cfg_m x 2*cfg_m samples: the
// horizontal filter (dwt53_hf) lifts each row into L and H halves, and the
// vertical filter (dwt53_vf) lifts the columns of both halves into the four
// subbands LL, LH, HL, HH. Four processing elements in all (one PE(alpha)
// and one PE(beta) in each filter), each busy every cycle of a frame.
//
// Input: the image row by row, two horizontally adjacent samples (even
// column, odd column) per clock with a valid/ready handshake. Samples are
// signed coefficients, so an LL subband can be fed back in, with cfg_m
// halved, to compute the next decomposition level.
// Output: per subband row i, first cfg_m beats (HL(i,j), HH(i,j)) and then
// cfg_m beats (LL(i,j), LH(i,j)), each tagged with pass, row and column;
// no back-pressure. frame_done is high together with the last beat.
//
// Control: the core counts the accepted pairs. After the last pair of a
// frame it drops in_ready, flushes the horizontal filter for one cycle and
// lets the vertical filter run its two flush rows; in_ready returns the
// cycle after frame_done. cfg_m is sampled with the first pair of a frame.
// With input every cycle, a frame of N x N samples takes N*N/2 cycles to enter and its
// last output is sampled N + 3 clock edges after the edge that accepts the
// last input pair.
module dwt53_core
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
  input  coef_t         in_even,
  input  coef_t         in_odd,
  output logic          out_valid,
  output pass_e         out_pass,
  output logic [CW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output coef_t         out_lo,
  output coef_t         out_hi,
  output logic          frame_done
);

  logic          in_frame;       // at least one pair of the frame accepted
  logic          draining;
  logic          hf_flush;
  logic [MW-1:0] m_q, m_eff;
  logic [CW-1:0] in_col;
  logic [RW-1:0] in_row;
  logic          accept, last_pair;

  logic  hf_valid, vf_busy;
  coef_t hf_l, hf_h;

  assign in_ready  = !draining && !hf_flush;
  assign accept    = in_valid && in_ready;
  assign m_eff     = (in_frame || draining) ? m_q : cfg_m;
  assign last_pair = (MW'(in_col) == m_eff - MW'(1)) &&
                     (in_row == (RW'(m_eff) << 1) - RW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0;
      draining <= 1'b0;
      hf_flush <= 1'b0;
      m_q      <= MW'(M);
      in_col   <= '0;
      in_row   <= '0;
    end else begin
      hf_flush <= 1'b0;
      if (accept) begin
        if (!in_frame) m_q <= cfg_m;
        in_frame <= 1'b1;
        if (MW'(in_col) == m_eff - MW'(1)) begin
          in_col <= '0;
          in_row <= in_row + RW'(1);
        end else begin
          in_col <= in_col + CW'(1);
        end
        if (last_pair) begin
          draining <= 1'b1;
          hf_flush <= 1'b1;
          in_row   <= '0;
          in_frame <= 1'b0;
        end
      end
      if (frame_done) draining <= 1'b0;
    end
  end

  dwt53_hf #(.N(N)) u_hf (
    .clk, .rst_n,
    .cfg_m    (m_eff),
    .in_valid (accept),
    .in_even, .in_odd,
    .flush    (hf_flush),
    .out_valid(hf_valid),
    .out_l    (hf_l),
    .out_h    (hf_h)
  );

  dwt53_vf #(.N(N)) u_vf (
    .clk, .rst_n,
    .cfg_m    (m_q),
    .in_valid (hf_valid),
    .in_l     (hf_l),
    .in_h     (hf_h),
    .busy     (vf_busy),
    .out_valid, .out_pass, .out_row, .out_col, .out_lo, .out_hi,
    .frame_done
  );

  // The horizontal filter must have drained before the vertical one flushes.
  assert property (@(posedge clk) disable iff (!rst_n) vf_busy |-> !hf_valid)
    else $error("dwt53_core: row data reached the vertical filter during its flush");

endmodule
