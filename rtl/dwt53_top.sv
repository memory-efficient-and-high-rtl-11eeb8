// dwt53_top: the 2-D 5/3 lifting DWT processor and IDWT processor.
//
// The two processors are independent and stand side by side, each with its
// own ports (prefix dwt_ for the forward transform, idwt_ for the inverse)
// and sharing only clock and reset. Both move two coefficients per clock.
// The forward processor's output order, per subband row (HL,HH) beats then
// (LL,LH) beats, is the inverse processor's input order, so a codec test
// can wire dwt_out_* to idwt_in_* directly; multi-level transforms are
// built by storing the LL subband of one level outside and sending it back
// in with cfg_m halved.
//
// N is the largest image size (N x N samples, N even); the default of 8
// is the size of the implemented processors the design is modelled on.
// Each frame may be smaller: cfg_m = width / 2, sampled at frame start.
// See dwt53_core and idwt53_core for the handshakes and latencies.
module dwt53_top
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
  // Forward DWT processor
  input  logic [MW-1:0] dwt_cfg_m,
  input  logic          dwt_in_valid,
  output logic          dwt_in_ready,
  input  coef_t         dwt_in_even,
  input  coef_t         dwt_in_odd,
  output logic          dwt_out_valid,
  output pass_e         dwt_out_pass,
  output logic [CW-1:0] dwt_out_row,
  output logic [CW-1:0] dwt_out_col,
  output coef_t         dwt_out_lo,
  output coef_t         dwt_out_hi,
  output logic          dwt_frame_done,
  // Inverse DWT processor
  input  logic [MW-1:0] idwt_cfg_m,
  input  logic          idwt_in_valid,
  output logic          idwt_in_ready,
  input  coef_t         idwt_in_lo,
  input  coef_t         idwt_in_hi,
  output logic          idwt_out_valid,
  output logic [RW-1:0] idwt_out_row,
  output logic [CW-1:0] idwt_out_col,
  output coef_t         idwt_out_even,
  output coef_t         idwt_out_odd,
  output logic          idwt_frame_done
);

  dwt53_core #(.N(N)) u_dwt (
    .clk, .rst_n,
    .cfg_m     (dwt_cfg_m),
    .in_valid  (dwt_in_valid),
    .in_ready  (dwt_in_ready),
    .in_even   (dwt_in_even),
    .in_odd    (dwt_in_odd),
    .out_valid (dwt_out_valid),
    .out_pass  (dwt_out_pass),
    .out_row   (dwt_out_row),
    .out_col   (dwt_out_col),
    .out_lo    (dwt_out_lo),
    .out_hi    (dwt_out_hi),
    .frame_done(dwt_frame_done)
  );

  idwt53_core #(.N(N)) u_idwt (
    .clk, .rst_n,
    .cfg_m     (idwt_cfg_m),
    .in_valid  (idwt_in_valid),
    .in_ready  (idwt_in_ready),
    .in_lo     (idwt_in_lo),
    .in_hi     (idwt_in_hi),
    .out_valid (idwt_out_valid),
    .out_row   (idwt_out_row),
    .out_col   (idwt_out_col),
    .out_even  (idwt_out_even),
    .out_odd   (idwt_out_odd),
    .frame_done(idwt_frame_done)
  );

endmodule
