// tb_dwt53_512: 512 x 512 image workload through the DWT and IDWT
// processors, with the maximum image size raised to N = 512.
//
// A synthetic 8-bit test image (smooth gradients, a sharp-edged disc and
// noise; a stand-in for a natural photograph) is sent gap-free through the
// forward processor, whose output is chained directly into the inverse
// processor. Every subband beat is checked against the reference
// transform and every reconstructed pixel must equal the original, so the
// reconstruction is lossless (infinite PSNR). The LL subband is then taken
// through two more forward levels (256 x 256, 128 x 128), checked likewise.
// The cycle count of the one-level frame is checked against this design's
// timing (N*N/2 cycles in, last subband beat N + 3 cycles after the last
// input) and printed beside (4N^2(1-4^-j) + 9N)/6, the figure of merit
// for this architecture.
module tb_dwt53_512;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 512;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned RW = $clog2(N + 2);

  typedef struct { int pass; int row; int col; int lo; int hi; } beat_t;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] dwt_cfg_m, idwt_cfg_m;
  logic dwt_in_valid = 0, dwt_in_ready;
  coef_t dwt_in_even = '0, dwt_in_odd = '0;
  logic dwt_out_valid, dwt_frame_done;
  pass_e dwt_out_pass;
  logic [CW-1:0] dwt_out_row, dwt_out_col;
  coef_t dwt_out_lo, dwt_out_hi;
  logic idwt_in_valid, idwt_in_ready;
  coef_t idwt_in_lo, idwt_in_hi;
  logic idwt_out_valid, idwt_frame_done;
  logic [RW-1:0] idwt_out_row;
  logic [CW-1:0] idwt_out_col;
  coef_t idwt_out_even, idwt_out_odd;

  logic chain = 1'b1;
  assign idwt_in_valid = chain && dwt_out_valid;
  assign idwt_in_lo    = dwt_out_lo;
  assign idwt_in_hi    = dwt_out_hi;

  dwt53_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, pix_bad = 0, pix_seen = 0;
  beat_t dq[$];
  int img[];
  int cap_m = M;
  int cap_ll[];
  longint first_in_cycle, last_in_cycle, last_out_cycle, last_rec_cycle;

  always @(posedge clk) if (rst_n) begin
    if (idwt_in_valid && !idwt_in_ready) begin failures++; $display("FAIL chained beat refused"); end
    if (dwt_out_valid) begin
      beat_t e;
      int idx;
      last_out_cycle = $time / 10;
      idx = int'(dwt_out_row) * cap_m + int'(dwt_out_col);
      if (dwt_out_pass == PASS_L) cap_ll[idx] = int'(dwt_out_lo);
      checks++;
      if (dq.size() == 0) begin failures++; $display("FAIL unexpected DWT output"); end
      else begin
        e = dq.pop_front();
        if (int'(dwt_out_pass) != e.pass || int'(dwt_out_row) != e.row || int'(dwt_out_col) != e.col ||
            int'(dwt_out_lo) != e.lo || int'(dwt_out_hi) != e.hi) begin
          failures++;
          if (failures < 10) $display("FAIL DWT beat row %0d col %0d", e.row, e.col);
        end
      end
    end
    if (idwt_out_valid) begin
      int idx;
      last_rec_cycle = $time / 10;
      idx = int'(idwt_out_row) * N + 2 * int'(idwt_out_col);
      pix_seen += 2;
      if (int'(idwt_out_even) != img[idx])     pix_bad++;
      if (int'(idwt_out_odd)  != img[idx + 1]) pix_bad++;
    end
  end

  task automatic send_dwt(int src[], int n);
    arr_t ll, lh, hl, hh;
    int m = n / 2;
    fwd2d(src, n, ll, lh, hl, hh);
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < m; j++) dq.push_back('{int'(PASS_H), i, j, hl[i*m+j], hh[i*m+j]});
      for (int j = 0; j < m; j++) dq.push_back('{int'(PASS_L), i, j, ll[i*m+j], lh[i*m+j]});
    end
    cap_m = m;
    cap_ll = new[m*m];
    dwt_cfg_m  = MW'(m);
    idwt_cfg_m = MW'(m);
    for (int k = 0; k < n*m; k++) begin
      dwt_in_valid <= 1;
      dwt_in_even  <= coef_t'(src[2*k]);
      dwt_in_odd   <= coef_t'(src[2*k + 1]);
      do @(posedge clk); while (!dwt_in_ready);
      if (k == 0) first_in_cycle = $time / 10;
      last_in_cycle = $time / 10;
    end
    dwt_in_valid <= 0;
    while (!dwt_frame_done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (dq.size() != 0) begin failures++; $display("FAIL %0d beats missing", dq.size()); dq.delete(); end
  endtask

  initial begin
    int lvl_in[];
    real formula_t;
    img = new[N*N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int v = (r + 2*c) / 6 + 40;
        int dr = r - 300, dc = c - 200;
        if (dr*dr + dc*dc < 90*90) v = 220 - (c / 8);
        v += $urandom_range(0, 15) - 7;
        img[r*N + c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    dwt_cfg_m  = MW'(M);
    idwt_cfg_m = MW'(M);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // Level 1, chained forward and inverse.
    send_dwt(img, N);
    while (!idwt_frame_done) @(posedge clk);
    @(posedge clk);
    chain = 1'b0;
    checks += 3;
    if (pix_seen != N*N || pix_bad != 0) begin
      failures++; $display("FAIL reconstruction: %0d of %0d pixels wrong", pix_bad, pix_seen);
    end
    if (last_in_cycle - first_in_cycle + 1 != N*N/2) begin
      failures++; $display("FAIL input took %0d cycles", last_in_cycle - first_in_cycle + 1);
    end
    if (last_out_cycle - last_in_cycle != N + 3) begin
      failures++; $display("FAIL forward latency %0d", last_out_cycle - last_in_cycle);
    end
    formula_t = (4.0 * N * N * (1.0 - 0.25) + 9.0 * N) / 6.0;
    $display("one level, %0dx%0d: forward %0d cycles from first input to last subband beat (formula: %0.0f)",
             N, N, last_out_cycle - first_in_cycle + 1, formula_t);
    $display("reconstructed image complete %0d cycles after the first input; %0d pixels, %0d differ",
             last_rec_cycle - first_in_cycle + 1, pix_seen, pix_bad);

    // Levels 2 and 3 on the LL subband.
    lvl_in = cap_ll;
    send_dwt(lvl_in, N/2);
    lvl_in = cap_ll;
    send_dwt(lvl_in, N/4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
