// tb_dwt53_top: end-to-end test of the DWT and IDWT processors, at the
// top's default parameters.
//
// Part 1, codec chain: the forward processor's output is wired straight to
// the inverse processor's input. Random 8-bit images go in with random idle
// cycles; every subband beat is checked against the reference transform
// and every reconstructed pixel pair must equal the original image.
// Part 2, two-level decomposition: level 1 of an image, then its LL
// subband sent back with cfg_m halved (level 2); then the inverse: level 2
// rebuilds LL1, which with the stored level-1 detail subbands rebuilds the
// image. All intermediate results are checked.
// Part 3, timing: a gap-free frame must take N*N/2 cycles to enter and
// leave its last beat N + 3 cycles later.
// Each mechanism the design has is counted and must occur at least once:
// input stalls (ready low) on both processors, idle input cycles, the
// flush rows after each frame, frame size switches and chained operation.
module tb_dwt53_top;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned RW = $clog2(N + 2);

  typedef struct { int pass; int row; int col; int lo; int hi; } beat_t;
  typedef struct { int row; int col; int xe; int xo; } pair_t;

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

  // Inverse input: chained from the forward processor or driven here.
  logic  chain = 1'b0;
  logic  drv_valid = 1'b0;
  coef_t drv_lo = '0, drv_hi = '0;
  assign idwt_in_valid = chain ? dwt_out_valid : drv_valid;
  assign idwt_in_lo    = chain ? dwt_out_lo    : drv_lo;
  assign idwt_in_hi    = chain ? dwt_out_hi    : drv_hi;

  dwt53_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dwt_stall = 0, n_idwt_stall = 0, n_gap = 0, n_dwt_flush = 0, n_idwt_flush = 0;
  int n_size_switch = 0, n_chained = 0;
  beat_t dq[$];
  pair_t iq[$];
  int cap_m = M, cap_n = N;
  int cap_ll[], cap_lh[], cap_hl[], cap_hh[], cap_img[];
  longint first_in_cycle, last_in_cycle, last_out_cycle;

  always @(posedge clk) if (rst_n) begin
    if (dwt_in_valid && !dwt_in_ready) n_dwt_stall++;
    if (idwt_in_valid && !idwt_in_ready) begin
      n_idwt_stall++;
      if (chain) begin failures++; $display("FAIL chained beat refused by the inverse processor"); end
    end
    if (dwt_frame_done) n_dwt_flush++;
    if (idwt_frame_done) n_idwt_flush++;
    if (dwt_out_valid) begin
      beat_t e;
      int idx;
      last_out_cycle = $time / 10;
      idx = int'(dwt_out_row) * cap_m + int'(dwt_out_col);
      if (dwt_out_pass == PASS_H) begin cap_hl[idx] = int'(dwt_out_lo); cap_hh[idx] = int'(dwt_out_hi); end
      else                        begin cap_ll[idx] = int'(dwt_out_lo); cap_lh[idx] = int'(dwt_out_hi); end
      checks++;
      if (dq.size() == 0) begin failures++; $display("FAIL unexpected DWT output"); end
      else begin
        e = dq.pop_front();
        if (int'(dwt_out_pass) != e.pass || int'(dwt_out_row) != e.row || int'(dwt_out_col) != e.col ||
            int'(dwt_out_lo) != e.lo || int'(dwt_out_hi) != e.hi) begin
          failures++;
          $display("FAIL DWT got %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", dwt_out_pass, dwt_out_row,
                   dwt_out_col, dwt_out_lo, dwt_out_hi, e.pass, e.row, e.col, e.lo, e.hi);
        end
      end
    end
    if (idwt_out_valid) begin
      pair_t e;
      int idx;
      idx = int'(idwt_out_row) * cap_n + 2 * int'(idwt_out_col);
      cap_img[idx]     = int'(idwt_out_even);
      cap_img[idx + 1] = int'(idwt_out_odd);
      checks++;
      if (iq.size() == 0) begin failures++; $display("FAIL unexpected IDWT output"); end
      else begin
        e = iq.pop_front();
        if (int'(idwt_out_row) != e.row || int'(idwt_out_col) != e.col ||
            int'(idwt_out_even) != e.xe || int'(idwt_out_odd) != e.xo) begin
          failures++;
          $display("FAIL IDWT got %0d %0d %0d %0d exp %0d %0d %0d %0d", idwt_out_row, idwt_out_col,
                   idwt_out_even, idwt_out_odd, e.row, e.col, e.xe, e.xo);
        end
      end
    end
  end

  function automatic arr_t rand_image(int n);
    arr_t img = new[n*n];
    foreach (img[k]) img[k] = $urandom_range(0, 255);
    return img;
  endfunction

  task automatic expect_image(arr_t img, int n);
    for (int r = 0; r < n; r++)
      for (int j = 0; j < n/2; j++) iq.push_back('{r, j, img[r*n + 2*j], img[r*n + 2*j + 1]});
  endtask

  task automatic set_capture(int n);
    cap_n = n; cap_m = n / 2;
    cap_ll = new[cap_m*cap_m]; cap_lh = new[cap_m*cap_m];
    cap_hl = new[cap_m*cap_m]; cap_hh = new[cap_m*cap_m];
    cap_img = new[n*n];
  endtask

  // Forward processor: send one frame, wait for its frame_done.
  task automatic send_dwt(arr_t img, int n, bit gaps);
    arr_t ll, lh, hl, hh;
    int m = n / 2;
    fwd2d(img, n, ll, lh, hl, hh);
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < m; j++) dq.push_back('{int'(PASS_H), i, j, hl[i*m+j], hh[i*m+j]});
      for (int j = 0; j < m; j++) dq.push_back('{int'(PASS_L), i, j, ll[i*m+j], lh[i*m+j]});
    end
    if (chain) begin expect_image(img, n); n_chained++; end
    if (n != N) n_size_switch++;
    dwt_cfg_m  = MW'(m);
    idwt_cfg_m = MW'(m);
    for (int k = 0; k < n*m; k++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        dwt_in_valid <= 0; n_gap++; @(posedge clk);
      end
      dwt_in_valid <= 1;
      dwt_in_even  <= coef_t'(img[2*k]);
      dwt_in_odd   <= coef_t'(img[2*k + 1]);
      do @(posedge clk); while (!dwt_in_ready);
      if (k == 0) first_in_cycle = $time / 10;
      last_in_cycle = $time / 10;
    end
    @(posedge clk);
    while (!dwt_frame_done) @(posedge clk);
    dwt_in_valid <= 0;
    // Let the monitor take the frame's last beat before the caller reads it.
    @(posedge clk);
  endtask

  // Inverse processor, driven directly: send one frame of subbands.
  task automatic send_idwt(arr_t ll, arr_t lh, arr_t hl, arr_t hh, int n);
    int m = n / 2;
    idwt_cfg_m = MW'(m);
    for (int i = 0; i < m; i++)
      for (int p = 0; p < 2; p++)
        for (int j = 0; j < m; j++) begin
          if ($urandom_range(0, 4) == 0) begin drv_valid <= 0; n_gap++; @(posedge clk); end
          drv_valid <= 1;
          drv_lo <= coef_t'(p == 0 ? hl[i*m+j] : ll[i*m+j]);
          drv_hi <= coef_t'(p == 0 ? hh[i*m+j] : lh[i*m+j]);
          do @(posedge clk); while (!idwt_in_ready);
        end
    @(posedge clk);
    while (!idwt_frame_done) @(posedge clk);
    drv_valid <= 0;
    @(posedge clk);
  endtask

  task automatic check_zero(string what, int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    arr_t img, ll1, lh1, hl1, hh1, ll2, lh2, hl2, hh2, rec;
    dwt_cfg_m  = MW'(M);
    idwt_cfg_m = MW'(M);
    set_capture(N);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // Part 1: chained codec.
    chain = 1'b1;
    send_dwt(rand_image(N), N, 1);
    send_dwt(rand_image(N), N, 0);
    send_dwt(rand_image(N), N, 1);
    while (iq.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
    chain = 1'b0;

    // Part 2: two-level decomposition and reconstruction.
    img = rand_image(N);
    set_capture(N);
    send_dwt(img, N, 0);
    checks++;
    if (last_out_cycle - last_in_cycle != N + 3 || last_in_cycle - first_in_cycle + 1 != N*N/2) begin
      failures++;
      $display("FAIL frame timing: %0d input cycles, latency %0d",
               last_in_cycle - first_in_cycle + 1, last_out_cycle - last_in_cycle);
    end
    ll1 = cap_ll; lh1 = cap_lh; hl1 = cap_hl; hh1 = cap_hh;
    set_capture(N/2);
    send_dwt(ll1, N/2, 1);
    ll2 = cap_ll; lh2 = cap_lh; hl2 = cap_hl; hh2 = cap_hh;
    expect_image(ll1, N/2);
    send_idwt(ll2, lh2, hl2, hh2, N/2);
    rec = cap_img;
    set_capture(N);
    expect_image(img, N);
    send_idwt(rec, lh1, hl1, hh1, N);
    checks++;
    for (int k = 0; k < N*N; k++)
      if (cap_img[k] != img[k]) begin
        failures++; $display("FAIL two-level reconstruction differs at %0d", k); break;
      end

    checks++;
    if (dq.size() != 0 || iq.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    check_zero("forward input stalls", n_dwt_stall);
    check_zero("inverse input stalls", n_idwt_stall);
    check_zero("idle input cycles", n_gap);
    check_zero("forward flushes", n_dwt_flush);
    check_zero("inverse flushes", n_idwt_flush);
    check_zero("frame size switches", n_size_switch);
    check_zero("chained frames", n_chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
