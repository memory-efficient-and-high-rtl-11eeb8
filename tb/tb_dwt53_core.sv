// tb_dwt53_core: self-checking test of the forward DWT processor.
//
// Sends random 8-bit images through the valid/ready input, two samples per
// beat, with random idle cycles, and checks every output beat (pass, row,
// column, both coefficients), in order, against the reference 2-D
// transform. Also:
//   * offers input while in_ready is low (the drain after each frame) and
//     checks that nothing is lost (counted as stalls);
//   * runs a two-level decomposition: the LL subband of level 1 is sent
//     back with cfg_m halved and checked against the reference level 2;
//   * in a gap-free frame, checks that the frame takes N*N/2 input cycles
//     and that the last beat leaves N + 3 cycles after the last input.
module tb_dwt53_core;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  typedef struct { int pass; int row; int col; int lo; int hi; } beat_t;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0, in_ready;
  coef_t in_even = '0, in_odd = '0;
  logic out_valid, frame_done;
  pass_e out_pass;
  logic [CW-1:0] out_row, out_col;
  coef_t out_lo, out_hi;

  int checks = 0, failures = 0, stalls = 0;
  beat_t expq[$];
  int ll_got[];
  int ll_len = 0;
  longint first_in_cycle, last_in_cycle, last_out_cycle;

  dwt53_core #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_ready, .in_even, .in_odd,
                           .out_valid, .out_pass, .out_row, .out_col, .out_lo, .out_hi,
                           .frame_done);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      beat_t e;
      last_out_cycle = $time / 10;
      if (out_pass == PASS_L && ll_len > 0) begin
        int idx;
        idx = int'(out_row) * int'(cfg_m) + int'(out_col);
        ll_got[idx] = int'(out_lo);
      end
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(out_pass) != e.pass || int'(out_row) != e.row || int'(out_col) != e.col ||
            int'(out_lo) != e.lo || int'(out_hi) != e.hi) begin
          failures++;
          $display("FAIL got pass=%0d row=%0d col=%0d lo=%0d hi=%0d exp %0d %0d %0d %0d %0d",
                   out_pass, out_row, out_col, out_lo, out_hi, e.pass, e.row, e.col, e.lo, e.hi);
        end
      end
    end
  end

  // Sends one n x n frame; returns when its frame_done has been seen.
  task automatic run_frame(arr_t img, int n, bit gaps);
    arr_t ll, lh, hl, hh;
    int m = n / 2;
    fwd2d(img, n, ll, lh, hl, hh);
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < m; j++) expq.push_back('{int'(PASS_H), i, j, hl[i*m+j], hh[i*m+j]});
      for (int j = 0; j < m; j++) expq.push_back('{int'(PASS_L), i, j, ll[i*m+j], lh[i*m+j]});
    end
    ll_got = new[m*m];
    ll_len = m*m;
    cfg_m = MW'(m);
    for (int k = 0; k < n*m; k++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1;
      in_even  <= coef_t'(img[2*k]);
      in_odd   <= coef_t'(img[2*k + 1]);
      do @(posedge clk); while (!in_ready);
      if (k == 0) first_in_cycle = $time / 10;
      last_in_cycle = $time / 10;
    end
    // Keep offering the next frame's first pair during the drain.
    in_even <= coef_t'(img[0]);
    in_odd  <= coef_t'(img[1]);
    @(posedge clk);
    while (!frame_done) @(posedge clk);
    in_valid <= 0;
    @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d beats missing", expq.size()); expq.delete(); end
    if (!gaps) begin
      checks += 2;
      if (last_in_cycle - first_in_cycle + 1 != n*m) begin
        failures++; $display("FAIL input took %0d cycles", last_in_cycle - first_in_cycle + 1);
      end
      if (last_out_cycle - last_in_cycle != n + 3) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", last_out_cycle - last_in_cycle, n + 3);
      end
    end
  endtask

  function automatic arr_t rand_image(int n);
    arr_t img = new[n*n];
    foreach (img[k]) img[k] = $urandom_range(0, 255);
    return img;
  endfunction

  initial begin
    arr_t img, ll1;
    int stalls_before;
    cfg_m = MW'(M);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(rand_image(N), N, 0);
    run_frame(rand_image(N), N, 1);
    // Two-level decomposition.
    img = rand_image(N);
    run_frame(img, N, 0);
    ll1 = ll_got;
    run_frame(ll1, N/2, 1);
    run_frame(rand_image(2), 2, 0);
    // Saturated images exercise the word growth.
    img = new[N*N];
    foreach (img[k]) img[k] = (k % 3 == 0) ? 255 : 0;
    run_frame(img, N, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no input stall was exercised"); end
    $display("stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
