// tb_dwt53_vf: self-checking test of the vertical filter dwt53_vf.
//
// Feeds the row-transformed halves (L(r,j), H(r,j)) of random images, as
// the horizontal filter would, with random idle cycles, and checks every
// output beat, in order, against the reference column transform: for each
// subband row i, cfg_m beats (HL, HH) tagged PASS_H, then cfg_m beats
// (LL, LH) tagged PASS_L, with the right row and column tags. Checks that
// the two flush rows run on their own (busy), that frame_done comes with
// the last beat, and, for a gap-free frame, that the last beat leaves
// 2*cfg_m + 1 cycles after the last input. Sizes 8, 4 and 2 are used.
module tb_dwt53_vf;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  typedef struct { int pass; int row; int col; int lo; int hi; } beat_t;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0;
  coef_t in_l = '0, in_h = '0;
  logic busy, out_valid, frame_done;
  pass_e out_pass;
  logic [CW-1:0] out_row, out_col;
  coef_t out_lo, out_hi;

  int checks = 0, failures = 0, busy_cycles = 0, done_count = 0;
  beat_t expq[$];
  longint last_in_cycle, last_out_cycle, done_cycle;

  dwt53_vf #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_l, .in_h, .busy,
                         .out_valid, .out_pass, .out_row, .out_col, .out_lo,
                         .out_hi, .frame_done);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (frame_done) begin done_count++; done_cycle = $time / 10; end
    if (out_valid) begin
      beat_t e;
      last_out_cycle = $time / 10;
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

  task automatic run_frame(int n, bit gaps);
    arr_t img, l, h, ll, lh, hl, hh;
    int m = n / 2;
    img = new[n*n];
    for (int k = 0; k < n*n; k++) img[k] = $urandom_range(0, 255);
    fwd2d(img, n, ll, lh, hl, hh);
    rows_fwd(img, n, l, h);
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < m; j++) expq.push_back('{int'(PASS_H), i, j, hl[i*m+j], hh[i*m+j]});
      for (int j = 0; j < m; j++) expq.push_back('{int'(PASS_L), i, j, ll[i*m+j], lh[i*m+j]});
    end
    cfg_m = MW'(m);
    busy_cycles = 0;
    done_count  = 0;
    for (int r = 0; r < n; r++)
      for (int j = 0; j < m; j++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 0; @(posedge clk);
        end
        in_valid <= 1;
        in_l <= coef_t'(l[r*m + j]);
        in_h <= coef_t'(h[r*m + j]);
        @(posedge clk);
        last_in_cycle = $time / 10;
      end
    in_valid <= 0;
    repeat (2*m + 4) @(posedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d beats missing", expq.size()); expq.delete(); end
    if (busy_cycles != 2*m) begin failures++; $display("FAIL flush took %0d cycles, expected %0d", busy_cycles, 2*m); end
    if (done_count != 1 || done_cycle != last_out_cycle) begin failures++; $display("FAIL frame_done"); end
    if (!gaps) begin
      checks++;
      if (last_out_cycle - last_in_cycle != 2*m + 1) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", last_out_cycle - last_in_cycle, 2*m + 1);
      end
    end
  endtask

  initial begin
    cfg_m = MW'(M);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(N, 0);
    run_frame(N, 1);
    run_frame(4, 1);
    run_frame(2, 0);
    run_frame(N, 0);
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
