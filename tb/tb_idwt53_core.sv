// tb_idwt53_core: self-checking test of the inverse DWT processor.
//
// Transforms random images with the reference model, sends the subbands
// through the valid/ready input in the forward processor's order (per
// subband row: cfg_m beats (HL, HH), then cfg_m beats (LL, LH)) with random
// idle cycles, and checks that every output pair equals the original image
// pair at the tagged row and column, in raster order. Also offers input
// during the drain after each frame (stalls, nothing may be lost), runs
// sizes 8, 4 and 2, and in a gap-free frame checks that the last pair
// leaves N + 3 cycles after the last input beat.
module tb_idwt53_core;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned RW = $clog2(N + 2);

  typedef struct { int row; int col; int xe; int xo; } pair_t;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0, in_ready;
  coef_t in_lo = '0, in_hi = '0;
  logic out_valid, frame_done;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;
  coef_t out_even, out_odd;

  int checks = 0, failures = 0, stalls = 0;
  pair_t expq[$];
  longint last_in_cycle, last_out_cycle;

  idwt53_core #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_ready, .in_lo, .in_hi,
                            .out_valid, .out_row, .out_col, .out_even, .out_odd,
                            .frame_done);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      pair_t e;
      last_out_cycle = $time / 10;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(out_row) != e.row || int'(out_col) != e.col ||
            int'(out_even) != e.xe || int'(out_odd) != e.xo) begin
          failures++;
          $display("FAIL got row=%0d col=%0d x=%0d,%0d exp %0d %0d %0d,%0d",
                   out_row, out_col, out_even, out_odd, e.row, e.col, e.xe, e.xo);
        end
      end
    end
  end

  task automatic run_frame(int n, bit gaps);
    arr_t img, ll, lh, hl, hh;
    int m = n / 2;
    img = new[n*n];
    foreach (img[k]) img[k] = $urandom_range(0, 255);
    fwd2d(img, n, ll, lh, hl, hh);
    for (int r = 0; r < n; r++)
      for (int j = 0; j < m; j++) expq.push_back('{r, j, img[r*n + 2*j], img[r*n + 2*j + 1]});
    cfg_m = MW'(m);
    for (int i = 0; i < m; i++)
      for (int p = 0; p < 2; p++)
        for (int j = 0; j < m; j++) begin
          if (gaps) while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0; @(posedge clk);
          end
          in_valid <= 1;
          in_lo <= coef_t'(p == 0 ? hl[i*m+j] : ll[i*m+j]);
          in_hi <= coef_t'(p == 0 ? hh[i*m+j] : lh[i*m+j]);
          do @(posedge clk); while (!in_ready);
          last_in_cycle = $time / 10;
        end
    // Keep a beat on offer through the drain; it must not be taken.
    @(posedge clk);
    while (!frame_done) @(posedge clk);
    in_valid <= 0;
    @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d pairs missing", expq.size()); expq.delete(); end
    if (!gaps) begin
      checks++;
      if (last_out_cycle - last_in_cycle != n + 3) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", last_out_cycle - last_in_cycle, n + 3);
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
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no input stall was exercised"); end
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
