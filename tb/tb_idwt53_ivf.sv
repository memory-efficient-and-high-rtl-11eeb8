// tb_idwt53_ivf: self-checking test of the inverse vertical filter.
//
// Transforms random images with the reference model and sends the four
// subbands in the forward processor's order (per subband row: cfg_m beats
// (HL, HH), then cfg_m beats (LL, LH)) with random idle cycles. Checks that
// the output is the row-transformed image, one (L(r,j), H(r,j)) pair per
// beat, rows in order and correctly tagged; that the two flush beat rows
// run on their own; that frame_done comes with the last pair; and, in a
// gap-free frame, that the last pair leaves 2*cfg_m + 1 cycles after the
// last input beat. Sizes 8, 4 and 2 are used.
module tb_idwt53_ivf;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned M  = N / 2;
  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned RW = $clog2(N + 2);

  typedef struct { int row; int col; int l; int h; } beat_t;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0;
  coef_t in_lo = '0, in_hi = '0;
  logic busy, out_valid, frame_done;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;
  coef_t out_l, out_h;

  int checks = 0, failures = 0, busy_cycles = 0, done_count = 0;
  beat_t expq[$];
  longint last_in_cycle, last_out_cycle, done_cycle;

  idwt53_ivf #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_lo, .in_hi, .busy,
                           .out_valid, .out_row, .out_col, .out_l, .out_h, .frame_done);

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
        if (int'(out_row) != e.row || int'(out_col) != e.col ||
            int'(out_l) != e.l || int'(out_h) != e.h) begin
          failures++;
          $display("FAIL got row=%0d col=%0d L=%0d H=%0d exp %0d %0d %0d %0d",
                   out_row, out_col, out_l, out_h, e.row, e.col, e.l, e.h);
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
    for (int r = 0; r < n; r++)
      for (int j = 0; j < m; j++) expq.push_back('{r, j, l[r*m+j], h[r*m+j]});
    cfg_m = MW'(m);
    busy_cycles = 0;
    done_count  = 0;
    for (int i = 0; i < m; i++)
      for (int p = 0; p < 2; p++)
        for (int j = 0; j < m; j++) begin
          if (gaps) while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0; @(posedge clk);
          end
          in_valid <= 1;
          in_lo <= coef_t'(p == 0 ? hl[i*m+j] : ll[i*m+j]);
          in_hi <= coef_t'(p == 0 ? hh[i*m+j] : lh[i*m+j]);
          @(posedge clk);
          last_in_cycle = $time / 10;
        end
    in_valid <= 0;
    repeat (2*m + 4) @(posedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d pairs missing", expq.size()); expq.delete(); end
    if (busy_cycles != 2*m) begin failures++; $display("FAIL flush took %0d cycles", busy_cycles); end
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
