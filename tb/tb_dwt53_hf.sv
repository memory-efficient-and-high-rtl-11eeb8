// tb_dwt53_hf: self-checking test of the horizontal filter dwt53_hf.
//
// Sends random images row by row as (even, odd) sample pairs, with random
// idle cycles, followed by the one-cycle flush, and compares every (L, H)
// output pair, in order, with the reference row transform. Runs a full-
// width frame and a half-width frame (cfg_m change). In a gap-free frame
// it also checks the latency: each pair's result must appear two cycles
// after the pair, the last one a cycle after the flush.
module tb_dwt53_hf;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned MW = $clog2(N/2 + 1);

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0, flush = 0;
  coef_t in_even = '0, in_odd = '0;
  logic out_valid;
  coef_t out_l, out_h;

  int checks = 0, failures = 0;
  int exp_l[$], exp_h[$];
  longint last_in_cycle, last_out_cycle;   // in clock periods

  dwt53_hf #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_even, .in_odd,
                         .flush, .out_valid, .out_l, .out_h);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int el, eh;
    last_out_cycle = $time / 10;
    checks++;
    if (exp_l.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      el = exp_l.pop_front(); eh = exp_h.pop_front();
      if (int'(out_l) != el || int'(out_h) != eh) begin
        failures++;
        $display("FAIL got L=%0d H=%0d exp L=%0d H=%0d", out_l, out_h, el, eh);
      end
    end
  end

  task automatic run_frame(int n, bit gaps);
    arr_t img, l, h;
    int m = n / 2;
    img = new[n*n];
    for (int k = 0; k < n*n; k++) img[k] = $urandom_range(0, 255);
    rows_fwd(img, n, l, h);
    for (int k = 0; k < n*m; k++) begin exp_l.push_back(l[k]); exp_h.push_back(h[k]); end
    cfg_m = MW'(m);
    for (int r = 0; r < n; r++)
      for (int j = 0; j < m; j++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0; @(posedge clk);
        end
        in_valid <= 1;
        in_even  <= coef_t'(img[r*n + 2*j]);
        in_odd   <= coef_t'(img[r*n + 2*j + 1]);
        @(posedge clk);
        last_in_cycle = $time / 10;
      end
    in_valid <= 0;
    flush    <= 1;
    @(posedge clk);
    flush    <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_l.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_l.size()); end
    if (!gaps) begin
      checks++;
      if (last_out_cycle - last_in_cycle != 2) begin
        failures++;
        $display("FAIL latency: last output %0d cycles after last input", last_out_cycle - last_in_cycle);
      end
    end
    exp_l.delete(); exp_h.delete();
  endtask

  initial begin
    cfg_m = MW'(N/2);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(N, 0);
    run_frame(N, 1);
    run_frame(N/2, 0);
    run_frame(2, 1);
    run_frame(N, 1);
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
