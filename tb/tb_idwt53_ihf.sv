// tb_idwt53_ihf: self-checking test of the inverse horizontal filter.
//
// Row-transforms random images with the reference model, sends the
// (L(j), H(j)) pairs row by row with random idle cycles and a final
// one-cycle flush, and checks that every output pixel pair equals the
// original image, in order. Sizes 8, 4 and 2 are used. In a gap-free frame
// the last pair must leave two cycles after the last input.
module tb_idwt53_ihf;
  import dwt53_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned MW = $clog2(N/2 + 1);

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] cfg_m;
  logic in_valid = 0, flush = 0;
  coef_t in_l = '0, in_h = '0;
  logic out_valid;
  coef_t out_even, out_odd;

  int checks = 0, failures = 0;
  int exp_e[$], exp_o[$];
  longint last_in_cycle, last_out_cycle;

  idwt53_ihf #(.N(N)) dut (.clk, .rst_n, .cfg_m, .in_valid, .in_l, .in_h,
                           .flush, .out_valid, .out_even, .out_odd);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int ee, eo;
    last_out_cycle = $time / 10;
    checks++;
    if (exp_e.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      ee = exp_e.pop_front(); eo = exp_o.pop_front();
      if (int'(out_even) != ee || int'(out_odd) != eo) begin
        failures++;
        $display("FAIL got %0d %0d exp %0d %0d", out_even, out_odd, ee, eo);
      end
    end
  end

  task automatic run_frame(int n, bit gaps);
    arr_t img, l, h;
    int m = n / 2;
    img = new[n*n];
    for (int k = 0; k < n*n; k++) img[k] = $urandom_range(0, 255);
    rows_fwd(img, n, l, h);
    for (int k = 0; k < n*m; k++) begin exp_e.push_back(img[2*k]); exp_o.push_back(img[2*k+1]); end
    cfg_m = MW'(m);
    for (int k = 0; k < n*m; k++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1;
      in_l <= coef_t'(l[k]);
      in_h <= coef_t'(h[k]);
      @(posedge clk);
      last_in_cycle = $time / 10;
    end
    in_valid <= 0;
    flush    <= 1;
    @(posedge clk);
    flush    <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_e.size()); exp_e.delete(); exp_o.delete(); end
    if (!gaps) begin
      checks++;
      if (last_out_cycle - last_in_cycle != 2) begin
        failures++;
        $display("FAIL latency %0d", last_out_cycle - last_in_cycle);
      end
    end
  endtask

  initial begin
    cfg_m = MW'(N/2);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(N, 0);
    run_frame(N, 1);
    run_frame(4, 0);
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
