// tb_line_buffer: self-checking test of line_buffer.
//
// Writes random words at random columns while keeping a shadow copy, and
// checks every read against it, including read-during-write on the same
// column (which must return the old word until the clock edge).
module tb_line_buffer;
  import dwt53_pkg::*;

  localparam int unsigned DEPTH = 6;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  logic [AW-1:0] addr;
  logic we;
  coef_t wdata, rdata;
  int shadow[DEPTH];
  bit written[DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int k = 0; k < DEPTH; k++) written[k] = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(0, DEPTH - 1));
      we    = ($urandom_range(0, 1) == 1);
      wdata = coef_t'($urandom);
      #1;
      if (written[addr]) begin
        checks++;
        if (int'(rdata) != shadow[addr]) begin
          failures++;
          $display("FAIL addr=%0d got %0d exp %0d", addr, rdata, shadow[addr]);
        end
      end
      @(posedge clk);
      if (we) begin
        shadow[addr]  = int'(wdata);
        written[addr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
