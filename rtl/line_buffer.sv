// line_buffer: one line delay (LD) of the vertical filters.
//
// Holds DEPTH coefficients, one per column of a subband row. The vertical
// filters visit the columns of a row in order, and at each column read the
// value stored there one or two rows earlier and, in the same cycle, may
// overwrite it with the value to keep for a later row. The buffer is
// therefore a column-addressed register array with an asynchronous read
// port and a synchronous write port on the same address; reading an
// address that is written in the same cycle returns the old value.
//
// Ports: addr selects the column, we/wdata write it at the clock edge,
// rdata is the current content of that column. No reset: the filters never
// read a column before writing it in the same frame.
module line_buffer
  import dwt53_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  coef_t         wdata,
  output coef_t         rdata
);

  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
