// data_buffer: line buffer between the row and the column SA-DWT of one
// level of the line-based 2-D design.  It holds the row coefficients of
// the current even row, one 18-bit word ({e_or_o, mask, value}) per
// column, until the odd row below is transformed.  Two-port RAM: one
// write and one read per clock, read data one clock after the address.
//
// From the published architecture: a data buffer holding row coefficients
// for the column unit, in 18-bit words. Own choice: one line per level,
// synchronous read, old data on a same-address read and write.
module data_buffer
  import line_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  dword_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output dword_t        rdata
);
  dword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
