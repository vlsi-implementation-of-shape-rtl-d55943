// temp_buffer: the column SA-DWT's registers, one set per image column,
// of one level of the line-based 2-D design.  Each word is the complete
// state of the 1-D (9,3) transform of one column (six 16-bit values and
// their shape bits).  Two-port RAM: one write and one read per clock,
// read data one clock after the address.
//
// From the published architecture: the temporal buffer that replaces the
// registers of the column unit, one entry per column. Own choice: one wide
// state word per column instead of K 16-bit words, synchronous read.
module temp_buffer
  import line_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  lstate_t       wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output lstate_t       rdata
);
  lstate_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
