// frame_memory_model: behavioural model of the external frame memory of
// the direct-method 2-D SA-DWT: 2^AW words of 18 bits, two read ports with
// one clock of latency and two write ports, all usable every clock.  Not
// synthesizable logic of the design; testbenches only.
//
// The two-read two-write 18-bit access follows the published memory
// bandwidth; the one-clock read latency is this design's own choice.
module frame_memory_model #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr0,
  input  logic [AW-1:0] rd_addr1,
  output logic [17:0]   rd_data0,
  output logic [17:0]   rd_data1,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr0,
  input  logic [AW-1:0] wr_addr1,
  input  logic [17:0]   wr_data0,
  input  logic [17:0]   wr_data1
);
  logic [17:0] mem [2**AW];
  int n_reads = 0, n_writes = 0;

  always @(posedge clk) begin
    if (rd_en) begin
      rd_data0 <= mem[rd_addr0];
      rd_data1 <= mem[rd_addr1];
      n_reads  <= n_reads + 2;
    end
    if (wr_en) begin
      mem[wr_addr0] <= wr_data0;
      mem[wr_addr1] <= wr_data1;
      n_writes <= n_writes + 2;
    end
  end
endmodule
