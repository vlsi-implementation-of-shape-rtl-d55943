// sadwt2d_direct: 2-D shape-adaptive DWT by the direct method, LEVELS
// dyadic levels with the (9,7) filter over an external frame memory.
//
// Each level runs the shared 1-D SA-DWT core over every row of the
// current low band and then over every column.  The read address
// controller fetches one even/odd sample pair per clock (two reads), the
// core turns it into a lowpass/highpass pair LATENCY clocks later, and the
// write address controller stores that pair (two writes) at the same two
// addresses, so the low band of level j lies on the 2^j grid of the frame
// and the memory sees two reads and two writes per clock.  Frame words
// are 18 bits: {e_or_o, mask, 16-bit value}; the host loads samples and
// shape with e_or_o = 0.  This build runs the forward transform.
//
// Interface: pulse `start` while idle; `busy` stays high until `done`
// pulses.  Memory reads have one clock of latency.  Frame time is
// W*H*(1 + 1/4 + ...) clocks plus the pipeline depth once per pass.
//
// From the published architecture: the direct method with a shared 1-D unit
// between two address controllers and an external 18-bit, two-read
// two-write frame memory, (9,7) filter, 3 levels, 1024 x 1024. Own choice:
// in-place interleaved storage, the pause between passes, and building only
// the forward transform.
module sadwt2d_direct
  import sadwt_pkg::*;
#(
  parameter int unsigned LOG2_W = 10,  // 1024-pixel lines
  parameter int unsigned LOG2_H = 10,  // 1024 lines
  parameter int unsigned LEVELS = 3,
  localparam int unsigned AW    = LOG2_W + LOG2_H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // frame memory, two read and two write ports, 18-bit words
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr0,
  output logic [AW-1:0] mem_rd_addr1,
  input  logic [17:0]   mem_rd_data0,
  input  logic [17:0]   mem_rd_data1,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr0,
  output logic [AW-1:0] mem_wr_addr1,
  output logic [17:0]   mem_wr_data0,
  output logic [17:0]   mem_wr_data1
);
  logic rd_sol, rd_valid_q, rd_sol_q, pass_written;
  samp_pair_t samp;
  coef_pair_t cin, cout;
  samp_pair_t sout;

  read_addr_ctrl #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS)) u_rd (
    .clk(clk), .rst_n(rst_n), .start(start), .pass_written(pass_written),
    .rd_en(mem_rd_en), .rd_addr0(mem_rd_addr0), .rd_addr1(mem_rd_addr1), .rd_sol(rd_sol),
    .busy(busy), .done(done));

  // read data arrives one clock after the address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_q <= 1'b0;
      rd_sol_q   <= 1'b0;
    end else begin
      rd_valid_q <= mem_rd_en;
      rd_sol_q   <= rd_sol;
    end
  end

  always_comb begin
    samp.valid  = rd_valid_q;
    samp.sol    = rd_sol_q;
    samp.even   = data_t'(mem_rd_data0[15:0]);
    samp.odd    = data_t'(mem_rd_data1[15:0]);
    samp.mask_e = mem_rd_data0[16];
    samp.mask_o = mem_rd_data1[16];
    cin         = '0;
  end

  sadwt97_1d u_core (.clk(clk), .rst_n(rst_n), .dir(FWD), .samp_in(samp), .coef_in(cin),
                     .coef_out(cout), .samp_out(sout));

  write_addr_ctrl #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS)) u_wr (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy), .in_valid(cout.valid),
    .wr_en(mem_wr_en), .wr_addr0(mem_wr_addr0), .wr_addr1(mem_wr_addr1),
    .pass_written(pass_written));

  assign mem_wr_data0 = {cout.eoo, cout.mask_l, cout.low};
  assign mem_wr_data1 = {1'b0, cout.mask_h, cout.high};
endmodule
