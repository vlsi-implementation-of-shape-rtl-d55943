// sadwt_top: the shape-adaptive DWT designs side by side.
//
//  * u_direct: 2-D SA-DWT by the direct method, (9,7) filter, 3 levels,
//    1024 x 1024 frames in an external frame memory (its ports are
//    brought out; the memory itself is outside the chip).
//  * u_line: 2-D SA-DWT by the line-based method, (9,3) filter, 3 levels,
//    64-pixel lines, raster input, no frame memory.
//  * u_core93: the shared forward/inverse 1-D SA-DWT core of the (9,3)
//    filter, with its pair-stream ports brought out.
//
// The three share nothing but clock and reset.
//
// Timing: each system keeps its own; see its file. From the published
// architecture: the two 2-D systems and the shared 1-D cores. Own choice:
// placing them in one top and bringing out the (9,3) core. Bit 17 of the
// highpass memory word and the upper position bits of the line-based
// outputs are constant at the default sizes.
module sadwt_top
  import sadwt_pkg::*;
#(
  parameter int unsigned LOG2_W = 10,
  parameter int unsigned LOG2_H = 10,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned L_LOG2_NW = 6,
  parameter int unsigned L_LOG2_NH = 6,
  localparam int unsigned AW    = LOG2_W + LOG2_H,
  localparam int unsigned L_LEVELS = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // direct-method 2-D system
  input  logic          d_start,
  output logic          d_busy,
  output logic          d_done,
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr0,
  output logic [AW-1:0] mem_rd_addr1,
  input  logic [17:0]   mem_rd_data0,
  input  logic [17:0]   mem_rd_data1,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr0,
  output logic [AW-1:0] mem_wr_addr1,
  output logic [17:0]   mem_wr_data0,
  output logic [17:0]   mem_wr_data1,
  // line-based 2-D system
  input  logic          l_in_valid,
  output logic          l_in_ready,
  input  data_t         l_in_value,
  input  logic          l_in_mask,
  output line_pkg::lcoef_t l_out0 [L_LEVELS],
  output line_pkg::lcoef_t l_out1 [L_LEVELS],
  output logic          l_frame_done,
  // (9,3) 1-D core
  input  dir_t          c93_dir,
  input  samp_pair_t    c93_samp_in,
  input  coef_pair_t    c93_coef_in,
  output coef_pair_t    c93_coef_out,
  output samp_pair_t    c93_samp_out
);
  sadwt2d_direct #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS)) u_direct (
    .clk(clk), .rst_n(rst_n), .start(d_start), .busy(d_busy), .done(d_done),
    .mem_rd_en(mem_rd_en), .mem_rd_addr0(mem_rd_addr0), .mem_rd_addr1(mem_rd_addr1),
    .mem_rd_data0(mem_rd_data0), .mem_rd_data1(mem_rd_data1),
    .mem_wr_en(mem_wr_en), .mem_wr_addr0(mem_wr_addr0), .mem_wr_addr1(mem_wr_addr1),
    .mem_wr_data0(mem_wr_data0), .mem_wr_data1(mem_wr_data1));

  sadwt2d_line #(.LOG2_NW(L_LOG2_NW), .LOG2_NH(L_LOG2_NH), .LEVELS(L_LEVELS)) u_line (
    .clk(clk), .rst_n(rst_n), .in_valid(l_in_valid), .in_ready(l_in_ready),
    .in_value(l_in_value), .in_mask(l_in_mask), .out0(l_out0), .out1(l_out1),
    .frame_done(l_frame_done));

  sadwt93_1d u_core93 (.clk(clk), .rst_n(rst_n), .dir(c93_dir), .samp_in(c93_samp_in),
                       .coef_in(c93_coef_in), .coef_out(c93_coef_out), .samp_out(c93_samp_out));
endmodule
