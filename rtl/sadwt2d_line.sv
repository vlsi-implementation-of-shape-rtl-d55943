// sadwt2d_line: 3-level 2-D shape-adaptive DWT by the line-based method,
// (9,3) filter, no frame memory.
//
// The image enters once, in raster order (one pixel per clock at most),
// with its shape mask.  Each level is a line_level: a row SA-DWT whose
// coefficients pass through a one-line data buffer into a column SA-DWT
// whose per-column registers live in a temp buffer.  The LL band of a
// level streams, again in raster order, into the next level at a quarter
// of the rate; every coefficient of every level leaves on the out0/out1
// lanes of its level with its band, position, mask and one-point bits,
// the LL of the last level included.  Normalisation is folded into
// shifts: LL doubled, HH halved per level.  This build runs the forward
// transform.
//
// Interface: a pixel is taken when in_valid and in_ready are both high.
// in_ready drops after the last pixel of a frame until every level has
// flushed its columns; frame_done then pulses.
//
// From the published architecture: line-based 2-D transform with the (9,3)
// filter, 3 levels, raster input, line buffers proportional to the width.
// Own choice: a cascade of per-level units instead of one shared unit pair,
// the 64 x 64 default frame, the ready handshake and the frame_done pulse.
// `lv_flush` is left unread on purpose; the flush of each level is started
// from its own end-of-frame detection.
module sadwt2d_line
  import sadwt_pkg::*;
  import line_pkg::*;
#(
  parameter int unsigned LOG2_NW = 6,  // 64-pixel lines
  parameter int unsigned LOG2_NH = 6,  // 64 lines
  parameter int unsigned LEVELS  = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  data_t  in_value,
  input  logic   in_mask,
  output lcoef_t out0 [LEVELS],
  output lcoef_t out1 [LEVELS],
  output logic   frame_done
);
  logic  lv_valid [LEVELS+1];
  data_t lv_value [LEVELS+1];
  logic  lv_mask  [LEVELS+1];
  logic  lv_flush [LEVELS];
  logic  lv_done  [LEVELS];
  logic  tail;
  logic [LOG2_NW+LOG2_NH-1:0] n_pix;

  assign in_ready    = !tail;
  assign lv_valid[0] = in_valid && in_ready;
  assign lv_value[0] = in_value;
  assign lv_mask[0]  = in_mask;

  for (genvar j = 0; j < LEVELS; j++) begin : g_level
    line_level #(.LOG2_NW(LOG2_NW - j), .LOG2_NH(LOG2_NH - j)) u_level (
      .clk(clk), .rst_n(rst_n),
      .in_valid(lv_valid[j]), .in_value(lv_value[j]), .in_mask(lv_mask[j]),
      .out0(out0[j]), .out1(out1[j]),
      .ll_valid(lv_valid[j+1]), .ll_value(lv_value[j+1]), .ll_mask(lv_mask[j+1]),
      .flushing(lv_flush[j]), .done(lv_done[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail <= 1'b0; n_pix <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (lv_valid[0]) begin
        n_pix <= n_pix + 1'b1;
        if (n_pix == '1) tail <= 1'b1;
      end
      if (lv_done[LEVELS-1]) begin
        tail <= 1'b0;
        frame_done <= 1'b1;
      end
    end
  end
endmodule
