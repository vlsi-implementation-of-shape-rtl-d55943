// write_addr_ctrl: write address controller of the direct-method 2-D
// SA-DWT.
//
// Follows the same pass sequence as the read address controller, one
// step per coefficient pair leaving the 1-D core (`in_valid`), so every
// lowpass/highpass pair is written to the two addresses its sample pair
// was read from.  `pass_written` pulses with the write of the last pair
// of a pass.  `clear` (at frame start) rewinds it.
//
// From the published architecture: a write address controller for the
// external frame memory. Own choice: it repeats the read scan, one step per
// coefficient pair, and reports the end of each pass.
module write_addr_ctrl #(
  parameter int unsigned LOG2_W = 10,
  parameter int unsigned LOG2_H = 10,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned AW    = LOG2_W + LOG2_H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr0,
  output logic [AW-1:0] wr_addr1,
  output logic          pass_written
);
  logic pass_last, frame_last, sol, col;
  logic [1:0] level;

  pass_scan #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS)) u_scan (
    .clk(clk), .rst_n(rst_n), .clear(clear), .step(in_valid),
    .addr0(wr_addr0), .addr1(wr_addr1), .sol(sol), .pass_last(pass_last),
    .frame_last(frame_last), .level(level), .col(col));

  assign wr_en        = in_valid;
  assign pass_written = in_valid & pass_last;
endmodule
