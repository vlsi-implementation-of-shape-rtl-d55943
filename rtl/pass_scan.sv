// pass_scan: address sequence of the direct-method 2-D SA-DWT over the
// frame memory.
//
// Level j (stride s = 2^j) is a row pass followed by a column pass over
// the (W>>j) x (H>>j) low band, which in this in-place layout sits on the
// grid of every s-th row and column.  Each step yields the address pair
// of one even/odd sample pair: (x, x+s) in a row pass, (y, y+s) rows in a
// column pass.  Coefficients go back to the addresses their samples came
// from, so a level never overwrites a sample it has not yet read.  The
// frame is 2^LOG2_W x 2^LOG2_H words, address = y * W + x.
//
// `step` advances to the next pair; `clear` restarts at level 0, row
// pass.  Outputs are combinational from the counters.
//
// Timing: the addresses are combinational from the counters, which advance
// on `step`. Own choice throughout: the published architecture only names
// the address controllers. The level shift amounts widen to the address
// width on purpose.
module pass_scan #(
  parameter int unsigned LOG2_W = 10,
  parameter int unsigned LOG2_H = 10,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned AW    = LOG2_W + LOG2_H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  output logic [AW-1:0] addr0,
  output logic [AW-1:0] addr1,
  output logic          sol,        // first pair of a line
  output logic          pass_last,  // last pair of the current pass
  output logic          frame_last, // ... and that pass is the frame's last
  output logic [1:0]    level,
  output logic          col         // column pass
);
  localparam int unsigned CW = (LOG2_W > LOG2_H) ? LOG2_W : LOG2_H;

  logic [CW-1:0] line_i, pair_i;
  logic [CW:0]   n_lines, n_pairs;
  logic [AW-1:0] x, y;

  always_comb begin
    if (!col) begin
      n_pairs = (CW+1)'(1) << (LOG2_W - 1 - level);
      n_lines = (CW+1)'(1) << (LOG2_H - level);
      x = AW'({pair_i, 1'b0}) << level;
      y = AW'(line_i) << level;
      addr0 = (y << LOG2_W) | x;
      addr1 = addr0 + (AW'(1) << level);
    end else begin
      n_pairs = (CW+1)'(1) << (LOG2_H - 1 - level);
      n_lines = (CW+1)'(1) << (LOG2_W - level);
      x = AW'(line_i) << level;
      y = AW'({pair_i, 1'b0}) << level;
      addr0 = (y << LOG2_W) | x;
      addr1 = addr0 + (AW'(1) << (LOG2_W + level));
    end
    sol        = (pair_i == '0);
    pass_last  = ((CW+1)'(pair_i) == n_pairs - 1) && ((CW+1)'(line_i) == n_lines - 1);
    frame_last = pass_last && col && (level == 2'(LEVELS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_i <= '0; pair_i <= '0; level <= '0; col <= 1'b0;
    end else if (clear) begin
      line_i <= '0; pair_i <= '0; level <= '0; col <= 1'b0;
    end else if (step) begin
      if ((CW+1)'(pair_i) != n_pairs - 1) pair_i <= pair_i + 1'b1;
      else begin
        pair_i <= '0;
        if ((CW+1)'(line_i) != n_lines - 1) line_i <= line_i + 1'b1;
        else begin
          line_i <= '0;
          col    <= ~col;
          if (col) level <= (level == 2'(LEVELS - 1)) ? '0 : level + 1'b1;
        end
      end
    end
  end
endmodule
