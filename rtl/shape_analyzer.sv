// shape_analyzer: shape information analyzer (unit D of the generic 1-D
// SA-DWT model).
//
// Looks at the shape masks of the pair stream through a window of four
// pairs (i-2, i-1, i and the arriving pair i+1) and, for the centre pair i,
// works out which neighbours of its even and its odd sample at distance
// -3..+3 are inside the same line segment, and whether either sample is a
// one-point segment.  Those bits travel with the pair and steer the
// boundary-extension multiplexers of every lifting stage and the output
// subsampling multiplexers, so no stage ever has to stall.  A neighbour
// in another line (across a pair flagged sol) or in an invalid pair is
// outside.  The odd sample's +3 neighbour lies in pair i+2 and is not
// needed by either filter; it reads as outside.
//
// Timing: pair i leaves (combinationally, from the centre register) in the
// cycle in which pair i+1 arrives, i.e. one clock after it entered.
//
// Timing: one register stage. From the published architecture: a shape
// information analyzer that tells each stage which neighbours lie inside
// the segment and detects one-point segments. Own choice: its insides (a
// mask history cut at line starts).
module shape_analyzer
  import sadwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in,
  output pair_t out
);
  pair_t c;                 // centre pair i
  logic  p1_me, p1_mo, p1_sol;
  logic  p2_mo;
  logic  n_me, n_mo, n_same, prev1_same, prev2_same;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c      <= '0;
      p1_me  <= 1'b0;
      p1_mo  <= 1'b0;
      p1_sol <= 1'b0;
      p2_mo  <= 1'b0;
    end else begin
      c      <= in;
      c.me   <= in.me & in.valid;
      c.mo   <= in.mo & in.valid;
      p1_me  <= c.me;
      p1_mo  <= c.mo;
      p1_sol <= c.sol;
      p2_mo  <= p1_mo;
    end
  end

  always_comb begin
    n_same     = in.valid & ~in.sol;
    n_me       = in.me & n_same;
    n_mo       = in.mo & n_same;
    prev1_same = ~c.sol;
    prev2_same = ~c.sol & ~p1_sol;

    out    = c;
    // even sample at 2i: 2i-3 .. 2i+3
    out.ne = {n_mo, n_me, c.mo, c.me,
              p1_mo & prev1_same, p1_me & prev1_same, p2_mo & prev2_same};
    // odd sample at 2i+1: 2i-2 .. 2i+4 (2i+4 not looked at)
    out.no = {1'b0, n_mo, n_me, c.mo, c.me,
              p1_mo & prev1_same, p1_me & prev1_same};
    out.op_e = c.me & ~out.ne[2] & ~out.ne[4];
    out.op_o = c.mo & ~out.no[2] & ~out.no[4];
  end
endmodule
