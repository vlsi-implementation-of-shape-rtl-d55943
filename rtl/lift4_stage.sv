// lift4_stage: the four-tap even-sample lifting step of the (9,3) filter,
// e = e +/- round(beta*(o[-1]+o[+1]) + gamma*(o[-3]+o[+3])) with
// beta = 19/64 and gamma = -3/64, done with shifts and adds only.
//
// The far taps reach past short segments, so the boundary extension is a
// repeated symmetric reflection of each tap position into the segment
// [lo, hi] seen in the -3..+3 neighbourhood (period 2*(hi-lo)); that gives
// the type B extension for segments of any length, including the very
// short ones.  A one-point segment is left unchanged.
//
// Register R holds pair i while pair i+1 is at the input; the odd samples
// of pairs i-1 and i-2 are kept in o_p1 and o_p2.  Timing: the updated
// pair i is on `out` one clock after it was on `in`.  sub selects the
// inverse step and may only change while the pipeline is empty.
//
// Timing: one register stage, one pair per clock. From the published
// architecture: the (9,3) even update with coefficients 19/64 and -3/64
// done with shifts and adds. Own choice: repeated reflection of the far
// taps into short segments, and the rounding constant 32.
module lift4_stage
  import sadwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sub,
  input  pair_t in,
  output pair_t out
);
  pair_t r;
  data_t o_p1, o_p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      o_p1 <= '0;
      o_p2 <= '0;
    end else begin
      r    <= in;
      o_p1 <= r.o;
      o_p2 <= o_p1;
    end
  end

  // Reflect tap position p (odd, -3..+3) into [lo, hi].
  function automatic int reflect(input int p, input int lo, input int hi);
    int q;
    q = p;
    for (int k = 0; k < 4; k++) begin
      if (q < lo)      q = 2 * lo - q;
      else if (q > hi) q = 2 * hi - q;
    end
    return q;
  endfunction

  function automatic data_t tap(input int p, input data_t vm3, input data_t vm1,
                                input data_t vp1, input data_t vp3);
    case (p)
      -3:      return vm3;
      -1:      return vm1;
      1:       return vp1;
      default: return vp3;
    endcase
  endfunction

  int lo, hi;
  logic signed [DATA_W+1:0] s1, s3;
  logic signed [DATA_W+7:0] acc;
  data_t p;

  always_comb begin
    if (!r.ne[2])      lo = 0;
    else if (!r.ne[1]) lo = -1;
    else if (!r.ne[0]) lo = -2;
    else               lo = -3;
    if (!r.ne[4])      hi = 0;
    else if (!r.ne[5]) hi = 1;
    else if (!r.ne[6]) hi = 2;
    else               hi = 3;

    s1 = (DATA_W+2)'(tap(reflect(-1, lo, hi), o_p2, o_p1, r.o, in.o))
       + (DATA_W+2)'(tap(reflect( 1, lo, hi), o_p2, o_p1, r.o, in.o));
    s3 = (DATA_W+2)'(tap(reflect(-3, lo, hi), o_p2, o_p1, r.o, in.o))
       + (DATA_W+2)'(tap(reflect( 3, lo, hi), o_p2, o_p1, r.o, in.o));
    // 19*s1 - 3*s3 + 32, then / 64
    acc = (DATA_W+8)'(s1 <<< 4) + (DATA_W+8)'(s1 <<< 1) + (DATA_W+8)'(s1)
        - (DATA_W+8)'(s3 <<< 1) - (DATA_W+8)'(s3) + (DATA_W+8)'(32);
    p   = data_t'(acc >>> 6);

    out = r;
    if (r.me && lo != hi) out.e = sub ? data_t'(r.e - p) : data_t'(r.e + p);
  end
endmodule
