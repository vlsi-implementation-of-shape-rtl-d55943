// sa93_step: one step of the forward 1-D (9,3) SA-DWT with its state
// passed in and out, for the line-based 2-D architecture.
//
// Taking in pair k+2 finishes pair k: the odd sample of pair k+1 is
// predicted from its even neighbours (alpha = -1/2), then the even sample
// of pair k is updated from its four odd neighbours (beta = 19/64, gamma =
// -3/64), all with shifts and adds.  Inside bits of the -3..+3
// neighbourhood come from the masks held in the state, and the far taps
// are reflected into short segments exactly as in lift4_stage.  The
// output pair k carries unnormalised coefficients: the 2-D level applies
// the row and column normalisation together as shifts.  Global
// subsampling and one-point segments as in subsample_unit.
//
// `first` starts a new line: the pending pair of the old line is still
// emitted (with the new pair counted as outside) and the new pair is
// loaded into an empty state.  `flush` takes in an outside pair.  A line
// of n pairs therefore needs n steps, one flush and the first step of the
// next line (or two flushes).  Combinational.
//
// Timing: combinational; the caller holds the state in a register (row) or
// in the temporal buffer (column). From the published architecture: the
// (9,3) lifting with alpha = -1/2 and the 19/64, -3/64 even update, shifts
// and adds only. Own choice: packing the filter's delay line into one state
// word and the first/flush controls.
module sa93_step
  import sadwt_pkg::*;
  import line_pkg::*;
(
  input  lstate_t st,
  input  lin_t    in,
  input  logic    first,
  input  logic    flush,
  output lstate_t st_next,
  output lout_t   out
);
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

  logic  me2, mo2, left_in, right_in;
  data_t o1p, e0p, pa, pb;
  logic signed [DATA_W:0]   sa;
  logic signed [DATA_W+1:0] s1, s3;
  logic signed [DATA_W+7:0] acc;
  logic [6:0] nb;
  int lo, hi;
  logic op_o;

  always_comb begin
    // the incoming pair as a neighbour of the old line
    me2 = in.me & ~first & ~flush;
    mo2 = in.mo & ~first & ~flush;

    // alpha: o'_{k+1} = o_{k+1} - round((e_{k+1} + e_{k+2}) / 2)
    left_in  = st.me1;
    right_in = me2;
    unique case ({left_in, right_in})
      2'b11:   begin pa = st.e1; pb = in.e;  end
      2'b10:   begin pa = st.e1; pb = st.e1; end
      2'b01:   begin pa = in.e;  pb = in.e;  end
      default: begin pa = '0;    pb = '0;    end
    endcase
    sa  = {pa[DATA_W-1], pa} + {pb[DATA_W-1], pb};
    o1p = (st.mo1) ? data_t'(st.o1 + data_t'((-sa + (DATA_W+1)'(1)) >>> 1)) : st.o1;

    // beta/gamma on e_k: neighbourhood 2k-3 .. 2k+3
    nb = {st.mo1, st.me1, st.mo0, st.me0, st.mom1, st.mem1, st.mom2};
    if (!nb[2])      lo = 0;
    else if (!nb[1]) lo = -1;
    else if (!nb[0]) lo = -2;
    else             lo = -3;
    if (!nb[4])      hi = 0;
    else if (!nb[5]) hi = 1;
    else if (!nb[6]) hi = 2;
    else             hi = 3;
    s1 = (DATA_W+2)'(tap(reflect(-1, lo, hi), st.om2, st.om1, st.o0, o1p))
       + (DATA_W+2)'(tap(reflect( 1, lo, hi), st.om2, st.om1, st.o0, o1p));
    s3 = (DATA_W+2)'(tap(reflect(-3, lo, hi), st.om2, st.om1, st.o0, o1p))
       + (DATA_W+2)'(tap(reflect( 3, lo, hi), st.om2, st.om1, st.o0, o1p));
    acc = (DATA_W+8)'(s1 <<< 4) + (DATA_W+8)'(s1 <<< 1) + (DATA_W+8)'(s1)
        - (DATA_W+8)'(s3 <<< 1) - (DATA_W+8)'(s3) + (DATA_W+8)'(32);
    e0p = (st.me0 && lo != hi) ? data_t'(st.e0 + data_t'(acc >>> 6)) : st.e0;

    // output pair k
    op_o = st.mo0 & ~st.me0 & ~st.me1;
    out.valid  = st.v0;
    out.mask_l = st.me0 | op_o;
    out.mask_h = st.mo0 & ~op_o;
    out.eoo    = op_o;
    out.low    = op_o ? st.o0 : (st.me0 ? e0p : '0);
    out.high   = out.mask_h ? st.o0 : '0;
    out.side   = st.side0;

    // next state
    if (first) begin
      st_next      = '0;
      st_next.v1   = 1'b1;
      st_next.e1   = in.e;
      st_next.o1   = in.o;
      st_next.me1  = in.me;
      st_next.mo1  = in.mo;
      st_next.side1 = in.side;
    end else begin
      st_next.v0    = st.v1;
      st_next.e0    = st.e1;
      st_next.o0    = o1p;
      st_next.me0   = st.me1;
      st_next.mo0   = st.mo1;
      st_next.side0 = st.side1;
      st_next.v1    = ~flush;
      st_next.e1    = in.e;
      st_next.o1    = in.o;
      st_next.me1   = me2;
      st_next.mo1   = mo2;
      st_next.side1 = flush ? 2'b00 : in.side;
      st_next.om1   = st.o0;
      st_next.om2   = st.om1;
      st_next.mom1  = st.mo0;
      st_next.mom2  = st.mom1;
      st_next.mem1  = st.me0;
    end
  end
endmodule
