// sadwt97_1d: shared forward / inverse 1-D shape-adaptive DWT with the
// Daubechies (9,7) filter, one even/odd pair per clock with no stalls.
//
// The four lifting steps (alpha, beta, gamma, delta) each map onto one
// lifting stage (boundary-extension multiplexers + one MCU).  The shape
// analyzer marks, for every sample, which neighbours are inside its line
// segment; the multiplexers then implement the symmetric extension of
// every segment on the fly, however short.  Global subsampling is used:
// lowpass at even and highpass at odd positions of the line.  Forward:
// lowpass = zeta * s, highpass = d / zeta, a one-point segment gives one
// lowpass coefficient sqrt(2)*x, marked by e_or_o if it sits at an odd
// position.  Inverse: the same stages in reverse order subtract the same
// rounded products, so the lifting is undone exactly; only the
// normalisation rounds.
//
// Interface: dir selects the direction and may only change while the
// pipeline is empty.  Forward takes samp_in and gives coef_out; inverse
// takes coef_in and gives samp_out.  sol marks the first pair of a line;
// nothing reaches across it.  Pairs with valid = 0 count as outside.
// Lines may follow each other with no gap.  Latency: LATENCY clocks from
// input to output in both directions.
//
// From the published architecture: four lifting stages on four MCUs shared
// between forward and inverse by multiplexers, shape analyzer, subsampling
// with mask and e_or_o outputs, (9,7) constants. Own choice: latency 7,
// Q1.10 constants and the sqrt(2) gain of one-point segments.
module sadwt97_1d
  import sadwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dir_t       dir,
  input  samp_pair_t samp_in,
  input  coef_pair_t coef_in,
  output coef_pair_t coef_out,
  output samp_pair_t samp_out
);
  localparam int LATENCY = 7;

  pair_t p_in, p_an, p_sc;
  pair_t p_st [0:4];
  upd_t  upd  [0:3];
  coef_t cf   [0:3];
  logic  sub;
  coef_pair_t co;

  // input multiplexers: forward samples or inverse coefficients
  always_comb begin
    p_in = '0;
    if (dir == FWD) begin
      p_in.valid = samp_in.valid;
      p_in.sol   = samp_in.sol;
      p_in.e     = samp_in.even;
      p_in.o     = samp_in.odd;
      p_in.me    = samp_in.mask_e;
      p_in.mo    = samp_in.mask_o;
    end else begin
      p_in.valid = coef_in.valid;
      p_in.sol   = coef_in.sol;
      p_in.e     = coef_in.low;
      p_in.o     = coef_in.eoo ? coef_in.low : coef_in.high;
      p_in.me    = coef_in.mask_l & ~coef_in.eoo;
      p_in.mo    = coef_in.mask_h | (coef_in.mask_l & coef_in.eoo);
    end
  end

  shape_analyzer u_an (.clk(clk), .rst_n(rst_n), .in(p_in), .out(p_an));

  inv_prescale #(.LOW_C(C97_INVZETA), .HIGH_C(C97_ZETA), .ONEPT_C(C_INVSQRT2))
    u_pre (.clk(clk), .rst_n(rst_n), .dir(dir), .in(p_an), .out(p_sc));

  // stage programme: forward alpha, beta, gamma, delta; inverse the reverse
  always_comb begin
    sub = (dir == INV);
    if (dir == FWD) begin
      upd = '{UPD_ODD, UPD_EVEN, UPD_ODD, UPD_EVEN};
      cf  = '{C97_ALPHA, C97_BETA, C97_GAMMA, C97_DELTA};
    end else begin
      upd = '{UPD_EVEN, UPD_ODD, UPD_EVEN, UPD_ODD};
      cf  = '{C97_DELTA, C97_GAMMA, C97_BETA, C97_ALPHA};
    end
  end

  assign p_st[0] = p_sc;
  for (genvar k = 0; k < 4; k++) begin : g_stage
    lift_stage u_st (.clk(clk), .rst_n(rst_n), .upd(upd[k]), .c(cf[k]), .sub(sub),
                     .in(p_st[k]), .out(p_st[k+1]));
  end

  subsample_unit #(.LOW_C(C97_ZETA), .HIGH_C(C97_INVZETA), .ONEPT_C(C_SQRT2))
    u_sub (.clk(clk), .rst_n(rst_n), .in(p_st[4]), .out(co));

  always_comb begin
    coef_out       = co;
    coef_out.valid = co.valid & (dir == FWD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samp_out <= '0;
    else begin
      samp_out.valid  <= p_st[4].valid & (dir == INV);
      samp_out.sol    <= p_st[4].sol;
      samp_out.mask_e <= p_st[4].me;
      samp_out.mask_o <= p_st[4].mo;
      samp_out.even   <= p_st[4].me ? p_st[4].e : '0;
      samp_out.odd    <= p_st[4].mo ? p_st[4].o : '0;
    end
  end
endmodule
