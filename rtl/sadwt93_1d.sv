// sadwt93_1d: shared forward / inverse 1-D shape-adaptive DWT with the
// Daubechies (9,3) filter, one even/odd pair per clock with no stalls.
//
// Two lifting steps: the odd samples are predicted from their two even
// neighbours (alpha = -1/2, a shift), then the even samples are updated
// from their four odd neighbours (beta = 19/64 on the near pair, gamma =
// -3/64 on the far pair, shifts and adds).  Forward order is alpha then
// beta/gamma; the inverse runs the same two stages in the opposite order,
// chosen by input multiplexers, and subtracts the same rounded terms.
// The shape analyzer and the two stages implement the symmetric
// extension of every line segment, including segments shorter than the
// four-tap reach.  Normalisation: lowpass * sqrt(2), highpass / sqrt(2);
// with SCALE = 0 it is left out so that a 2-D design can fold it into
// shifts.  One-point segments and global subsampling as in sadwt97_1d.
//
// Interface as sadwt97_1d.  Latency: LATENCY clocks in both directions.
//
// From the published architecture: the shared forward/inverse (9,3) core
// with shifts and adds in place of multipliers. Own choice: the register
// between the two stages, shared by both directions, the tap reflection and
// the SCALE switch.
module sadwt93_1d
  import sadwt_pkg::*;
#(
  parameter bit SCALE = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dir_t       dir,
  input  samp_pair_t samp_in,
  input  coef_pair_t coef_in,
  output coef_pair_t coef_out,
  output samp_pair_t samp_out
);
  localparam int    LATENCY   = 6;
  localparam coef_t C93_ALPHA = -12'sd512;  // -0.5

  pair_t p_in, p_an, p_sc;
  pair_t a_in, a_out, b_in, b_out, last;
  coef_pair_t co;

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

  inv_prescale #(.LOW_C(C_INVSQRT2), .HIGH_C(C_SQRT2), .ONEPT_C(C_INVSQRT2), .SCALE(SCALE))
    u_pre (.clk(clk), .rst_n(rst_n), .dir(dir), .in(p_an), .out(p_sc));

  // forward: scale -> alpha -> mid -> beta/gamma ; inverse: scale ->
  // beta/gamma -> mid -> alpha.  The shared mid register keeps the order
  // multiplexers free of a combinational path from one stage back into
  // the other.
  pair_t mid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mid <= '0;
    else        mid <= (dir == FWD) ? a_out : b_out;
  end
  assign a_in = (dir == FWD) ? p_sc : mid;
  assign b_in = (dir == FWD) ? mid  : p_sc;
  assign last = (dir == FWD) ? b_out : a_out;

  lift_stage  u_alpha (.clk(clk), .rst_n(rst_n), .upd(UPD_ODD), .c(C93_ALPHA),
                       .sub(dir == INV), .in(a_in), .out(a_out));
  lift4_stage u_bg    (.clk(clk), .rst_n(rst_n), .sub(dir == INV), .in(b_in), .out(b_out));

  subsample_unit #(.LOW_C(C_SQRT2), .HIGH_C(C_INVSQRT2), .ONEPT_C(C_SQRT2), .SCALE(SCALE))
    u_sub (.clk(clk), .rst_n(rst_n), .in(last), .out(co));

  always_comb begin
    coef_out       = co;
    coef_out.valid = co.valid & (dir == FWD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samp_out <= '0;
    else begin
      samp_out.valid  <= last.valid & (dir == INV);
      samp_out.sol    <= last.sol;
      samp_out.mask_e <= last.me;
      samp_out.mask_o <= last.mo;
      samp_out.even   <= last.me ? last.e : '0;
      samp_out.odd    <= last.mo ? last.o : '0;
    end
  end
endmodule
