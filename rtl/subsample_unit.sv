// subsample_unit: global subsampling and output stage of a forward 1-D
// SA-DWT (unit A of the generic model, the M_L / M_H multiplexers).
//
// Every even position yields a lowpass and every odd position a highpass
// coefficient, each scaled by its normalisation constant.  A one-point
// segment yields one lowpass coefficient, the sample times sqrt(2): at an
// even position it stays in the lowpass slot; at an odd position it moves
// into the (then empty) lowpass slot of its pair, maskH is cleared and
// e_or_o marks it, so the inverse transform can put it back.  Outside
// positions carry a zero value and a zero mask.  SCALE = 0 leaves all
// values unscaled (normalisation done elsewhere).  One register stage.
//
// Timing: one register stage. From the published architecture: global
// subsampling (lowpass even, highpass odd), normalisation, and the extra
// e_or_o bit for a one-point segment at an odd position. Own choice: the
// sqrt(2) gain of a one-point segment and clearing its highpass mask.
module subsample_unit
  import sadwt_pkg::*;
#(
  parameter coef_t LOW_C   = C97_ZETA,
  parameter coef_t HIGH_C  = C97_INVZETA,
  parameter coef_t ONEPT_C = C_SQRT2,
  parameter bit    SCALE   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pair_t      in,
  output coef_pair_t out
);
  coef_pair_t nxt;
  data_t sel_l;
  coef_t c_l;

  always_comb begin
    sel_l = in.op_o ? in.o : in.e;
    c_l   = (in.op_o || in.op_e) ? ONEPT_C : LOW_C;
    nxt.valid  = in.valid;
    nxt.sol    = in.sol;
    nxt.mask_l = in.me | in.op_o;
    nxt.mask_h = in.mo & ~in.op_o;
    nxt.eoo    = in.op_o;
    nxt.low    = SCALE ? fx_mul({sel_l[DATA_W-1], sel_l}, c_l) : sel_l;
    nxt.high   = SCALE ? fx_mul({in.o[DATA_W-1], in.o}, HIGH_C) : in.o;
    if (!nxt.mask_l) nxt.low  = '0;
    if (!nxt.mask_h) nxt.high = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= nxt;
  end
endmodule
