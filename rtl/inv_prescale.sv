// inv_prescale: input scaling stage of a shared forward/inverse 1-D
// SA-DWT core.
//
// Inverse direction: the lowpass coefficient is divided by the lowpass
// normalisation constant and the highpass coefficient by the highpass one
// (multiplied by the reciprocal constants given as parameters); a
// one-point segment, which the forward transform scaled by sqrt(2), is
// multiplied by 1/sqrt(2) instead.  Forward direction: the samples pass
// unchanged, so both directions have the same latency.  SCALE = 0 passes
// everything unscaled.  One register stage.
//
// Interface: one pair in, one pair out, registered (one clock). From the
// published architecture: the inverse undoes the lowpass/highpass
// normalisation before the lifting steps. Own choice: the constants as
// Q1.10 parameters and the 1/sqrt(2) scale of a one-point segment.
module inv_prescale
  import sadwt_pkg::*;
#(
  parameter coef_t LOW_C   = C97_INVZETA,  // multiplies the lowpass coefficient
  parameter coef_t HIGH_C  = C97_ZETA,     // multiplies the highpass coefficient
  parameter coef_t ONEPT_C = C_INVSQRT2,   // multiplies a one-point coefficient
  parameter bit    SCALE   = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dir_t  dir,
  input  pair_t in,
  output pair_t out
);
  pair_t nxt;

  always_comb begin
    nxt = in;
    if (dir == INV && SCALE) begin
      nxt.e = fx_mul({in.e[DATA_W-1], in.e}, in.op_e ? ONEPT_C : LOW_C);
      nxt.o = fx_mul({in.o[DATA_W-1], in.o}, in.op_o ? ONEPT_C : HIGH_C);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= nxt;
  end
endmodule
