// mcu: main computation unit, the single operation every lifting step is
// made of.  out = d +/- round(c * (a + b)).
//
// a and b are the two neighbours of the updated sample after the
// boundary-extension multiplexers, d is the sample itself, c the lifting
// coefficient.  In the inverse transform the same product is subtracted
// (sub = 1), which reverses the sign of the coefficient as the forward /
// inverse data flows require and keeps the integer lifting step exactly
// invertible.  Purely combinational; the stage around it registers.
//
// Timing: combinational. From the published architecture: the
// multiply-accumulate unit d + c*(a+b) of the lifting model, 12-bit
// coefficient by 16-bit data. Own choice: Q1.10 rounding and wrap-around on
// overflow.
module mcu
  import sadwt_pkg::*;
(
  input  data_t a,
  input  data_t b,
  input  data_t d,
  input  coef_t c,
  input  logic  sub,
  output data_t out
);
  logic signed [DATA_W:0] s;
  data_t p;

  always_comb begin
    s   = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    p   = fx_mul(s, c);
    out = sub ? data_t'(d - p) : data_t'(d + p);
  end
endmodule
