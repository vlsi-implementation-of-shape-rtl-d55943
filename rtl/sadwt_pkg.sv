// sadwt_pkg: types and constants shared by the shape-adaptive DWT blocks.
//
// Word widths follow the (9,7) core layout: 16-bit data through adders
// and multipliers, 12-bit multiplier coefficients.  Coefficients are
// signed fixed point with COEF_FRAC fraction bits (Q1.10); that split, the
// rounding (add half, arithmetic shift) and the pair record below are this
// design's own choices.
//
// A "pair" is one even sample (position 2i) and one odd sample (2i+1) of a
// line, with their shape masks.  The pipeline moves one pair per clock.
package sadwt_pkg;

  localparam int unsigned DATA_W    = 16;  // data / adder width
  localparam int unsigned COEF_W    = 12;  // multiplier coefficient width
  localparam int unsigned COEF_FRAC = 10;  // fraction bits of a coefficient

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // (9,7) lifting constants, round(value * 2^COEF_FRAC)
  localparam coef_t C97_ALPHA   = -12'sd1624; // -1.586134342
  localparam coef_t C97_BETA    = -12'sd54;   // -0.05298011854
  localparam coef_t C97_GAMMA   =  12'sd904;  //  0.8829110762
  localparam coef_t C97_DELTA   =  12'sd454;  //  0.4435068522
  localparam coef_t C97_ZETA    =  12'sd1177; //  1.149604398
  localparam coef_t C97_INVZETA =  12'sd891;  //  1/1.149604398
  localparam coef_t C_SQRT2     =  12'sd1448; //  sqrt(2)
  localparam coef_t C_INVSQRT2  =  12'sd724;  //  1/sqrt(2)

  // Which sample of a pair a lifting stage updates.
  typedef enum logic {UPD_ODD = 1'b0, UPD_EVEN = 1'b1} upd_t;

  // Transform direction.
  typedef enum logic {FWD = 1'b0, INV = 1'b1} dir_t;

  // Inside bits of the neighbours of one sample at distance -3..+3
  // (index 0 = -3, 6 = +3; index 3 is the sample itself).  Neighbours in
  // another line are never inside.
  typedef logic [6:0] nbr_t;

  // One pair travelling down a 1-D pipeline.
  typedef struct packed {
    logic  valid;  // pair carries samples of the stream
    logic  sol;    // first pair of a line
    data_t e;      // even sample / lowpass-side value
    data_t o;      // odd sample / highpass-side value
    logic  me;     // even sample inside the object
    logic  mo;     // odd sample inside the object
    nbr_t  ne;     // neighbourhood of the even sample
    nbr_t  no;     // neighbourhood of the odd sample
    logic  op_e;   // even sample is a one-point segment
    logic  op_o;   // odd sample is a one-point segment
  } pair_t;

  // Coefficient-side record: what the forward transform emits and the
  // inverse transform takes.  The 18-bit frame-memory word is
  // {eoo, mask, data}.
  typedef struct packed {
    logic  valid;
    logic  sol;
    data_t low;
    data_t high;
    logic  mask_l;
    logic  mask_h;
    logic  eoo;    // the lowpass coefficient comes from an odd one-point segment
  } coef_pair_t;

  // Sample-side record: what the forward transform takes and the inverse
  // transform emits.
  typedef struct packed {
    logic  valid;
    logic  sol;
    data_t even;
    data_t odd;
    logic  mask_e;
    logic  mask_o;
  } samp_pair_t;

  // Rounded fixed-point product x*c / 2^COEF_FRAC, wrapped to DATA_W bits.
  function automatic data_t fx_mul(input logic signed [DATA_W:0] x, input coef_t c);
    logic signed [DATA_W+COEF_W:0] p;
    p = x * c;
    p = p + (1 <<< (COEF_FRAC - 1));
    return data_t'(p >>> COEF_FRAC);
  endfunction

endpackage
