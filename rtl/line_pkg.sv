// line_pkg: types of the line-based 2-D SA-DWT with the (9,3) filter.
//
// The 1-D (9,3) forward transform is written as a step function whose
// whole state is one `lstate_t` word: the row unit keeps that word in a
// register, the column unit keeps one per image column in the temp buffer.
//
// Own choice throughout: the field layout of the types; only the 18-bit
// {e_or_o, mask, value} word size follows the published buffer width.
package line_pkg;
  import sadwt_pkg::*;

  // State of a 1-D (9,3) line after pairs up to k+1 have been taken in.
  typedef struct packed {
    logic  v0, v1;       // pair k / pair k+1 hold samples of the line
    data_t e0;           // e_k, not yet updated
    data_t o0;           // o'_k, predicted
    logic  me0, mo0;
    logic [1:0] side0;   // side bits of pair k (even, odd)
    data_t e1, o1;       // pair k+1 as received
    logic  me1, mo1;
    logic [1:0] side1;
    data_t om1, om2;     // o'_{k-1}, o'_{k-2}
    logic  mom1, mom2;   // their masks
    logic  mem1;         // mask of e_{k-1}
  } lstate_t;

  // One input pair of a step.
  typedef struct packed {
    data_t e, o;
    logic  me, mo;
    logic [1:0] side;
  } lin_t;

  // One output pair of a step (unnormalised coefficients).
  typedef struct packed {
    logic  valid;
    data_t low, high;
    logic  mask_l, mask_h, eoo;
    logic [1:0] side;
  } lout_t;

  // Data-buffer word: row coefficient of an even row.
  typedef struct packed {
    logic  eoo;
    logic  mask;
    data_t value;
  } dword_t;

  // One coefficient leaving a level.
  typedef struct packed {
    logic        valid;
    logic [1:0]  band;    // 0 LL, 1 HL (row high), 2 LH (column high), 3 HH
    logic [15:0] y, x;    // position in the level's interleaved coefficient grid
    data_t       value;
    logic        mask;
    logic        eoo_r;   // one-point bit of the row transform
    logic        eoo_c;   // one-point bit of the column transform
  } lcoef_t;
endpackage
