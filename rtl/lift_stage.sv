// lift_stage: one two-tap lifting step of a 1-D SA-DWT pipeline, built
// from the boundary-extension multiplexers and one MCU.
//
// Register R holds pair i while pair i+1 is at the input.  Updating the
// odd sample uses the even samples of pairs i and i+1; updating the even
// sample uses the odd samples of pairs i-1 (kept in o_prev) and i.  The
// inside bits carried by the pair choose the operands.  upd, c and sub
// are set per stage and may only change while the pipeline is empty; they
// let one stage serve as a forward step and as an inverse step.
//
// Timing: the updated pair i is on `out` (combinational from R) one clock
// after it was on `in`.
//
// Timing: one register stage, one pair per clock. From the published
// architecture: one lifting step mapped onto one MCU with its extension
// muxes. Own choice: the register placement and the selectable odd/even
// update and sign.
module lift_stage
  import sadwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  upd_t  upd,
  input  coef_t c,
  input  logic  sub,
  input  pair_t in,
  output pair_t out
);
  pair_t r;
  data_t o_prev;
  data_t left, right, d, a, b, res;
  logic  left_in, right_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r      <= '0;
      o_prev <= '0;
    end else begin
      r      <= in;
      o_prev <= r.o;
    end
  end

  always_comb begin
    if (upd == UPD_ODD) begin
      left = r.e;    right = in.e;  d = r.o;
      left_in = r.no[2];  right_in = r.no[4];
    end else begin
      left = o_prev; right = r.o;   d = r.e;
      left_in = r.ne[2];  right_in = r.ne[4];
    end
  end

  be_mux u_mux (.left(left), .right(right), .left_in(left_in), .right_in(right_in),
                .a(a), .b(b));
  mcu    u_mcu (.a(a), .b(b), .d(d), .c(c), .sub(sub), .out(res));

  always_comb begin
    out = r;
    if (upd == UPD_ODD) begin
      if (r.mo) out.o = res;
    end else begin
      if (r.me) out.e = res;
    end
  end
endmodule
