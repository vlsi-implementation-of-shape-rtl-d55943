// line_level: one decomposition level of the line-based 2-D SA-DWT with
// the (9,3) filter.
//
// Input is the level's image in raster order, at most one pixel per clock,
// with its shape mask; the level counts positions itself (NW x NH).  Pixel
// pairs go through the row SA-DWT (sa93_step, state in a register).  Its
// coefficient pairs queue in a short FIFO and are taken one coefficient
// per clock: a coefficient of an even row is written into the data buffer
// at its column; a coefficient of an odd row is paired with the word of
// the row above from the data buffer and, with that column's state from
// the temp buffer, runs one column SA-DWT step (sa93_step again), whose
// new state goes back into the temp buffer.  After the last row every
// column gets two flush steps.  Column steps emit two coefficients: the
// row-lowpass columns give LL (doubled, the row and column sqrt(2)
// together) and LH, the row-highpass columns HL and HH (halved).  LL also
// goes out on ll_* as the next level's raster input.  Addresses of both
// buffers are the column index.
//
// Timing: a column step's coefficients appear two clocks after the
// coefficient leaves the FIFO.  `flushing` is high during the flush;
// `done` pulses after it.  The level must not get new pixels while
// flushing (the system holds its input off until the whole frame has
// drained).
//
// From the published architecture: row unit, data buffer, column unit whose
// registers live in a temporal buffer, raster input. Own choice: one such
// level per decomposition level (no shared recursive-pyramid schedule), the
// FIFO between row and column side, row pairing, the flush passes at the
// end of a frame and normalisation by shifts in the form LL x 2, HH / 2.
module line_level
  import sadwt_pkg::*;
  import line_pkg::*;
#(
  parameter int unsigned LOG2_NW = 6,
  parameter int unsigned LOG2_NH = 6,
  parameter int unsigned FIFO_D  = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  data_t  in_value,
  input  logic   in_mask,
  output lcoef_t out0,       // LL or HL coefficient (row 2k)
  output lcoef_t out1,       // LH or HH coefficient (row 2k+1)
  output logic   ll_valid,
  output data_t  ll_value,
  output logic   ll_mask,
  output logic   flushing,
  output logic   done
);
  localparam int unsigned NW = 1 << LOG2_NW;
  localparam int unsigned NH = 1 << LOG2_NH;
  typedef logic [LOG2_NW-1:0] col_t;
  typedef logic [LOG2_NH-1:0] row_t;

  // ---------------- pixel pairing and row SA-DWT ----------------
  col_t  px;
  row_t  py;
  data_t e_hold;
  logic  me_hold;
  lstate_t rst_q, rst_n_st;
  lout_t   rout;
  lin_t    rin;
  logic    pair_rdy, rfirst, rflush, rstep, line_done;
  row_t    row_st;
  logic [LOG2_NW-2:0] idx0, idx1;

  always_comb begin
    pair_rdy = in_valid && px[0];
    rfirst   = pair_rdy && (px == col_t'(1));
    rflush   = !pair_rdy && line_done && (rst_q.v0 || rst_q.v1);
    rstep    = pair_rdy || rflush;
    rin      = '{e: e_hold, o: in_value, me: me_hold, mo: in_mask, side: 2'b00};
  end

  sa93_step u_row (.st(rst_q), .in(rin), .first(rfirst), .flush(rflush),
                   .st_next(rst_n_st), .out(rout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0; py <= '0; e_hold <= '0; me_hold <= 1'b0;
      rst_q <= '0; line_done <= 1'b0; row_st <= '0; idx0 <= '0; idx1 <= '0;
    end else begin
      if (in_valid) begin
        px <= px + 1'b1;
        if (px == col_t'(NW - 1)) py <= py + 1'b1;
        if (!px[0]) begin e_hold <= in_value; me_hold <= in_mask; end
      end
      if (rstep) begin
        rst_q <= rst_n_st;
        if (rfirst) begin
          row_st <= py; idx1 <= '0; line_done <= 1'b0;
        end else begin
          idx0 <= idx1;
          if (!rflush) idx1 <= idx1 + 1'b1;
        end
        if (pair_rdy && px == col_t'(NW - 1)) line_done <= 1'b1;
      end
    end
  end

  // ---------------- FIFO of row coefficient pairs ----------------
  typedef struct packed {
    lout_t c;
    logic [LOG2_NW-2:0] i;
    row_t  row;
  } rfe_t;

  localparam int unsigned FAW = $clog2(FIFO_D);
  rfe_t fifo [FIFO_D];
  logic [FAW:0] f_cnt;
  logic [FAW-1:0] f_rd, f_wr;
  logic f_push, f_pop, half;
  rfe_t head;

  assign f_push = rstep && rout.valid;
  assign head   = fifo[f_rd];
  assign f_pop  = (f_cnt != 0) && half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cnt <= '0; f_rd <= '0; f_wr <= '0; half <= 1'b0;
    end else begin
      if (f_push) begin
        fifo[f_wr] <= '{c: rout, i: idx0, row: row_st};
        f_wr <= f_wr + 1'b1;
      end
      if (f_cnt != 0) half <= ~half;
      if (f_pop) f_rd <= f_rd + 1'b1;
      f_cnt <= f_cnt + (f_push ? (FAW+1)'(1) : '0) - (f_pop ? (FAW+1)'(1) : '0);
    end
  end

  // ---------------- column operation issue (stage C0) ----------------
  // one coefficient per clock: half = 0 the lowpass (column 2i), 1 the
  // highpass (column 2i+1)
  logic   op_v, op_odd, op_flush, op_first;
  col_t   op_x;
  dword_t op_w;
  logic [LOG2_NH-2:0] op_k;
  logic   fl_act, fl_pass;
  col_t   fl_x;
  logic [LOG2_NW:0] last_row_ops;

  always_comb begin
    op_v     = 1'b0; op_odd = 1'b0; op_flush = 1'b0; op_first = 1'b0;
    op_x     = '0; op_w = '0; op_k = '0;
    if (fl_act) begin
      op_v = 1'b1; op_odd = 1'b1; op_flush = 1'b1; op_x = fl_x;
      op_k = '1;
    end else if (f_cnt != 0) begin
      op_v   = 1'b1;
      op_odd = head.row[0];
      op_x   = {head.i, half};
      op_k   = head.row[LOG2_NH-1:1];
      op_first = (head.row[LOG2_NH-1:1] == '0);
      op_w   = half ? '{eoo: 1'b0, mask: head.c.mask_h, value: head.c.high}
                    : '{eoo: head.c.eoo, mask: head.c.mask_l, value: head.c.low};
    end
  end

  dword_t db_q;
  data_buffer #(.DEPTH(NW)) u_dbuf (
    .clk(clk), .we(op_v && !op_odd), .waddr(op_x), .wdata(op_w),
    .re(op_v && op_odd), .raddr(op_x), .rdata(db_q));

  // ---------------- column step (stage C1) ----------------
  logic   c1_v, c1_flush, c1_first;
  col_t   c1_x;
  dword_t c1_w;
  logic [LOG2_NH-2:0] c1_k;
  logic   c1_pass;
  lstate_t tb_q, cst_next;
  lout_t   cout;
  lin_t    cin;

  temp_buffer #(.DEPTH(NW)) u_tbuf (
    .clk(clk), .we(c1_v), .waddr(c1_x), .wdata(cst_next),
    .re(op_v && op_odd), .raddr(op_x), .rdata(tb_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_v <= 1'b0; c1_flush <= 1'b0; c1_first <= 1'b0; c1_x <= '0; c1_w <= '0;
      c1_k <= '0; c1_pass <= 1'b0;
    end else begin
      c1_v     <= op_v && op_odd;
      c1_flush <= op_flush;
      c1_first <= op_first;
      c1_x     <= op_x;
      c1_w     <= op_w;
      c1_k     <= op_k;
      c1_pass  <= fl_pass;
    end
  end

  always_comb begin
    cin = '{e: db_q.value, o: c1_w.value, me: db_q.mask, mo: c1_w.mask,
            side: {db_q.eoo, c1_w.eoo}};
  end

  sa93_step u_col (.st(tb_q), .in(cin), .first(c1_first), .flush(c1_flush),
                   .st_next(cst_next), .out(cout));

  // output pair index: two pairs behind, or the last two in the flush
  logic [LOG2_NH-2:0] kout;
  always_comb begin
    if (c1_flush) kout = c1_pass ? '1 : {{(LOG2_NH-2){1'b1}}, 1'b0};
    else          kout = c1_k - (LOG2_NH-1)'(2);
  end

  always_comb begin
    out0 = '0;
    out1 = '0;
    // a column's first step finds no pending pair (the temp word may be
    // uninitialised before the first frame)
    out0.valid = c1_v && cout.valid && !c1_first;
    out1.valid = c1_v && cout.valid && !c1_first;
    out0.y = 16'({kout, 1'b0});
    out1.y = 16'({kout, 1'b1});
    out0.x = 16'(c1_x);
    out1.x = 16'(c1_x);
    out0.mask  = cout.mask_l;
    out1.mask  = cout.mask_h;
    out0.eoo_c = cout.eoo;
    out1.eoo_c = 1'b0;
    out0.eoo_r = cout.eoo ? cout.side[0] : cout.side[1];
    out1.eoo_r = cout.side[0];
    if (!c1_x[0]) begin
      out0.band  = 2'd0;
      out0.value = data_t'(cout.low <<< 1);
      out1.band  = 2'd2;
      out1.value = cout.high;
    end else begin
      out0.band  = 2'd1;
      out0.value = cout.low;
      out1.band  = 2'd3;
      out1.value = data_t'((cout.high + 16'sd1) >>> 1);
    end
    if (!out0.mask) out0.value = '0;
    if (!out1.mask) out1.value = '0;
    ll_valid = out0.valid && !c1_x[0];
    ll_value = out0.value;
    ll_mask  = out0.mask;
  end

  // ---------------- end of frame: two flush passes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_act <= 1'b0; fl_pass <= 1'b0; fl_x <= '0; last_row_ops <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!fl_act && f_cnt != 0 && head.row == row_t'(NH - 1)) begin
        if (last_row_ops == (LOG2_NW+1)'(NW - 1)) begin
          last_row_ops <= '0;
          fl_act <= 1'b1; fl_pass <= 1'b0; fl_x <= '0;
        end else last_row_ops <= last_row_ops + 1'b1;
      end else if (fl_act) begin
        fl_x <= fl_x + 1'b1;
        if (fl_x == col_t'(NW - 1)) begin
          fl_pass <= ~fl_pass;
          if (fl_pass) begin fl_act <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end
  assign flushing = fl_act;

  // the FIFO never overflows and no coefficient arrives during the flush
  a_fifo: assert property (@(posedge clk) disable iff (!rst_n) !(f_push && !f_pop && f_cnt == (FAW+1)'(FIFO_D)));
  a_flush: assert property (@(posedge clk) disable iff (!rst_n) !(fl_act && f_cnt != 0));
endmodule
