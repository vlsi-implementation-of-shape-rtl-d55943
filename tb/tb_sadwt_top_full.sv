// tb_sadwt_top_full: end-to-end testbench of sadwt_top with every parameter at its default (1024 x 1024 direct-method frame, 64 x 64 line-based frame).
//
// All three designs of the top run at the same time:
//  * the direct-method (9,7) system transforms a shaped frame held in the
//    frame-memory model over 3 levels; every word must equal the in-place
//    reference, and the frame time must be one pair per clock plus the
//    pipeline depth once per pass;
//  * the line-based (9,3) system takes one shaped frame in raster order;
//    every coefficient of every level must appear once and match the
//    reference;
//  * the (9,3) 1-D core transforms random shaped lines forward and then
//    back (a direction switch), checked bit for bit.
// It counts the mechanisms the designs rely on (pass changes, read stalls
// between passes, one-point segments in rows and columns, column flushes,
// input hold-off, direction switches) and fails if one never happened.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_sadwt_top_full;
  import sadwt_pkg::*;
  import line_pkg::*;
  import sadwt_ref_pkg::*;
  localparam int LW = 10, LH = 10, LEV = 3;
  localparam int AW = LW + LH, NPIX = 1 << AW;
  localparam int QW = 6, QH = 6;       // line-based frame
  localparam int NW = 1 << QW, NH = 1 << QH;
  localparam int CW = 32, CL = 12;              // 1-D core lines

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // direct-method memory side
  logic d_start = 1'b0, d_busy, d_done, rd_en, wr_en;
  logic [AW-1:0] ra0, ra1, wa0, wa1;
  logic [17:0] rd0, rd1, wd0, wd1;
  // line-based side
  logic l_valid = 1'b0, l_ready, l_mask = 1'b0, l_done;
  data_t l_value = '0;
  lcoef_t lo0 [3], lo1 [3];
  // 1-D core side
  dir_t c_dir = FWD;
  samp_pair_t c_si = '0;
  coef_pair_t c_ci = '0, c_co;
  samp_pair_t c_so;

  sadwt_top dut (
    .clk(clk), .rst_n(rst_n),
    .d_start(d_start), .d_busy(d_busy), .d_done(d_done),
    .mem_rd_en(rd_en), .mem_rd_addr0(ra0), .mem_rd_addr1(ra1), .mem_rd_data0(rd0),
    .mem_rd_data1(rd1), .mem_wr_en(wr_en), .mem_wr_addr0(wa0), .mem_wr_addr1(wa1),
    .mem_wr_data0(wd0), .mem_wr_data1(wd1),
    .l_in_valid(l_valid), .l_in_ready(l_ready), .l_in_value(l_value), .l_in_mask(l_mask),
    .l_out0(lo0), .l_out1(lo1), .l_frame_done(l_done),
    .c93_dir(c_dir), .c93_samp_in(c_si), .c93_coef_in(c_ci), .c93_coef_out(c_co),
    .c93_samp_out(c_so));

  frame_memory_model #(.AW(AW)) mem (
    .clk(clk), .rd_en(rd_en), .rd_addr0(ra0), .rd_addr1(ra1), .rd_data0(rd0), .rd_data1(rd1),
    .wr_en(wr_en), .wr_addr0(wa0), .wr_addr1(wa1), .wr_data0(wd0), .wr_data1(wd1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  int n_pass = 0, n_rd_stall = 0, n_eoo_d = 0, n_flush = 0, n_hold = 0, n_eoo_l = 0;
  int n_fwd = 0, n_inv = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_direct.pass_written) n_pass++;
      if (d_busy && !rd_en) n_rd_stall++;
      if (dut.u_line.g_level[0].u_level.fl_act) n_flush++;
      if (!l_ready) n_hold++;
      if (c_co.valid) n_fwd++;
      if (c_so.valid) n_inv++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- line-based reference and monitor ----------------
  int  ev [3][NH][NW];
  bit  em [3][NH][NW], eer [3][NH][NW], eec [3][NH][NW];
  int  seen [3][NH][NW];
  int  n_got [3];

  function automatic void line_ref(input int img [NH][NW], input bit msk [NH][NW]);
    int  cur [NH][NW];
    bit  cm [NH][NW];
    int  r [NH][NW];
    bit  rm [NH][NW], re [NH][NW];
    line_t x, lo, hi;
    mask_t mx, ml, mh, eo;
    int nw, nh;
    cur = img; cm = msk;
    for (int j = 0; j < 3; j++) begin
      nw = NW >> j; nh = NH >> j;
      for (int y = 0; y < nh; y++) begin
        for (int k = 0; k < nw; k++) begin x[k] = cur[y][k]; mx[k] = cm[y][k]; end
        fwd(930, x, mx, nw, lo, hi, ml, mh, eo);
        for (int i = 0; i < nw / 2; i++) begin
          r[y][2*i] = lo[i];   rm[y][2*i] = ml[i];   re[y][2*i] = eo[i];
          r[y][2*i+1] = hi[i]; rm[y][2*i+1] = mh[i]; re[y][2*i+1] = 0;
        end
      end
      for (int c = 0; c < nw; c++) begin
        for (int k = 0; k < nh; k++) begin x[k] = r[k][c]; mx[k] = rm[k][c]; end
        fwd(930, x, mx, nh, lo, hi, ml, mh, eo);
        for (int k = 0; k < nh / 2; k++) begin
          ev[j][2*k][c]   = (c % 2 == 0) ? wrap16(2 * lo[k]) : lo[k];
          ev[j][2*k+1][c] = (c % 2 == 0) ? hi[k] : ((hi[k] + 1) >>> 1);
          em[j][2*k][c] = ml[k];  em[j][2*k+1][c] = mh[k];
          eec[j][2*k][c] = eo[k]; eec[j][2*k+1][c] = 0;
          eer[j][2*k][c] = eo[k] ? re[2*k+1][c] : re[2*k][c];
          eer[j][2*k+1][c] = re[2*k+1][c];
          if (!ml[k]) ev[j][2*k][c] = 0;
          if (!mh[k]) ev[j][2*k+1][c] = 0;
          if (eo[k] || eer[j][2*k][c]) n_eoo_l++;
        end
      end
      for (int k = 0; k < nh / 2; k++)
        for (int i = 0; i < nw / 2; i++) begin
          cur[k][i] = ev[j][2*k][2*i];
          cm[k][i]  = em[j][2*k][2*i];
        end
    end
  endfunction

  task automatic take(input lcoef_t c, input int j);
    if (c.valid) begin
      int y, x;
      y = c.y; x = c.x;
      if (y < (NH >> j) && x < (NW >> j)) begin
        seen[j][y][x]++;
        n_got[j]++;
        check(int'(c.value) == ev[j][y][x] && c.mask == em[j][y][x] &&
              c.eoo_c == eec[j][y][x] && c.eoo_r == eer[j][y][x] &&
              c.band == 2'({y[0], x[0]}),
              $sformatf("line-based level %0d (y %0d, x %0d)", j, y, x));
      end else check(1'b0, "line-based position out of range");
    end
  endtask

  always @(posedge clk)
    if (rst_n)
      for (int j = 0; j < 3; j++) begin take(lo0[j], j); take(lo1[j], j); end

  // ---------------- 1-D (9,3) core reference and monitor ----------------
  line_t cx [CL], clo [CL], chi [CL], cxr [CL];
  mask_t cm_ [CL], cml [CL], cmh [CL], ceo [CL], cmr [CL];
  int c_nout = 0;

  always @(posedge clk) begin
    if (rst_n && (c_co.valid || c_so.valid)) begin
      int l, i;
      l = (c_nout / (CW / 2)) % CL;
      i = c_nout % (CW / 2);
      if (c_co.valid)
        check(c_co.low == 16'(clo[l][i]) && c_co.high == 16'(chi[l][i]) &&
              c_co.mask_l == cml[l][i] && c_co.mask_h == cmh[l][i] && c_co.eoo == ceo[l][i],
              $sformatf("1-D (9,3) forward line %0d pair %0d", l, i));
      else
        check(c_so.even == 16'(cxr[l][2*i]) && c_so.odd == 16'(cxr[l][2*i+1]) &&
              c_so.mask_e == cmr[l][2*i] && c_so.mask_o == cmr[l][2*i+1],
              $sformatf("1-D (9,3) inverse line %0d pair %0d", l, i));
      c_nout++;
    end
  end

  // ---------------- stimulus ----------------
  int v[], m_[];
  bit m[], e[];
  int t0, t1, ideal;

  initial begin
    int img [NH][NW];
    bit msk [NH][NW];
    repeat (3) @(posedge clk);
    // direct-method frame
    v = new[NPIX]; m = new[NPIX]; e = new[NPIX];
    for (int y = 0; y < (1 << LH); y++)
      for (int x = 0; x < (1 << LW); x++) begin
        int a;
        a = y * (1 << LW) + x;
        v[a] = (x * 3 + y * 5 + $urandom_range(0, 50)) % 256;
        m[a] = shape_at(x, y, 1 << LW, 1 << LH) ^ ($urandom_range(0, 40) == 0);
        e[a] = 1'b0;
        mem.mem[a] = {1'b0, m[a], 16'(v[a])};
      end
    fwd2d(97, v, m, e, LW, LH, LEV);
    for (int a = 0; a < NPIX; a++) if (e[a]) n_eoo_d++;
    ideal = 0;
    for (int j = 0; j < LEV; j++) ideal += 1 << (AW - 2 * j);
    // line-based frame
    for (int y = 0; y < NH; y++)
      for (int x = 0; x < NW; x++) begin
        img[y][x] = (x * 7 + y * 2 + $urandom_range(0, 60)) % 256;
        msk[y][x] = shape_at(NW - 1 - x, y, NW, NH) ^ ($urandom_range(0, 12) == 0);
      end
    line_ref(img, msk);
    for (int j = 0; j < 3; j++) begin
      n_got[j] = 0;
      for (int y = 0; y < NH; y++) for (int x = 0; x < NW; x++) seen[j][y][x] = 0;
    end
    // 1-D core lines
    for (int l = 0; l < CL; l++) begin
      for (int p = 0; p < CW; p++) cx[l][p] = $urandom_range(0, 255);
      rand_mask(cm_[l], CW, 1 + l % 2);
      fwd(93, cx[l], cm_[l], CW, clo[l], chi[l], cml[l], cmh[l], ceo[l]);
      inv(93, clo[l], chi[l], cml[l], cmh[l], ceo[l], CW, cxr[l], cmr[l]);
    end

    rst_n <= 1'b1;
    @(posedge clk);
    fork
      begin : direct
        d_start <= 1'b1;
        t0 = cyc;
        @(posedge clk);
        d_start <= 1'b0;
        while (!d_done) @(posedge clk);
        t1 = cyc;
        $display("direct method: frame of %0d x %0d, %0d levels, %0d clocks (%0d pairs)",
                 1 << LW, 1 << LH, LEV, t1 - t0, ideal);
        check(t1 - t0 >= ideal && t1 - t0 <= ideal + 2 * LEV * 12, "direct frame time");
        for (int a = 0; a < NPIX; a++)
          check(mem.mem[a] == {e[a], m[a], 16'(v[a])},
                $sformatf("direct word %0d: %h want %h", a, mem.mem[a], {e[a], m[a], 16'(v[a])}));
      end
      begin : line
        for (int y = 0; y < NH; y++)
          for (int x = 0; x < NW; x++) begin
            l_valid <= 1'b1; l_value <= 16'(img[y][x]); l_mask <= msk[y][x];
            @(posedge clk);
            while (!l_ready) @(posedge clk);
          end
        l_valid <= 1'b0;
        while (!l_done) @(posedge clk);
        @(posedge clk);
        for (int j = 0; j < 3; j++) begin
          int bad;
          bad = 0;
          for (int y = 0; y < (NH >> j); y++)
            for (int x = 0; x < (NW >> j); x++) if (seen[j][y][x] != 1) bad++;
          check(bad == 0, $sformatf("line-based level %0d: %0d positions not seen once", j, bad));
        end
      end
      begin : core
        for (int pass = 0; pass < 2; pass++) begin
          c_dir <= pass ? INV : FWD;
          @(posedge clk);
          for (int l = 0; l < CL; l++)
            for (int i = 0; i < CW / 2; i++) begin
              c_si <= '{valid: 1'b1, sol: i == 0, even: 16'(cx[l][2*i]), odd: 16'(cx[l][2*i+1]),
                         mask_e: cm_[l][2*i], mask_o: cm_[l][2*i+1]};
              c_ci <= '{valid: 1'b1, sol: i == 0, low: 16'(clo[l][i]), high: 16'(chi[l][i]),
                         mask_l: cml[l][i], mask_h: cmh[l][i], eoo: ceo[l][i]};
              @(posedge clk);
            end
          c_si.valid <= 1'b0; c_ci.valid <= 1'b0;
          repeat (12) @(posedge clk);
        end
        check(c_nout == 2 * CL * CW / 2, "1-D core: every pair out in both directions");
      end
    join
    $display("mechanisms: passes %0d, read stalls %0d, direct one-point bits %0d, line one-point bits %0d, flush clocks %0d, hold-off clocks %0d, core fwd %0d inv %0d",
             n_pass, n_rd_stall, n_eoo_d, n_eoo_l, n_flush, n_hold, n_fwd, n_inv);
    check(n_pass == 2 * LEV, "direct: every row and column pass written");
    check(n_rd_stall > 0, "direct: read stall between passes happened");
    check(n_eoo_d > 0, "direct: a one-point segment at an odd position happened");
    check(n_eoo_l > 0, "line-based: a one-point segment happened");
    check(n_flush > 0, "line-based: column flush happened");
    check(n_hold > 0, "line-based: input hold-off happened");
    check(n_fwd > 0 && n_inv > 0, "1-D core: both directions ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
