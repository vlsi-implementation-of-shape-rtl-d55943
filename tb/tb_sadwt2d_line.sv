// tb_sadwt2d_line: two frames of an arbitrarily shaped object through the
// 3-level line-based (9,3) 2-D SA-DWT, the first at one pixel per clock,
// the second with random input gaps.  Every coefficient of every level
// (value, mask, band, both one-point bits) must appear exactly once and
// match the reference: rows then columns per level with the (9,3)
// lifting, LL doubled and HH halved (rounded up at .5).  Also checks that
// the input is taken at one pixel per clock and that in_ready holds the
// next frame off until the flush is over, and counts how often the
// mechanisms of the design were exercised.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_sadwt2d_line;
  import sadwt_pkg::*;
  import line_pkg::*;
  import sadwt_ref_pkg::*;
  localparam int LW = 5, LH = 5, LEV = 3;
  localparam int NW = 1 << LW, NH = 1 << LH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_mask = 1'b0, frame_done;
  data_t in_value = '0;
  lcoef_t out0 [LEV], out1 [LEV];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sadwt2d_line #(.LOG2_NW(LW), .LOG2_NH(LH), .LEVELS(LEV)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_value(in_value),
    .in_mask(in_mask), .out0(out0), .out1(out1), .frame_done(frame_done));

  // expected coefficient per level and interleaved position
  int  ev [LEV][NH][NW];
  bit  em [LEV][NH][NW], eer [LEV][NH][NW], eec [LEV][NH][NW];
  int  seen [LEV][NH][NW];
  int  n_got [LEV];
  int  n_onept, n_ready_low, n_flush, n_fifo2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic void reference(input int img [NH][NW], input bit msk [NH][NW]);
    int  cur [NH][NW];
    bit  cm [NH][NW];
    int  r [NH][NW];
    bit  rm [NH][NW], re [NH][NW];
    line_t x, lo, hi;
    mask_t mx, ml, mh, eo;
    int nw, nh;
    cur = img; cm = msk;
    for (int j = 0; j < LEV; j++) begin
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
          if (eo[k]) n_onept++;
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
      check(y < (NH >> j) && x < (NW >> j), "position in range");
      if (y < (NH >> j) && x < (NW >> j)) begin
        seen[j][y][x]++;
        n_got[j]++;
        check(int'(c.value) == ev[j][y][x] && c.mask == em[j][y][x] &&
              c.eoo_c == eec[j][y][x] && c.eoo_r == eer[j][y][x] &&
              c.band == 2'({y[0], x[0]}),
              $sformatf("level %0d (y %0d, x %0d): %0d m%b r%b c%b b%0d want %0d m%b r%b c%b",
                        j, y, x, c.value, c.mask, c.eoo_r, c.eoo_c, c.band, ev[j][y][x],
                        em[j][y][x], eer[j][y][x], eec[j][y][x]));
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < LEV; j++) begin
        take(out0[j], j);
        take(out1[j], j);
      end
      if (!in_ready) n_ready_low++;
      if (dut.g_level[0].u_level.fl_act) n_flush++;
      if (dut.g_level[0].u_level.f_cnt >= 2) n_fifo2++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [NH][NW];
    bit msk [NH][NW];
    int t0, t1;
    n_onept = 0; n_ready_low = 0; n_flush = 0; n_fifo2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < NH; y++)
        for (int x = 0; x < NW; x++) begin
          img[y][x] = (x * 5 + y * (f + 2) + $urandom_range(0, 60)) % 256;
          msk[y][x] = shape_at(x + f, y, NW, NH) ^ ($urandom_range(0, 12) == 0);
        end
      reference(img, msk);
      for (int j = 0; j < LEV; j++) begin
        n_got[j] = 0;
        for (int y = 0; y < NH; y++) for (int x = 0; x < NW; x++) seen[j][y][x] = 0;
      end
      @(posedge clk);
      t0 = cyc;
      for (int y = 0; y < NH; y++)
        for (int x = 0; x < NW; x++) begin
          if (f == 1) repeat ($urandom_range(0, 3) == 0 ? 1 : 0) begin
            in_valid <= 1'b0; @(posedge clk);
          end
          in_valid <= 1'b1; in_value <= 16'(img[y][x]); in_mask <= msk[y][x];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
      in_valid <= 1'b0;
      t1 = cyc;
      if (f == 0) check(t1 - t0 == NW * NH, $sformatf("frame 0 taken in %0d clocks", t1 - t0));
      @(posedge clk);
      check(!in_ready, "input held off after the last pixel");
      while (!frame_done) @(posedge clk);
      @(posedge clk);
      check(in_ready, "input open after frame_done");
      for (int j = 0; j < LEV; j++) begin
        int dup;
        dup = 0;
        for (int y = 0; y < (NH >> j); y++)
          for (int x = 0; x < (NW >> j); x++) if (seen[j][y][x] != 1) dup++;
        check(dup == 0 && n_got[j] == (NW >> j) * (NH >> j),
              $sformatf("frame %0d level %0d: %0d coefficients, %0d positions not seen once",
                        f, j, n_got[j], dup));
      end
    end
    $display("odd one-point segments %0d, clocks with input held off %0d, flush clocks %0d, FIFO>=2 clocks %0d",
             n_onept, n_ready_low, n_flush, n_fifo2);
    check(n_onept > 0 && n_ready_low > 0 && n_flush > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
