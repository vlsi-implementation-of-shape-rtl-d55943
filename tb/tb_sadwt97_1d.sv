// tb_sadwt97_1d: self-checking testbench of sadwt97_1d, the shared forward/inverse
// 1-D SA-DWT core with the (9,7) filter.
//
// Random lines of W samples with random shapes (whole lines, and runs of
// 1..4 and 1..12 samples, so every short-segment case and one-point
// segments at even and odd positions occur) are sent back to back, with
// random idle gaps between lines.  The forward output is compared bit for
// bit with sadwt_ref_pkg, and every pair must come out exactly LAT clocks
// after it went in (one pair per clock, no stalls).  Then the reference
// coefficients are sent through the inverse direction and compared bit
// for bit with the reference inverse, and the reconstruction is compared
// with the original samples (within 6 LSB, the rounding of the normalisation).
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_sadwt97_1d;
  import sadwt_pkg::*;
  import sadwt_ref_pkg::*;

  localparam int W   = 32;
  localparam int NL  = 60;
  localparam int LAT = 7;
  localparam int NP  = W / 2 * NL;

  logic clk = 1'b0, rst_n = 1'b0;
  dir_t dir = FWD;
  samp_pair_t samp_in;
  coef_pair_t coef_in, coef_out;
  samp_pair_t samp_out;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sadwt97_1d dut (.clk(clk), .rst_n(rst_n), .dir(dir), .samp_in(samp_in), .coef_in(coef_in),
               .coef_out(coef_out), .samp_out(samp_out));

  line_t x [NL];
  mask_t m [NL];
  line_t lo [NL], hi [NL], xr [NL];
  mask_t ml [NL], mh [NL], eo [NL], mr [NL];
  int t_in [NP];
  int n_in, n_out, n_onept_e, n_onept_o, n_short;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // forward-direction monitor
  always @(posedge clk) begin
    if (rst_n && coef_out.valid) begin
      int l, i;
      l = n_out / (W / 2);
      i = n_out % (W / 2);
      if (n_out < NP) begin
        check(coef_out.low == 16'(lo[l][i]) && coef_out.high == 16'(hi[l][i]) &&
              coef_out.mask_l == ml[l][i] && coef_out.mask_h == mh[l][i] &&
              coef_out.eoo == eo[l][i] && coef_out.sol == (i == 0),
              $sformatf("fwd line %0d pair %0d: got %0d/%0d %b%b%b want %0d/%0d %b%b%b", l, i,
                        coef_out.low, coef_out.high, coef_out.mask_l, coef_out.mask_h,
                        coef_out.eoo, lo[l][i], hi[l][i], ml[l][i], mh[l][i], eo[l][i]));
        check(cyc - t_in[n_out] == LAT, $sformatf("fwd latency %0d", cyc - t_in[n_out]));
      end else check(1'b0, "extra forward output");
      n_out++;
    end
    if (rst_n && samp_out.valid) begin
      int l, i;
      l = n_out / (W / 2);
      i = n_out % (W / 2);
      if (n_out < NP) begin
        check(samp_out.even == 16'(xr[l][2*i]) && samp_out.odd == 16'(xr[l][2*i+1]) &&
              samp_out.mask_e == mr[l][2*i] && samp_out.mask_o == mr[l][2*i+1],
              $sformatf("inv line %0d pair %0d: got %0d/%0d want %0d/%0d", l, i,
                        samp_out.even, samp_out.odd, xr[l][2*i], xr[l][2*i+1]));
        check(samp_out.mask_e == m[l][2*i] && samp_out.mask_o == m[l][2*i+1] &&
              (!m[l][2*i]   || (int'(samp_out.even) - x[l][2*i]   <= 6 &&
                                x[l][2*i]   - int'(samp_out.even) <= 6)) &&
              (!m[l][2*i+1] || (int'(samp_out.odd)  - x[l][2*i+1] <= 6 &&
                                x[l][2*i+1] - int'(samp_out.odd)  <= 6)),
              $sformatf("round trip line %0d pair %0d: %0d %0d %b%b vs %0d %0d %b%b", l, i, int'(samp_out.even), int'(samp_out.odd), samp_out.mask_e, samp_out.mask_o, x[l][2*i], x[l][2*i+1], m[l][2*i], m[l][2*i+1]));
        check(cyc - t_in[n_out] == LAT, "inv latency");
      end else check(1'b0, "extra inverse output");
      n_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samp_in = '0;
    coef_in = '0;
    n_onept_e = 0; n_onept_o = 0; n_short = 0;
    for (int l = 0; l < NL; l++) begin
      for (int p = 0; p < W; p++) x[l][p] = $urandom_range(0, 255);
      rand_mask(m[l], W, l % 3);
      fwd(97, x[l], m[l], W, lo[l], hi[l], ml[l], mh[l], eo[l]);
      inv(97, lo[l], hi[l], ml[l], mh[l], eo[l], W, xr[l], mr[l]);
      for (int i = 0; i < W / 2; i++) begin
        if (eo[l][i]) n_onept_o++;
        if (m[l][2*i] && (2*i == 0 || !m[l][2*i-1]) && !m[l][2*i+1]) n_onept_e++;
      end
      for (int p = 1; p + 2 < W; p++)
        if (!m[l][p-1] && m[l][p] && m[l][p+1] && !m[l][p+2]) n_short++;
    end
    check(n_onept_e > 0 && n_onept_o > 0 && n_short > 0, "stimulus covers short segments");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      n_in = 0; n_out = 0;
      dir = pass ? INV : FWD;
      @(posedge clk);
      for (int l = 0; l < NL; l++) begin
        repeat ($urandom_range(0, 2)) begin
          samp_in.valid <= 1'b0; coef_in.valid <= 1'b0;
          @(posedge clk);
        end
        for (int i = 0; i < W / 2; i++) begin
          samp_in <= '{valid: 1'b1, sol: i == 0, even: 16'(x[l][2*i]), odd: 16'(x[l][2*i+1]),
                       mask_e: m[l][2*i], mask_o: m[l][2*i+1]};
          coef_in <= '{valid: 1'b1, sol: i == 0, low: 16'(lo[l][i]), high: 16'(hi[l][i]),
                       mask_l: ml[l][i], mask_h: mh[l][i], eoo: eo[l][i]};
          t_in[n_in] = cyc + 1;
          n_in++;
          @(posedge clk);
        end
      end
      samp_in.valid <= 1'b0; coef_in.valid <= 1'b0;
      repeat (LAT + 5) @(posedge clk);
      check(n_out == NP, $sformatf("pass %0d: %0d pairs out of %0d", pass, n_out, NP));
    end
    $display("one-point even %0d, one-point odd %0d, two-sample segments %0d",
             n_onept_e, n_onept_o, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
