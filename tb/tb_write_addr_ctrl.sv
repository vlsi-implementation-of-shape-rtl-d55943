// tb_write_addr_ctrl: self-checking testbench of the direct-method write
// address controller.
//
// Coefficient pairs arrive with random gaps (`in_valid`).  Each must be
// written at once (`wr_en` with the pair) to the two addresses it was
// read from: the expected addresses come from plain nested loops over
// levels, row and column passes, lines and pairs.  `pass_written` must
// pulse exactly with the last pair of each pass.  Two frames are run, the
// second after a `clear`, to check that the scan starts over.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_write_addr_ctrl;
  localparam int LW = 3, LH = 4, LEV = 3, AW = LW + LH;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic wr_en, pw;
  logic [AW-1:0] a0, a1;
  int checks = 0, failures = 0, n_gap = 0, n_pw = 0;
  int exp0 [$], exp1 [$], expl [$];
  always #5 clk = ~clk;

  write_addr_ctrl #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEV)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid), .wr_en(wr_en),
    .wr_addr0(a0), .wr_addr1(a1), .pass_written(pw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < LEV; j++)
      for (int c = 0; c < 2; c++) begin
        int nl, np, s;
        s = 1 << j;
        nl = c ? ((1 << LW) >> j) : ((1 << LH) >> j);
        np = c ? ((1 << LH) >> (j + 1)) : ((1 << LW) >> (j + 1));
        for (int l = 0; l < nl; l++)
          for (int p = 0; p < np; p++) begin
            int x, y;
            x = c ? l * s : 2 * p * s;
            y = c ? 2 * p * s : l * s;
            exp0.push_back(y * (1 << LW) + x);
            exp1.push_back(c ? (y + s) * (1 << LW) + x : y * (1 << LW) + x + s);
            expl.push_back(l == nl - 1 && p == np - 1);
          end
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      for (int k = 0; k < exp0.size(); k++) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(negedge clk);
          check(!wr_en && !pw, "no write without input");
          n_gap++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        @(negedge clk);
        check(wr_en, "write with the pair");
        check(a0 == AW'(exp0[k]) && a1 == AW'(exp1[k]),
              $sformatf("frame %0d write %0d: %0d/%0d want %0d/%0d", f, k, a0, a1, exp0[k], exp1[k]));
        check(pw == expl[k], $sformatf("frame %0d write %0d: pass_written", f, k));
        if (pw) n_pw++;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      @(posedge clk);
    end
    check(n_pw == 4 * LEV && n_gap > 0, "every pass end seen, gaps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
