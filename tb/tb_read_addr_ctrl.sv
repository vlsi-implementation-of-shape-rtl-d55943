// tb_read_addr_ctrl: self-checking testbench of the direct-method read
// address controller.
//
// A 16 x 8 frame over 3 levels is read.  The expected address pairs are
// built by plain nested loops over levels, passes, lines and pairs (rows:
// horizontal neighbours at distance 2^j, columns: vertical neighbours at
// distance 2^j), independent of the controller's counters.  After each
// pass the testbench holds `pass_written` back for a random number of
// clocks; the controller must not read during that wait, must resume
// right after it, and must pulse `done` once after the last pass.  The
// frame is run twice to check the return to idle.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_read_addr_ctrl;
  localparam int LW = 4, LH = 3, LEV = 3, AW = LW + LH;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pass_written = 1'b0;
  logic rd_en, rd_sol, busy, done;
  logic [AW-1:0] a0, a1;
  int checks = 0, failures = 0;
  int exp0 [$], exp1 [$], exps [$], expl [$];
  int n_stall = 0, n_done = 0;
  always #5 clk = ~clk;

  read_addr_ctrl #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pass_written(pass_written), .rd_en(rd_en),
    .rd_addr0(a0), .rd_addr1(a1), .rd_sol(rd_sol), .busy(busy), .done(done));

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

  always @(posedge clk) if (done) n_done++;

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
            exps.push_back(p == 0);
            expl.push_back(l == nl - 1 && p == np - 1);
          end
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      int k;
      @(posedge clk);
      check(!busy && !rd_en, "idle before start");
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      k = 0;
      while (k < exp0.size()) begin
        @(negedge clk);
        check(rd_en, $sformatf("frame %0d read %0d issued without a gap", f, k));
        check(a0 == AW'(exp0[k]) && a1 == AW'(exp1[k]) && rd_sol == exps[k],
              $sformatf("frame %0d read %0d: %0d/%0d want %0d/%0d", f, k, a0, a1, exp0[k], exp1[k]));
        if (expl[k]) begin
          int wt;
          wt = $urandom_range(1, 9);
          @(posedge clk);
          for (int i = 0; i < wt; i++) begin
            @(negedge clk);
            check(!rd_en && busy, "no read while the pass is being written");
            n_stall++;
            @(posedge clk);
          end
          pass_written <= 1'b1;
          @(posedge clk);
          pass_written <= 1'b0;
        end else @(posedge clk);
        k++;
      end
      @(negedge clk);
      check(!busy && !rd_en, $sformatf("frame %0d: idle after the last pass", f));
      check(n_done == f + 1, $sformatf("frame %0d: one done pulse", f));
    end
    check(n_stall > 0, "waits between passes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
