// tb_direct_workloads: runs the direct-method system on the frame sizes of
// its published performance figures, 256 x 256 and 512 x 512 with 3
// levels, each on its own instance of the frame memory (the 1024 x 1024
// case is the full-size top-level test).  For each size it transforms a
// shaped frame, compares every word with the in-place reference, and
// turns the measured frame time into frames per second at 50 MHz, which
// must lie within 0.5 % of the figure quoted for that size (581.2 and
// 145.3 frames/s).  The two sizes run one after the other.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_direct_workloads;
  import sadwt_ref_pkg::*;
  localparam int NS = 2, LEV = 3;
  localparam int LOGS [NS] = '{8, 9};
  localparam real FPS [NS] = '{581.2, 145.3};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cyc = 0;
  bit fin [NS+1];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fin[0] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (fin[NS]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int L = LOGS[s], AW = 2 * L, NPIX = 1 << AW;
    logic start = 1'b0, busy, done, rd_en, wr_en;
    logic [AW-1:0] ra0, ra1, wa0, wa1;
    logic [17:0] rd0, rd1, wd0, wd1;

    sadwt2d_direct #(.LOG2_W(L), .LOG2_H(L), .LEVELS(LEV)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
      .mem_rd_en(rd_en), .mem_rd_addr0(ra0), .mem_rd_addr1(ra1), .mem_rd_data0(rd0),
      .mem_rd_data1(rd1), .mem_wr_en(wr_en), .mem_wr_addr0(wa0), .mem_wr_addr1(wa1),
      .mem_wr_data0(wd0), .mem_wr_data1(wd1));

    frame_memory_model #(.AW(AW)) mem (
      .clk(clk), .rd_en(rd_en), .rd_addr0(ra0), .rd_addr1(ra1), .rd_data0(rd0), .rd_data1(rd1),
      .wr_en(wr_en), .wr_addr0(wa0), .wr_addr1(wa1), .wr_data0(wd0), .wr_data1(wd1));

    initial begin
      int v[];
      bit m[], e[];
      int t0, t1, ideal;
      real fps;
      v = new[NPIX]; m = new[NPIX]; e = new[NPIX];
      for (int y = 0; y < (1 << L); y++)
        for (int x = 0; x < (1 << L); x++) begin
          int a;
          a = y * (1 << L) + x;
          v[a] = (x * 5 + y * 3 + $urandom_range(0, 40)) % 256;
          m[a] = shape_at(x, y, 1 << L, 1 << L) ^ ($urandom_range(0, 50) == 0);
          e[a] = 1'b0;
          mem.mem[a] = {1'b0, m[a], 16'(v[a])};
        end
      fwd2d(97, v, m, e, L, L, LEV);
      ideal = 0;
      for (int j = 0; j < LEV; j++) ideal += 1 << (AW - 2 * j);
      wait (fin[s] && rst_n);
      @(posedge clk);
      start <= 1'b1;
      t0 = cyc;
      @(posedge clk);
      start <= 1'b0;
      while (!done) @(posedge clk);
      t1 = cyc;
      fps = 50.0e6 / real'(t1 - t0);
      $display("%0d x %0d, %0d levels: %0d clocks, %.1f frames/s at 50 MHz (quoted %.1f)",
               1 << L, 1 << L, LEV, t1 - t0, fps, FPS[s]);
      check(t1 - t0 >= ideal, $sformatf("size %0d: not faster than one pair per clock", 1 << L));
      check(fps > FPS[s] * 0.995 && fps < FPS[s] * 1.005, $sformatf("size %0d: frame rate", 1 << L));
      for (int a = 0; a < NPIX; a++)
        check(mem.mem[a] == {e[a], m[a], 16'(v[a])},
              $sformatf("size %0d word %0d: %h want %h", 1 << L, a, mem.mem[a], {e[a], m[a], 16'(v[a])}));
      fin[s+1] = 1'b1;
    end
  end
endmodule
