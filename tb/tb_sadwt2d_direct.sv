// tb_sadwt2d_direct: runs a 3-level forward 2-D SA-DWT of a 64 x 32 frame
// holding an arbitrarily shaped object through the direct-method system
// and its frame-memory model, then compares every word of the frame
// (value, mask and e_or_o bit) with the in-place reference transform.  It
// also checks the frame time (one pair per clock, plus the pipeline depth
// once per pass), that memory traffic is two reads and two writes per
// pair, and that busy/done behave.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_sadwt2d_direct;
  import sadwt_ref_pkg::*;
  localparam int LW = 6, LH = 5, LEV = 3;
  localparam int AW = LW + LH, NPIX = 1 << AW;
  localparam int PASS_GAP = 12;  // allowed clocks per pass beyond its pairs

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic rd_en, wr_en;
  logic [AW-1:0] ra0, ra1, wa0, wa1;
  logic [17:0] rd0, rd1, wd0, wd1;
  int checks = 0, failures = 0, cyc = 0, t0, t1, ideal, r0, w0;
  int v[], rv[];
  bit m[], e[];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sadwt2d_direct #(.LOG2_W(LW), .LOG2_H(LH), .LEVELS(LEV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .mem_rd_en(rd_en), .mem_rd_addr0(ra0), .mem_rd_addr1(ra1), .mem_rd_data0(rd0),
    .mem_rd_data1(rd1), .mem_wr_en(wr_en), .mem_wr_addr0(wa0), .mem_wr_addr1(wa1),
    .mem_wr_data0(wd0), .mem_wr_data1(wd1));

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    v = new[NPIX]; rv = new[NPIX]; m = new[NPIX]; e = new[NPIX];
    for (int y = 0; y < (1 << LH); y++)
      for (int x = 0; x < (1 << LW); x++) begin
        int a;
        a = y * (1 << LW) + x;
        v[a] = (x * 7 + y * 3 + $urandom_range(0, 40)) % 256;
        m[a] = shape_at(x, y, 1 << LW, 1 << LH) ^ ($urandom_range(0, 30) == 0);
        e[a] = 1'b0;
        mem.mem[a] = {1'b0, m[a], 16'(v[a])};
      end
    fwd2d(97, v, m, e, LW, LH, LEV);

    ideal = 0;
    for (int j = 0; j < LEV; j++) ideal += 2 * ((1 << (AW - 2 * j)) / 2);

    rst_n <= 1'b1;
    @(posedge clk);
    check(!busy, "idle after reset");
    start <= 1'b1;
    t0 = cyc;
    r0 = mem.n_reads;
    w0 = mem.n_writes;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    check(busy, "busy after start");
    while (!done) @(posedge clk);
    t1 = cyc;
    @(posedge clk);
    check(!busy, "idle after done");
    $display("frame time %0d clocks, %0d pairs", t1 - t0, ideal);
    check(t1 - t0 >= ideal && t1 - t0 <= ideal + 2 * LEV * PASS_GAP, "frame time");
    check(mem.n_reads - r0 == 2 * ideal && mem.n_writes - w0 == 2 * ideal, "two reads and two writes per pair");
    for (int a = 0; a < NPIX; a++)
      check(mem.mem[a] == {e[a], m[a], 16'(v[a])},
            $sformatf("word %0d (x %0d y %0d): %h want %h", a, a % (1 << LW), a >> LW,
                      mem.mem[a], {e[a], m[a], 16'(v[a])}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
