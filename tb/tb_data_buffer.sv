// tb_data_buffer: self-checking testbench of the line-based data buffer (one line of row coefficients).
//
// Random writes and reads, often to the same address in the same clock,
// are compared with an associative-array model.  Read data must appear one
// clock after the address and must hold while no read is enabled; a read
// of the address being written returns the old word.  Every word is
// written before it is read, as in the design.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_data_buffer;
  import line_pkg::*;
  localparam int D = 64, AW = $clog2(D);
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] wa = '0, ra = '0;
  dword_t wd = '0, rd, model [D], want;
  bit written [D];
  int checks = 0, failures = 0, n_same = 0;
  always #5 clk = ~clk;

  data_buffer #(.DEPTH(D)) dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra),
                         .rdata(rd));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      we <= 1'b1; wa <= AW'(a); wd <= dword_t'({$urandom, $urandom, $urandom});
      @(posedge clk);
      model[a] = wd; written[a] = 1'b1;
    end
    we <= 1'b0;
    want = '0;
    for (int k = 0; k < 4000; k++) begin
      logic [AW-1:0] w_a, r_a;
      dword_t w_d;
      bit do_w, do_r;
      do_w = $urandom_range(0, 1); do_r = (k == 0) || $urandom_range(0, 2) != 0;
      w_a = AW'($urandom_range(0, D - 1));
      r_a = ($urandom_range(0, 3) == 0) ? w_a : AW'($urandom_range(0, D - 1));
      w_d = dword_t'({$urandom, $urandom, $urandom});
      we <= do_w; wa <= w_a; wd <= w_d; re <= do_r; ra <= r_a;
      @(posedge clk);
      if (do_r) want = model[r_a];
      if (do_w && do_r && w_a == r_a) n_same++;
      if (do_w) model[w_a] = w_d;
      @(negedge clk);
      checks++;
      if (rd !== want) begin
        failures++;
        if (failures < 20) $display("FAIL step %0d: read %h want %h", k, rd, want);
      end
    end
    checks++;
    if (n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
