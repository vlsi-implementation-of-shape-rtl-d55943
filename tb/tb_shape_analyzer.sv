// tb_shape_analyzer: streams random line shapes (lines back to back, some
// idle gaps) through the shape analyzer and checks the neighbourhood bits
// and one-point flags of every pair against masks looked up directly in
// the line arrays, and the one-clock latency.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_shape_analyzer;
  import sadwt_pkg::*;
  localparam int W = 16, NL = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  pair_t in, out;
  bit m [NL][W];
  int checks = 0, failures = 0, n_out = 0, cyc = 0;
  int t_in [NL*W/2];
  int n_op = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  shape_analyzer dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out));

  function automatic bit mk(input int l, input int p);
    return (p >= 0 && p < W) ? m[l][p] : 1'b0;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out.valid) begin
      int l, i;
      nbr_t we, wo;
      l = n_out / (W / 2);
      i = n_out % (W / 2);
      for (int k = 0; k < 7; k++) begin
        we[k] = mk(l, 2*i + k - 3);
        wo[k] = (k == 6) ? 1'b0 : mk(l, 2*i + 1 + k - 3);
      end
      checks++;
      if (out.ne !== we || out.no !== wo ||
          out.op_e !== (m[l][2*i] && !mk(l, 2*i-1) && !mk(l, 2*i+1)) ||
          out.op_o !== (m[l][2*i+1] && !mk(l, 2*i) && !mk(l, 2*i+2)) ||
          cyc - t_in[n_out] != 1) begin
        failures++;
        $display("FAIL line %0d pair %0d: ne %b/%b no %b/%b", l, i, out.ne, we, out.no, wo);
      end
      if (out.op_e || out.op_o) n_op++;
      n_out++;
    end
  end

  initial begin
    for (int l = 0; l < NL; l++)
      for (int p = 0; p < W; p++) m[l][p] = ($urandom_range(0, 3) != 0);
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < NL; l++) begin
      if (l % 5 == 0) begin in.valid <= 1'b0; @(posedge clk); end
      for (int i = 0; i < W / 2; i++) begin
        in <= '{valid: 1'b1, sol: i == 0, e: 16'(i), o: 16'(l), me: m[l][2*i], mo: m[l][2*i+1],
                default: '0};
        t_in[l*W/2 + i] = cyc + 1;
        @(posedge clk);
      end
    end
    in.valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != NL * W / 2 || n_op == 0) begin
      failures++;
      $display("FAIL %0d pairs out, %0d one-point", n_out, n_op);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
