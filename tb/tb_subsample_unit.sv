// tb_subsample_unit: checks the output subsampling stage: normal lowpass
// and highpass scaling, one-point segments at even and at odd positions
// (moved into the lowpass slot with e_or_o set), zeroed outside positions
// and the one-clock latency.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_subsample_unit;
  import sadwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  pair_t in;
  coef_pair_t out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  subsample_unit dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out));

  function automatic int rnd(input int x, input int c);
    // x*c/1024 rounded half up
    return int'($floor((real'(x) * c + 512.0) / 1024.0));
  endfunction

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      int wl, wh;
      bit wml, wmh, weo;
      in = '0;
      in.valid = 1'b1;
      in.e = 16'($urandom_range(0, 8000) - 4000);
      in.o = 16'($urandom_range(0, 8000) - 4000);
      case (k % 4)
        0: begin in.me = 1; in.mo = 1; end
        1: begin in.me = 1; in.mo = 0; in.op_e = 1; end
        2: begin in.me = 0; in.mo = 1; in.op_o = 1; end
        default: begin in.me = $urandom_range(0, 1); in.mo = $urandom_range(0, 1); end
      endcase
      weo = in.op_o;
      wml = in.me | in.op_o;
      wmh = in.mo & !in.op_o;
      wl = !wml ? 0 : in.op_o ? rnd(in.o, 1448) : in.op_e ? rnd(in.e, 1448) : rnd(in.e, 1177);
      wh = wmh ? rnd(in.o, 891) : 0;
      @(posedge clk);
      #1;
      checks++;
      if (out.low !== 16'(wl) || out.high !== 16'(wh) || out.mask_l !== wml ||
          out.mask_h !== wmh || out.eoo !== weo || !out.valid) begin
        failures++;
        $display("FAIL case %0d: %0d %0d want %0d %0d", k, out.low, out.high, wl, wh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
