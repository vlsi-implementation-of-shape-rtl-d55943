// tb_mcu: checks the main computation unit against hand-worked values
// and against 64-bit arithmetic on random operands, in both the add
// (forward) and subtract (inverse) forms.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_mcu;
  import sadwt_pkg::*;
  data_t a, b, d, out;
  coef_t c;
  logic  sub;
  int checks = 0, failures = 0;

  mcu dut (.a(a), .b(b), .d(d), .c(c), .sub(sub), .out(out));

  task automatic try(input int ta, input int tb, input int td, input int tc, input bit ts,
                     input int want);
    a = 16'(ta); b = 16'(tb); d = 16'(td); c = 12'(tc); sub = ts;
    #1;
    checks++;
    if (out !== 16'(want)) begin
      failures++;
      $display("FAIL a=%0d b=%0d d=%0d c=%0d sub=%0d: %0d, want %0d", ta, tb, td, tc, ts, out, want);
    end
  endtask

  initial begin
    // 10 - 1.586*(200) = -307.2 -> -307 (200*-1624/1024 = -317.19 -> -317)
    try(100, 100, 10, -1624, 0, -307);
    try(100, 100, 10, -1624, 1, 327);
    // 0.4435*(64+64) = 56.75 -> 57 (128*454/1024 = 56.75)
    try(64, 64, 0, 454, 0, 57);
    // -0.5*(3+4) = -3.5 -> rounds up to -3
    try(3, 4, 20, -512, 0, 17);
    for (int k = 0; k < 2000; k++) begin
      int ta, tb, td, tc, p;
      longint q;
      bit ts;
      ta = $urandom_range(0, 4000) - 2000;
      tb = $urandom_range(0, 4000) - 2000;
      td = $urandom_range(0, 4000) - 2000;
      tc = $urandom_range(0, 4094) - 2047;
      ts = $urandom_range(0, 1);
      q = (longint'(ta + tb) * tc + 512);
      p = int'(q >>> 10);
      try(ta, tb, td, tc, ts, ts ? td - p : td + p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
