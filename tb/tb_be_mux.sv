// tb_be_mux: checks the boundary-extension multiplexers for every
// combination of inside bits on random operands.
//
// Stimuli, sizes and tolerances are this testbench's own choices; the
// expected values come from a reference written apart from the RTL,
// following the transform as this design defines it.
module tb_be_mux;
  import sadwt_pkg::*;
  data_t left, right, a, b;
  logic  li, ri;
  int checks = 0, failures = 0;

  be_mux dut (.left(left), .right(right), .left_in(li), .right_in(ri), .a(a), .b(b));

  initial begin
    for (int k = 0; k < 400; k++) begin
      data_t wa, wb;
      left  = 16'($urandom);
      right = 16'($urandom);
      li    = k[0];
      ri    = k[1];
      #1;
      wa = li ? left  : (ri ? right : 16'd0);
      wb = ri ? right : (li ? left  : 16'd0);
      checks++;
      if (a !== wa || b !== wb) begin
        failures++;
        $display("FAIL li=%b ri=%b", li, ri);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
