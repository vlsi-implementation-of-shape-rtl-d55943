// be_mux: boundary-extension multiplexers of a two-tap lifting step.
//
// A lifting step adds the left and the right neighbour of a sample.  If
// one neighbour lies outside the line segment, the other one is used twice,
// which is the symmetric (type B) extension of the segment; if both are
// outside the sample is a one-point segment and both operands are zero, so
// the step leaves it unchanged.  Combinational.
//
// Timing: combinational. From the published architecture: the operand
// multiplexers that do the symmetric extension at segment ends. Own choice:
// zero operands when both neighbours are outside.
module be_mux
  import sadwt_pkg::*;
(
  input  data_t left,
  input  data_t right,
  input  logic  left_in,   // left neighbour inside the segment
  input  logic  right_in,  // right neighbour inside the segment
  output data_t a,
  output data_t b
);
  always_comb begin
    unique case ({left_in, right_in})
      2'b11:   begin a = left;  b = right; end
      2'b10:   begin a = left;  b = left;  end
      2'b01:   begin a = right; b = right; end
      default: begin a = '0;    b = '0;    end
    endcase
  end
endmodule
