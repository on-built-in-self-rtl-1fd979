// 18 x 18-bit two's complement multiplier of the DSP slice.
//
// Produces the full 36-bit signed product of the A and B ports. Only its
// function and widths are specified; it is written as one signed multiply and
// left to synthesis to build. Combinational.
module dsp_multiplier
  import adder_bist_pkg::*;
(
  input  logic signed [MULT_W-1:0] a,
  input  logic signed [MULT_W-1:0] b,
  output logic signed [PROD_W-1:0] m
);

  assign m = a * b;

endmodule
