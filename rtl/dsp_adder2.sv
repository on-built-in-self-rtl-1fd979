// Three-port adder/subtractor of the DSP slice, built as two CLA stages.
//
// Computes s = z + (x + y + cin) when sub = 0 and s = z - (x + y + cin) when
// sub = 1, modulo 2^WIDTH. The top stage adds x, y and cin. Its sum is
// XORed with sub (one's complement when subtracting) and added to z by the
// bottom stage, whose carry-in is sub (completing the two's complement). Each
// stage is a WIDTH-bit CLA whose structure ARCH selects; the multi-stage LCU
// is the default, an assumption since the real slice's adder is not
// documented. The stages' carry-outs are not used. top_s, the top stage's sum,
// is brought out for observation. Combinational.
module dsp_adder2
  import adder_bist_pkg::*;
#(
  parameter int unsigned WIDTH = 48,
  parameter adder_arch_e ARCH  = ARCH_MULTI_LCU
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  input  logic             cin,
  input  logic             sub,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] top_s
);

  logic [WIDTH-1:0] top_x;     // top sum after the subtract XOR
  logic             top_cout_unused, bot_cout_unused;

  cla_adder #(.WIDTH(WIDTH), .ARCH(ARCH)) u_top (
    .a(y), .b(x), .cin(cin), .s(top_s), .cout(top_cout_unused));

  assign top_x = top_s ^ {WIDTH{sub}};

  cla_adder #(.WIDTH(WIDTH), .ARCH(ARCH)) u_bot (
    .a(z), .b(top_x), .cin(sub), .s(s), .cout(bot_cout_unused));

endmodule
