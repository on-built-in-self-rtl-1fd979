// Four-bit carry look-ahead adder: four adder cells and one 4-bit LCU.
//
// Each cell produces P_i and G_i from A_i and B_i; the LCU turns them and the
// carry-in C0 into the carries C1..C3 that go back to the cells and the
// carry-out C4. The LCU's group signals PG and GG are brought out so that a
// second-level LCU can compute this block's carry-in (see cla16 and
// multistage_lcu_adder). This is the standard 4-bit CLA organisation that the
// test method is built around. Combinational.
module cla4
  import adder_bist_pkg::*;
#(
  parameter p_kind_e PKIND = P_OR
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);

  logic [3:0] p, g;
  logic [4:1] c;
  logic [3:0] cin_bit;

  assign cin_bit = {c[3:1], c0};

  for (genvar i = 0; i < 4; i++) begin : g_cell
    cla_adder_cell #(.PKIND(PKIND)) u_cell (
      .a(a[i]), .b(b[i]), .c(cin_bit[i]), .s(s[i]), .p(p[i]), .g(g[i])
    );
  end

  lcu4 u_lcu (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  assign c4 = c[4];

endmodule
