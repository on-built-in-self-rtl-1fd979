// Four-bit look-ahead carry unit (LCU).
//
// From the propagate and generate signals P0..P3, G0..G3 of four adder cells
// (or of four lower-level groups) and the carry-in C0, it computes the carries
// C1..C4 in two-level sum-of-products form, so every carry is two gate delays
// after its inputs, and the group propagate PG = P0P1P2P3 and group generate
// GG = G3 + G2P3 + G1P2P3 + G0P1P2P3 that let a higher-level LCU treat the
// four bits as one. c[k] is C_k. The equations are the standard published
// ones for this unit; only their coding is this design's. Combinational.
module lcu4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:1] c,
  output logic       pg,
  output logic       gg
);

  always_comb begin
    pg   = p[0] & p[1] & p[2] & p[3];
    gg   = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3]);
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (g[0] & p[1]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (g[1] & p[2]) | (g[0] & p[1] & p[2]) | (p[2] & p[1] & p[0] & c0);
    c[4] = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3])
         | (p[3] & p[2] & p[1] & p[0] & c0);
  end

endmodule
