// Sixteen-bit two-level carry look-ahead adder.
//
// Four 4-bit CLAs each report a group propagate PG and generate GG. A
// second-level LCU takes those as its P and G inputs and computes the
// carry-in of each 4-bit group (its C1..C3) and the block's carry-out (its C4)
// directly from the block carry-in. The 4-bit CLAs' own C4 outputs are not
// needed. The block's PG and GG come from the second-level LCU so that a
// third level could be added. The two-level organisation follows the method;
// leaving the first-level C4 outputs unused is this design's reading. Combinational.
module cla16
  import adder_bist_pkg::*;
#(
  parameter p_kind_e PKIND = P_OR
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout,
  output logic        pg,
  output logic        gg
);

  logic [3:0] grp_p, grp_g;
  logic [4:1] grp_c;
  logic [3:0] grp_cin;
  logic [3:0] grp_c4_unused;

  assign grp_cin = {grp_c[3:1], cin};

  for (genvar j = 0; j < 4; j++) begin : g_grp
    cla4 #(.PKIND(PKIND)) u_cla4 (
      .a(a[4*j +: 4]), .b(b[4*j +: 4]), .c0(grp_cin[j]),
      .s(s[4*j +: 4]), .c4(grp_c4_unused[j]), .pg(grp_p[j]), .gg(grp_g[j])
    );
  end

  lcu4 u_lcu2 (.p(grp_p), .g(grp_g), .c0(cin), .c(grp_c), .pg(pg), .gg(gg));

  assign cout = grp_c[4];

endmodule
