// Ripple CLA adder, WIDTH bits (a multiple of 4).
//
// A chain of 4-bit carry look-ahead adders: the carry-out C4 of each block's
// LCU is the carry-in C0 of the next block's LCU. Carries inside a block are
// looked ahead; between blocks they ripple. The blocks' group PG/GG outputs
// are unused in this structure. The structure follows the method's ripple
// CLA; the width check is this design's. Combinational.
module ripple_cla_adder
  import adder_bist_pkg::*;
#(
  parameter int unsigned WIDTH = 48,
  parameter p_kind_e     PKIND = P_OR
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned NB = WIDTH / 4;

  if (WIDTH % 4 != 0) begin : g_bad_width
    $error("ripple_cla_adder: WIDTH must be a multiple of 4");
  end

  logic [NB:0]   c;
  logic [NB-1:0] blk_pg_unused, blk_gg_unused;

  assign c[0] = cin;

  for (genvar j = 0; j < NB; j++) begin : g_blk
    cla4 #(.PKIND(PKIND)) u_cla4 (
      .a(a[4*j +: 4]), .b(b[4*j +: 4]), .c0(c[j]),
      .s(s[4*j +: 4]), .c4(c[j+1]), .pg(blk_pg_unused[j]), .gg(blk_gg_unused[j])
    );
  end

  assign cout = c[NB];

endmodule
