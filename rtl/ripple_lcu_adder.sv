// Ripple LCU adder, WIDTH bits (a multiple of 16).
//
// A chain of 16-bit two-level CLAs (cla16): the carry-out of each block's
// second-level LCU is the carry-in of the next block. For 48 bits that is
// three blocks. Carries are looked ahead inside each 16-bit block and ripple
// between blocks. The structure follows the method's ripple LCU.
// Combinational.
module ripple_lcu_adder
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

  localparam int unsigned NB = WIDTH / 16;

  if (WIDTH % 16 != 0) begin : g_bad_width
    $error("ripple_lcu_adder: WIDTH must be a multiple of 16");
  end

  logic [NB:0]   c;
  logic [NB-1:0] blk_pg_unused, blk_gg_unused;

  assign c[0] = cin;

  for (genvar j = 0; j < NB; j++) begin : g_blk
    cla16 #(.PKIND(PKIND)) u_cla16 (
      .a(a[16*j +: 16]), .b(b[16*j +: 16]), .cin(c[j]),
      .s(s[16*j +: 16]), .cout(c[j+1]), .pg(blk_pg_unused[j]), .gg(blk_gg_unused[j])
    );
  end

  assign cout = c[NB];

endmodule
