// Multi-stage LCU adder, WIDTH bits (a multiple of 4, at most 64).
//
// Carries are looked ahead over the whole word by a tree of 4-bit LCUs:
//   level 1: WIDTH/4 4-bit CLAs, each giving a group PG/GG;
//   level 2: one LCU per four level-1 groups, giving carry-ins to them and a
//            PG/GG of its own;
//   level 3: one LCU over the level-2 groups, giving their carry-ins and the
//            adder's carry-out.
// For 48 bits there are 12, 3 and 1 LCUs. An LCU input with no group behind
// it is tied to P=0, G=0, and the carry-out is the level-3 carry C_k with k
// the number of level-2 groups (C3 for 48 bits). How a partly filled LCU is
// handled is this design's choice. The level-1 and level-2 LCUs' own C4
// outputs are not needed (the next level supplies those carries) and are left
// unconnected. Combinational.
module multistage_lcu_adder
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

  localparam int unsigned NG1 = WIDTH / 4;          // level-1 groups (4 bits)
  localparam int unsigned NG2 = (NG1 + 3) / 4;      // level-2 groups (16 bits)

  if (WIDTH % 4 != 0 || WIDTH > 64 || WIDTH == 0) begin : g_bad_width
    $error("multistage_lcu_adder: WIDTH must be a multiple of 4 from 4 to 64");
  end

  // level-1 group signals, padded to a whole number of level-2 LCUs
  logic [4*NG2-1:0] pg1, gg1;
  logic [NG1-1:0]   cin1;      // carry into each level-1 group
  logic [NG1-1:0]   c4_unused;

  // level-2 group signals, padded to one full level-3 LCU
  logic [3:0]       pg2, gg2;
  logic [NG2-1:0]   cin2;      // carry into each level-2 group
  logic [4:1]       c3;        // carries out of the level-3 LCU
  logic             pg3_unused, gg3_unused;

  for (genvar j = 0; j < NG1; j++) begin : g_l1
    cla4 #(.PKIND(PKIND)) u_cla4 (
      .a(a[4*j +: 4]), .b(b[4*j +: 4]), .c0(cin1[j]),
      .s(s[4*j +: 4]), .c4(c4_unused[j]), .pg(pg1[j]), .gg(gg1[j])
    );
  end

  if (4*NG2 > NG1) begin : g_pad1
    assign pg1[4*NG2-1:NG1] = '0;
    assign gg1[4*NG2-1:NG1] = '0;
  end

  for (genvar k = 0; k < NG2; k++) begin : g_l2
    logic [4:1] c2;
    lcu4 u_lcu2 (
      .p(pg1[4*k +: 4]), .g(gg1[4*k +: 4]), .c0(cin2[k]),
      .c(c2), .pg(pg2[k]), .gg(gg2[k])
    );
    // carries into the level-1 groups of this level-2 group
    for (genvar m = 0; m < 4; m++) begin : g_c1
      if (4*k + m < NG1) begin : g_used
        if (m == 0) begin : g_first
          assign cin1[4*k] = cin2[k];
        end else begin : g_rest
          assign cin1[4*k + m] = c2[m];
        end
      end
    end
  end

  if (NG2 < 4) begin : g_pad2
    assign pg2[3:NG2] = '0;
    assign gg2[3:NG2] = '0;
  end

  lcu4 u_lcu3 (.p(pg2), .g(gg2), .c0(cin), .c(c3), .pg(pg3_unused), .gg(gg3_unused));

  for (genvar k = 0; k < NG2; k++) begin : g_c2
    if (k == 0) begin : g_first
      assign cin2[0] = cin;
    end else begin : g_rest
      assign cin2[k] = c3[k];
    end
  end

  assign cout = c3[NG2];

endmodule
