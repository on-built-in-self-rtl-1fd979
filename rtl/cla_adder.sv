// WIDTH-bit adder whose structure is chosen by a parameter.
//
// ARCH selects one of the four adder structures of this design: a ripple
// carry adder, a ripple CLA (4-bit CLAs chained), a ripple LCU (16-bit
// two-level CLAs chained) or a multi-stage LCU (a tree of LCUs). All compute
// s = a + b + cin with carry-out cout; they differ in their gates, hence in
// delay and in which faults a test set detects. WIDTH must suit the chosen
// structure (a multiple of 16 for the ripple LCU, at most 64 for the
// multi-stage LCU). Combinational.
module cla_adder
  import adder_bist_pkg::*;
#(
  parameter int unsigned WIDTH = 48,
  parameter adder_arch_e ARCH  = ARCH_MULTI_LCU,
  parameter p_kind_e     PKIND = P_OR
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  if (ARCH == ARCH_RIPPLE_CARRY) begin : g_rca
    ripple_carry_adder #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else if (ARCH == ARCH_RIPPLE_CLA) begin : g_rcla
    ripple_cla_adder #(.WIDTH(WIDTH), .PKIND(PKIND)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else if (ARCH == ARCH_RIPPLE_LCU) begin : g_rlcu
    ripple_lcu_adder #(.WIDTH(WIDTH), .PKIND(PKIND)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else begin : g_mlcu
    multistage_lcu_adder #(.WIDTH(WIDTH), .PKIND(PKIND)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end

endmodule
