// One-bit carry look-ahead adder cell.
//
// Forms the sum S, propagate P and generate G of one bit position from the
// operand bits A, B and the carry-in C that the look-ahead carry unit
// supplies. The cell makes no carry of its own: the LCU computes all carries
// from the P and G signals. Two forms of the cell exist: PKIND = P_OR makes P
// with an OR gate (S = A^B^C, P = A|B), PKIND = P_XOR reuses the sum's XOR
// (P = A^B, S = P^C). Both use G = A&B. These equations are the standard CLA
// cell; the OR form is the default because the adders that the test pattern
// generator fully covers use it. Purely combinational.
module cla_adder_cell
  import adder_bist_pkg::*;
#(
  parameter p_kind_e PKIND = P_OR
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic p,
  output logic g
);

  always_comb begin
    g = a & b;
    if (PKIND == P_OR) begin
      p = a | b;
      s = a ^ b ^ c;
    end else begin
      p = a ^ b;
      s = p ^ c;
    end
  end

endmodule
