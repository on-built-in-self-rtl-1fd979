// Self-checking testbench for cla_adder_cell: applies all eight input
// combinations to both cell forms (OR-type and XOR-type propagate) and
// compares sum, propagate and generate with the arithmetic meaning of each:
// sum is the parity of the three inputs, generate is set when both operands
// are 1, and propagate is set when a carry-in would pass (OR form: either
// operand 1; XOR form: exactly one operand 1).
module tb_cla_adder_cell;
  import adder_bist_pkg::*;

  int checks = 0, failures = 0;
  logic a, b, c;
  logic s_or, p_or, g_or, s_x, p_x, g_x;

  cla_adder_cell #(.PKIND(P_OR))  dut_or (.a(a), .b(b), .c(c), .s(s_or), .p(p_or), .g(g_or));
  cla_adder_cell #(.PKIND(P_XOR)) dut_x  (.a(a), .b(b), .c(c), .s(s_x),  .p(p_x),  .g(g_x));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d c=%0d got=%0d exp=%0d", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int n1;
      {a, b, c} = 3'(v);
      #1;
      n1 = int'(a) + int'(b) + int'(c);
      chk(s_or, logic'(n1 % 2), "POR S");
      chk(s_x,  logic'(n1 % 2), "PXOR S");
      chk(g_or, (int'(a) + int'(b)) == 2, "POR G");
      chk(g_x,  (int'(a) + int'(b)) == 2, "PXOR G");
      chk(p_or, (int'(a) + int'(b)) >= 1, "POR P");
      chk(p_x,  (int'(a) + int'(b)) == 1, "PXOR P");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
