// Self-checking testbench for cla4: all 512 operand/carry combinations, for
// both propagate forms. Sum and carry-out are compared with the integer sum
// A + B + C0. The group generate GG must equal the carry-out with C0 = 0, and
// the group propagate PG (OR form) must be 1 exactly when every bit has A|B.
module tb_cla4;
  import adder_bist_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] a, b, s, sx;
  logic       c0, c4, pg, gg, c4x, pgx, ggx;

  cla4 #(.PKIND(P_OR))  dut  (.a(a), .b(b), .c0(c0), .s(s),  .c4(c4),  .pg(pg),  .gg(gg));
  cla4 #(.PKIND(P_XOR)) dutx (.a(a), .b(b), .c0(c0), .s(sx), .c4(c4x), .pg(pgx), .gg(ggx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sum, sum0;
      {a, b, c0} = 9'(v);
      #1;
      sum  = int'(a) + int'(b) + int'(c0);
      sum0 = int'(a) + int'(b);
      checks++;
      if ({c4, s} !== 5'(sum) || {c4x, sx} !== 5'(sum)) begin
        failures++;
        $display("FAIL sum a=%h b=%h c0=%b: %b%h / %b%h exp %h", a, b, c0, c4, s, c4x, sx, sum);
      end
      checks++;
      if (gg !== (sum0 >= 16) || ggx !== (sum0 >= 16) || pg !== ((a | b) == 4'hf)
          || pgx !== ((a ^ b) == 4'hf)) begin
        failures++;
        $display("FAIL group a=%h b=%h: pg=%b gg=%b pgx=%b ggx=%b", a, b, pg, gg, pgx, ggx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
