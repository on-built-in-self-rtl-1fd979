// Self-checking testbench for lcu4: all 512 combinations of P3..P0, G3..G0
// and C0. The reference carries come from the serial recurrence
// C(k+1) = G(k) | P(k)&C(k); the group propagate is 1 when every P is 1, and
// the group generate is the carry out of the four bits when C0 = 0.
module tb_lcu4;
  int checks = 0, failures = 0;
  logic [3:0] p, g;
  logic       c0;
  logic [4:1] c;
  logic       pg, gg;

  lcu4 dut (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] rc;
      logic       rg;
      {p, g, c0} = 9'(v);
      #1;
      rc[0] = c0;
      for (int k = 0; k < 4; k++) rc[k+1] = g[k] | (p[k] & rc[k]);
      rg = 1'b0;
      for (int k = 0; k < 4; k++) rg = g[k] | (p[k] & rg);
      checks++;
      if (c !== rc[4:1] || pg !== (p == 4'hf) || gg !== rg) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b: c=%b exp %b pg=%b gg=%b exp %b", p, g, c0, c, rc[4:1], pg, gg, rg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
