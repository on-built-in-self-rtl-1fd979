// Self-checking testbench for dsp_multiplier: extreme operands (most
// negative, most positive, -1, 0) and 20000 random pairs; the product is
// compared with a 64-bit integer multiply of the sign-extended operands.
module tb_dsp_multiplier;
  int checks = 0, failures = 0;
  logic signed [17:0] a, b;
  logic signed [35:0] m;

  dsp_multiplier dut (.a(a), .b(b), .m(m));

  task automatic apply(input logic [17:0] ta, input logic [17:0] tb_);
    longint e;
    a = ta; b = tb_;
    #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(m) != e) begin
      failures++;
      $display("FAIL %0d * %0d = %0d exp %0d", a, b, m, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(18'h20000, 18'h20000);
    apply(18'h1ffff, 18'h1ffff);
    apply(18'h20000, 18'h1ffff);
    apply(18'h3ffff, 18'h3ffff);
    apply(18'h3ffff, 18'h00001);
    apply(18'h00000, 18'h2abcd);
    for (int i = 0; i < 20000; i++) apply(18'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
