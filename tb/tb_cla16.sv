// Self-checking testbench for cla16: corner cases (carry through all 16 bits,
// all ones, alternating patterns) and 20000 random operand pairs. Sum and
// carry-out are compared with the 17-bit integer sum; GG with the carry-out
// for carry-in 0 and PG with "every bit has A|B".
module tb_cla16;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        cin, cout, pg, gg;

  cla16 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .pg(pg), .gg(gg));

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input logic tc);
    logic [16:0] e, e0;
    a = ta; b = tb_; cin = tc;
    #1;
    e  = 17'(a) + 17'(b) + 17'(cin);
    e0 = 17'(a) + 17'(b);
    checks++;
    if ({cout, s} !== e || gg !== e0[16] || pg !== ((a | b) == 16'hffff)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: %b%h exp %h pg=%b gg=%b", a, b, cin, cout, s, e, pg, gg);
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
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'haaaa, 16'h5555, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h0fff, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
