// Self-checking testbench for multistage_lcu_adder at its default width (48 bits) and at
// 16 bits. Applies carry-chain corner cases and 20000 random operand pairs
// and compares sum and carry-out with the integer sum A + B + Cin.
module tb_multistage_lcu_adder;
  localparam int unsigned W = 48;
  int checks = 0, failures = 0;
  logic [W-1:0]  a, b, s;
  logic          cin, cout;
  logic [15:0]   s16;
  logic          cout16;

  multistage_lcu_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  multistage_lcu_adder #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(cout16));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0]  e;
    logic [16:0] e16;
    a = ta; b = tb_; cin = tc;
    #1;
    e   = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
    e16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: %b %h exp %h", a, b, cin, cout, s, e);
    end
    checks++;
    if ({cout16, s16} !== e16) begin
      failures++;
      $display("FAIL 16-bit a=%h b=%h cin=%b: %b %h exp %h", a[15:0], b[15:0], cin, cout16, s16, e16);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {16'($urandom), 32'($urandom)};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply({24{2'b10}}, {24{2'b01}}, 1'b1);
    apply(48'h8000_0000_0000, 48'h8000_0000_0000, 1'b0);
    for (int k = 0; k < W; k++) apply((W)'(1) << k, ~((W)'(0)), 1'b0);
    for (int k = 0; k < W; k++) apply(((W)'(1) << k) - 1, (W)'(1), 1'b0);
    for (int i = 0; i < 20000; i++) apply(rnd(), rnd(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
