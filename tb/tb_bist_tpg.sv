// Self-checking testbench for bist_tpg.
//
// N = 4: after reset the generator must produce the twelve vectors
// (A3..A0, B3..B0, Ci) of the modified algorithm in order, flag the twelfth
// as last, and then start over; with ce low it must hold its vector.
// N = 48 (default): the sequence must repeat with period 2(N+2) = 100 and
// every vector must match the twisted-ring counter model written below,
// in which vector k has the low k bits of an (N+2)-bit chain set for
// k <= N+2 and then clears them again from the bottom.
module tb_bist_tpg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0;

  logic [3:0]  a4, b4;
  logic        ci4, last4;
  logic [47:0] a48, b48;
  logic        ci48, last48;

  bist_tpg #(.N(4)) dut4  (.clk(clk), .rst(rst), .ce(ce), .a(a4),  .b(b4),  .ci(ci4),  .last(last4));
  bist_tpg          dut48 (.clk(clk), .rst(rst), .ce(ce), .a(a48), .b(b48), .ci(ci48), .last(last48));

  always #5 clk = ~clk;

  // expected N=4 sequence, A3..A0 B3..B0 Ci
  localparam logic [8:0] SEQ4 [12] = '{
    9'b1111_0000_1, 9'b1110_0000_1, 9'b1101_0001_1, 9'b1011_0011_1,
    9'b0111_0111_1, 9'b0000_1111_1, 9'b0000_1111_0, 9'b0001_1111_0,
    9'b0010_1110_0, 9'b0100_1100_0, 9'b1000_1000_0, 9'b1111_0000_0
  };

  // model: chain {ff, sreg[48:0]} of 50 bits for vector k in 0..99
  function automatic logic [96:0] model48(input int k);
    logic [49:0] chain;
    logic [48:0] sr;
    logic [47:0] ma, mb;
    if (k <= 49) chain = (50'(1) << k) - 50'(1);
    else         chain = ~((50'(1) << (k - 50)) - 50'(1));
    sr = chain[48:0];
    for (int i = 0; i < 48; i++) begin
      mb[i] = sr[i+1];
      ma[i] = (sr[i] == sr[i+1]) ? ~sr[48] : sr[48];
    end
    return {ma, mb, ~chain[49]};
  endfunction

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ce  <= 1;
    @(negedge clk);
    for (int k = 0; k < 100 * 2; k++) begin
      if (k < 24)
        chk({a4, b4, ci4} == SEQ4[k % 12] && last4 == (k % 12 == 11),
            $sformatf("N=4 vector %0d: %b %b %b last=%b", k % 12 + 1, a4, b4, ci4, last4));
      chk({a48, b48, ci48} == model48(k % 100) && last48 == (k % 100 == 99),
          $sformatf("N=48 vector %0d", k % 100));
      @(negedge clk);
    end
    // hold with ce low
    begin
      logic [8:0] held;
      held = {a4, b4, ci4};
      ce <= 0;
      repeat (3) @(negedge clk);
      chk({a4, b4, ci4} == held, "hold with ce low");
      ce <= 1;
      @(negedge clk);
      chk({a4, b4, ci4} != held, "advance after ce high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
