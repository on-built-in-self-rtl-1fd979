// Self-checking testbench for dsp_slice: 5000 cycles of random A, B, C,
// CIN, SUBTRACT and OPMODE (every code, including those that select 0s).
// A reference model of the multiplexers and of P <= Z +/- (X + Y + CIN) is
// kept in the testbench and compared with P after every clock. A directed
// multiply-accumulate and the adder-test load/apply pairs are run first.
module tb_dsp_slice;
  import adder_bist_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0, rst = 1;
  logic [17:0] a, b;
  logic [47:0] c, p, pm;
  opmode_t     opm;
  logic        cin, sub;

  dsp_slice dut (.clk(clk), .rst(rst), .a(a), .b(b), .c(c), .opmode(opm),
                 .cin(cin), .sub(sub), .p(p));

  always #5 clk = ~clk;

  function automatic logic [47:0] model_next(input logic [47:0] pcur);
    logic [47:0] x, y, z, t;
    logic [6:0]  o;
    longint      prod;
    o    = opm;
    prod = longint'($signed(a)) * longint'($signed(b));
    case (o[1:0])
      2'b01:   x = 48'(prod);
      2'b10:   x = pcur;
      2'b11:   x = {12'd0, a, b};
      default: x = '0;
    endcase
    y = (o[3:2] == 2'b11) ? c : '0;
    case (o[6:4])
      3'b011:  z = c;
      3'b010:  z = pcur;
      default: z = '0;
    endcase
    t = x + y + 48'(cin);
    return sub ? z - t : z + t;
  endfunction

  task automatic step(input logic [6:0] o, input logic [17:0] ta, tb_, input logic [47:0] tc,
                      input logic tci, tsu);
    opm = opmode_t'(o); a = ta; b = tb_; c = tc; cin = tci; sub = tsu;
    pm = model_next(p);
    @(negedge clk);
    checks++;
    if (p !== pm) begin
      failures++;
      $display("FAIL opmode=%b a=%h b=%h c=%h cin=%b sub=%b: P=%h exp %h", o, ta, tb_, tc, tci, tsu, p, pm);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opm = opmode_t'(7'd0); a = '0; b = '0; c = '0; cin = 0; sub = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (p !== '0) begin failures++; $display("FAIL reset"); end
    // multiply-accumulate: P <= P + A*B
    step(7'b010_01_01, 18'd3, 18'd7, '0, 0, 0);
    step(7'b010_01_01, 18'h3fffe, 18'd5, '0, 0, 0);  // -2 * 5
    checks++;
    if (p !== 48'(21 - 10)) begin failures++; $display("FAIL MAC %h", p); end
    // adder-test load/apply pairs: top adder, then bottom adder with subtract
    step({Z_C, Y_ZERO, X_ZERO}, '0, '0, 48'h123456789abc, 0, 0);
    step({Z_ZERO, Y_C, X_P}, '0, '0, 48'hfedcba987654, 1, 0);
    checks++;
    if (p !== 48'h123456789abc + 48'hfedcba987654 + 48'd1) begin failures++; $display("FAIL top %h", p); end
    step({Z_ZERO, Y_C, X_ZERO}, '0, '0, ~48'h00000000ffff, 0, 0);
    step({Z_C, Y_ZERO, X_P}, '0, '0, 48'h000000010000, 0, 1);
    checks++;
    if (p !== 48'h00000000ffff + 48'h000000010000 + 48'd1) begin failures++; $display("FAIL bottom %h", p); end
    for (int i = 0; i < 5000; i++)
      step(7'($urandom), 18'($urandom), 18'($urandom), {16'($urandom), 32'($urandom)},
           1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
