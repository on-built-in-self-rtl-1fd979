// Self-checking testbench for dsp_adder2: random X, Y, Z, CIN and SUBTRACT
// (plus corner cases) for the default structure and for a ripple CLA build;
// the result must be Z + (X+Y+CIN) or Z - (X+Y+CIN) modulo 2^48, and the top
// stage's sum X+Y+CIN.
module tb_dsp_adder2;
  import adder_bist_pkg::*;

  int checks = 0, failures = 0;
  logic [47:0] x, y, z, s, top_s, s2, top_s2;
  logic        cin, sub;

  dsp_adder2 dut (.x(x), .y(y), .z(z), .cin(cin), .sub(sub), .s(s), .top_s(top_s));
  dsp_adder2 #(.ARCH(ARCH_RIPPLE_CLA)) dut2 (.x(x), .y(y), .z(z), .cin(cin), .sub(sub),
                                             .s(s2), .top_s(top_s2));

  function automatic logic [47:0] rnd();
    return {16'($urandom), 32'($urandom)};
  endfunction

  task automatic apply(input logic [47:0] tx, ty, tz, input logic tc, ts);
    logic [47:0] t, e;
    x = tx; y = ty; z = tz; cin = tc; sub = ts;
    #1;
    t = x + y + 48'(cin);
    e = sub ? z - t : z + t;
    checks++;
    if (s !== e || top_s !== t || s2 !== e || top_s2 !== t) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h cin=%b sub=%b: %h %h exp %h", x, y, z, cin, sub, s, s2, e);
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
    apply('0, '0, '0, 1'b0, 1'b1);
    apply('1, '0, '0, 1'b1, 1'b1);
    apply('1, '1, '1, 1'b1, 1'b0);
    apply(48'd5, 48'd0, 48'd3, 1'b0, 1'b1);
    for (int i = 0; i < 20000; i++) apply(rnd(), rnd(), rnd(), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
