// Self-checking testbench for dsp_bist_ctrl at N = 48.
//
// A behavioural model of the DSP datapath (multiplexers, P <= Z +/- (X+Y+CIN),
// P register) sits behind the sequencer. The testbench checks:
//  - the OPMODE of every cycle against the two-cycle load/apply schedule for
//    the top adder and then the bottom adder;
//  - that CIN is used only in top-adder apply cycles and SUBTRACT only in
//    bottom-adder apply cycles;
//  - each response: when resp_valid is high, the model's P must equal
//    resp_a + resp_b + resp_ci, and the vectors of each stage must follow
//    the twisted-ring sequence (checked with an independent counter model);
//  - the run length: 2(N+2) responses per stage and 8(N+2) busy cycles;
//  - that the bottom-stage load inverts the operand when the carry bit is 1.
module tb_dsp_bist_ctrl;
  import adder_bist_pkg::*;

  localparam int unsigned N = 48;
  localparam int unsigned NV = 2 * (N + 2);

  int checks = 0, failures = 0;
  logic         clk = 0, rst = 1, start = 0;
  opmode_t      opm;
  logic [N-1:0] c, ra, rb, p;
  logic         cin, sub, busy, done, rv, rs, rci;

  dsp_bist_ctrl #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .opmode(opm), .c(c), .cin(cin), .sub(sub),
    .busy(busy), .done(done), .resp_valid(rv), .resp_stage(rs),
    .resp_a(ra), .resp_b(rb), .resp_ci(rci));

  always #5 clk = ~clk;

  // behavioural DSP datapath
  always_ff @(posedge clk) begin
    logic [N-1:0] x, y, z, t;
    x = (opm.x == X_P) ? p : '0;
    y = (opm.y == Y_C) ? c : '0;
    z = (opm.z == Z_C) ? c : (opm.z == Z_P) ? p : '0;
    t = x + y + N'(cin);
    p <= sub ? z - t : z + t;
  end

  // independent sequence model: vector k of the (N+2)-stage twisted ring
  function automatic logic [2*N:0] vec(input int k);
    logic [N+1:0] chain;
    logic [N-1:0] ma, mb;
    if (k <= N + 1) chain = ((N+2)'(1) << k) - (N+2)'(1);
    else            chain = ~(((N+2)'(1) << (k - N - 2)) - (N+2)'(1));
    for (int i = 0; i < N; i++) begin
      mb[i] = chain[i+1];
      ma[i] = (chain[i] == chain[i+1]) ? ~chain[N] : chain[N];
    end
    return {ma, mb, ~chain[N+1]};
  endfunction

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  int busy_cycles = 0, nresp [2] = '{0, 0}, inverted_loads = 0;
  int cyc_in_run = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // schedule checks, sampled before each clock edge
  always @(negedge clk) begin
    if (!rst && busy) begin
      int stg, ph;
      stg = (cyc_in_run < 2 * NV) ? 0 : 1;
      ph  = cyc_in_run % 2;
      busy_cycles++;
      if (stg == 0 && ph == 0) chk(opm == OPM_TOP_LOAD  && !cin && !sub, $sformatf("top load opmode %b cyc %0d", opm, cyc_in_run));
      if (stg == 0 && ph == 1) chk(opm == OPM_TOP_APPLY && !sub, "top apply opmode");
      if (stg == 1 && ph == 0) chk(opm == OPM_BOT_LOAD  && !cin && !sub, "bottom load opmode");
      if (stg == 1 && ph == 1) chk(opm == OPM_BOT_APPLY && !cin, "bottom apply opmode");
      if (stg == 1 && ph == 0) begin
        logic [2*N:0] v;
        v = vec((cyc_in_run / 2) % NV);
        chk(c == (v[0] ? ~v[2*N:N+1] : v[2*N:N+1]), "bottom load operand");
        if (v[0]) inverted_loads++;
      end
      cyc_in_run++;
    end
    if (!rst && rv) begin
      logic [2*N:0] v;
      v = vec(nresp[rs]);
      chk({ra, rb, rci} == v, $sformatf("stage %0d vector %0d sequence", rs, nresp[rs]));
      chk(p == ra + rb + N'(rci), $sformatf("stage %0d vector %0d response %h", rs, nresp[rs], p));
      nresp[rs]++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    chk(busy_cycles == 8 * (N + 2), $sformatf("run length %0d cycles", busy_cycles));
    chk(nresp[0] == NV && nresp[1] == NV, $sformatf("responses %0d/%0d", nresp[0], nresp[1]));
    chk(inverted_loads == N + 2, $sformatf("inverted bottom loads %0d", inverted_loads));
    chk(done && !busy, "done after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
