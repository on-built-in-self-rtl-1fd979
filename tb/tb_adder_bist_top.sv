// End-to-end testbench for adder_bist_top at its default size (N = 48).
//
// Direct-access part: the generator runs through its full 2(N+2) = 100
// vector period twice with tpg_ce high, then is held with tpg_ce low. In
// every cycle all four adders must return A + B + Ci (sum and carry-out),
// and the vectors must step through the twisted-ring sequence.
//
// DSP part: the slice is first used in functional mode (multiply-accumulate,
// C-port add, subtract, A:B path), then switched to BIST mode and a full
// test run of both adder stages is made; every response on P must be
// resp_a + resp_b + resp_ci, and in every apply cycle the adder stage under
// test must receive exactly the generator's (A, B, Ci). After the run the slice is switched back to
// functional mode and used again, then a second BIST run is started.
//
// Each mechanism is counted and a failure is counted for any that never
// happened: the two vectors that distinguish the modified generator (A all 0
// with Ci = 1, A all 1 with Ci = 0), generator hold, sequence wrap-around,
// top-stage responses, bottom-stage responses, subtract-mode (inverted
// load) responses, functional/BIST mode switches and completed runs.
module tb_adder_bist_top;
  import adder_bist_pkg::*;

  localparam int unsigned N  = 48;
  localparam int unsigned NV = 2 * (N + 2);

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic          tpg_ce;
  logic [N-1:0]  tpg_a, tpg_b, sum_rca, sum_rcla, sum_rlcu, sum_mlcu;
  logic          tpg_ci, cout_rca, cout_rcla, cout_rlcu, cout_mlcu;
  logic          bist_mode, bist_start;
  logic [17:0]   dsp_a, dsp_b;
  logic [47:0]   dsp_c, dsp_p, resp_a, resp_b;
  opmode_t       dsp_opmode;
  logic          dsp_cin, dsp_sub, bist_busy, bist_done, resp_valid, resp_stage, resp_ci;

  adder_bist_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  int n_new_vec = 0, n_hold = 0, n_wrap = 0, n_resp_top = 0, n_resp_bot = 0, n_resp_sub = 0;
  int n_mode_switch = 0, n_runs = 0, n_func = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- direct
  task automatic check_adders();
    logic [N:0] e;
    e = (N+1)'(tpg_a) + (N+1)'(tpg_b) + (N+1)'(tpg_ci);
    chk({cout_rca, sum_rca}   == e, "ripple carry adder");
    chk({cout_rcla, sum_rcla} == e, "ripple CLA");
    chk({cout_rlcu, sum_rlcu} == e, "ripple LCU");
    chk({cout_mlcu, sum_mlcu} == e, "multi-stage LCU");
  endtask

  // BIST responses
  always @(negedge clk) begin
    if (!rst && resp_valid) begin
      chk(dsp_p == resp_a + resp_b + 48'(resp_ci),
          $sformatf("stage %0d response %h for %h + %h + %b", resp_stage, dsp_p, resp_a, resp_b, resp_ci));
      if (resp_stage) n_resp_bot++; else n_resp_top++;
      if (resp_stage && resp_ci) n_resp_sub++;
    end
  end

  // in every apply cycle the stage under test must see the generator's vector
  // exactly: top stage (X, Y, CIN) = (A, B, Ci); bottom stage (its XORed
  // input, Z, SUBTRACT) = (A, B, Ci)
  int n_apply_top = 0, n_apply_bot = 0;
  always @(negedge clk) begin
    if (!rst && bist_mode && bist_busy && dut.u_ctrl.phase == 1'b1) begin
      logic [47:0] ga, gb;
      logic        gc;
      ga = dut.u_ctrl.tpg_a;
      gb = dut.u_ctrl.tpg_b;
      gc = dut.u_ctrl.tpg_ci;
      if (dut.u_ctrl.stage == 1'b0) begin
        chk(dut.u_dsp.x == ga && dut.u_dsp.y == gb && dut.u_dsp.cin == gc && !dut.u_dsp.sub,
            "top stage receives (A, B, Ci)");
        n_apply_top++;
      end else begin
        chk(dut.u_dsp.u_add.top_x == ga && dut.u_dsp.z == gb && dut.u_dsp.sub == gc,
            "bottom stage receives (A, B, Ci)");
        n_apply_bot++;
      end
    end
  end

  task automatic dsp_op(input logic [6:0] o, input logic [17:0] a, b, input logic [47:0] c,
                        input logic ci, su);
    dsp_opmode = opmode_t'(o); dsp_a = a; dsp_b = b; dsp_c = c; dsp_cin = ci; dsp_sub = su;
    @(negedge clk);
    n_func++;
  endtask

  task automatic functional_ops(input logic [47:0] p0);
    // P <= C ; P <= P + A*B ; P <= P - (C + 1) ; P <= A:B + C
    dsp_op(7'b011_00_00, '0, '0, p0, 0, 0);
    chk(dsp_p == p0, "load C");
    dsp_op(7'b010_01_01, 18'd1000, 18'h3fff6, '0, 0, 0);   // 1000 * -10
    chk(dsp_p == p0 - 48'd10000, "multiply-accumulate");
    dsp_op(7'b010_11_00, '0, '0, 48'd5, 1, 1);
    chk(dsp_p == p0 - 48'd10000 - 48'd6, "subtract");
    dsp_op(7'b000_11_11, 18'h2_0001, 18'h0_0002, 48'd1, 0, 0);
    chk(dsp_p == {12'd0, 18'h2_0001, 18'h0_0002} + 48'd1, "A:B plus C");
  endtask

  task automatic bist_run();
    bist_mode = 1;
    n_mode_switch++;
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    chk(bist_busy, "busy after start");
    while (!bist_done) @(negedge clk);
    n_runs++;
    @(negedge clk);
    bist_mode = 0;
    n_mode_switch++;
  endtask

  initial begin
    tpg_ce = 0; bist_mode = 0; bist_start = 0;
    dsp_a = '0; dsp_b = '0; dsp_c = '0; dsp_opmode = opmode_t'(7'd0); dsp_cin = 0; dsp_sub = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // direct access: two full periods, then hold
    tpg_ce = 1;
    for (int k = 0; k < 2 * NV; k++) begin
      logic [N-1:0] a0;
      logic [N-1:0] b0;
      check_adders();
      if ((tpg_a == '0 && tpg_ci) || (tpg_a == '1 && !tpg_ci)) n_new_vec++;
      if (k == NV) begin
        chk(tpg_a == '1 && tpg_b == '0 && tpg_ci, "sequence restarts at first vector");
        n_wrap++;
      end
      @(negedge clk);
    end
    tpg_ce = 0;
    begin
      logic [2*N:0] held;
      held = {tpg_a, tpg_b, tpg_ci};
      repeat (4) begin
        @(negedge clk);
        chk({tpg_a, tpg_b, tpg_ci} == held, "generator hold");
        check_adders();
        n_hold++;
      end
    end

    // DSP: functional, BIST, functional again, BIST again
    functional_ops(48'h0000_1234_5678);
    bist_run();
    chk(n_resp_top == NV && n_resp_bot == NV,
        $sformatf("responses per stage %0d/%0d, expected %0d", n_resp_top, n_resp_bot, NV));
    functional_ops(48'hffff_0000_0001);
    bist_run();
    chk(n_resp_top == 2 * NV && n_resp_bot == 2 * NV, "second run responses");

    $display("mechanisms: new_vectors=%0d hold=%0d wrap=%0d top_resp=%0d bottom_resp=%0d sub_resp=%0d mode_switches=%0d runs=%0d functional_ops=%0d",
             n_new_vec, n_hold, n_wrap, n_resp_top, n_resp_bot, n_resp_sub, n_mode_switch, n_runs, n_func);
    chk(n_new_vec == 4, "added vectors seen (two per period)");
    chk(n_hold > 0, "hold happened");
    chk(n_wrap > 0, "wrap happened");
    chk(n_resp_top > 0 && n_resp_bot > 0, "both stages tested");
    chk(n_resp_sub > 0, "subtract-mode vectors applied");
    chk(n_mode_switch >= 4, "mode switches");
    chk(n_runs == 2, "two BIST runs");
    chk(n_func > 0, "functional operations");
    chk(n_apply_top == 2 * NV && n_apply_bot == 2 * NV,
        $sformatf("apply cycles %0d/%0d", n_apply_top, n_apply_bot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
