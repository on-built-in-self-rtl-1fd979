// Built-in self-test of adders: top level.
//
// Two self-test set-ups stand side by side and share only clock and reset.
//
// 1. Direct access. One bist_tpg (N bits) drives the operands and carry-in of
//    four N-bit adders of different structure at once: a ripple carry adder,
//    a ripple CLA, a ripple LCU and a multi-stage LCU. With tpg_ce high a new
//    vector is applied every cycle; the full set is 2(N+2) vectors. Each
//    adder's sum and carry-out are outputs, with the vector that produced them.
//
// 2. DSP slice. A dsp_slice whose 48-bit three-port adder/subtractor is two
//    CLA stages, and a dsp_bist_ctrl that tests both stages through the
//    slice's multiplexers and P register, two cycles per vector. With
//    bist_mode high the sequencer drives OPMODE, C, CIN and SUBTRACT (A and B
//    are held at 0); with bist_mode low the external dsp_* ports drive the
//    slice as in normal use. bist_start starts a run of 8(N+2) cycles;
//    resp_valid marks the cycles in which dsp_p holds a response, and resp_*
//    name the vector, whose fault-free response is resp_a + resp_b + resp_ci.
//    The mode selection is this design's own; no response analyser is included.
//
// N must be a multiple of 16 (ripple LCU) and at most 64 (multi-stage LCU).
// The DSP datapath is always 48 bits; its sequencer is built for 48 bits.
module adder_bist_top
  import adder_bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic              clk,
  input  logic              rst,
  // direct-access adder test
  input  logic              tpg_ce,
  output logic [N-1:0]      tpg_a,
  output logic [N-1:0]      tpg_b,
  output logic              tpg_ci,
  output logic [N-1:0]      sum_rca,
  output logic              cout_rca,
  output logic [N-1:0]      sum_rcla,
  output logic              cout_rcla,
  output logic [N-1:0]      sum_rlcu,
  output logic              cout_rlcu,
  output logic [N-1:0]      sum_mlcu,
  output logic              cout_mlcu,
  // DSP slice and its adder test
  input  logic              bist_mode,
  input  logic              bist_start,
  input  logic [MULT_W-1:0] dsp_a,
  input  logic [MULT_W-1:0] dsp_b,
  input  logic [DSP_W-1:0]  dsp_c,
  input  opmode_t           dsp_opmode,
  input  logic              dsp_cin,
  input  logic              dsp_sub,
  output logic [DSP_W-1:0]  dsp_p,
  output logic              bist_busy,
  output logic              bist_done,
  output logic              resp_valid,
  output logic              resp_stage,
  output logic [DSP_W-1:0]  resp_a,
  output logic [DSP_W-1:0]  resp_b,
  output logic              resp_ci
);

  // ---------------------------------------------------------------- direct
  logic tpg_last_unused;

  bist_tpg #(.N(N)) u_tpg (
    .clk(clk), .rst(rst), .ce(tpg_ce),
    .a(tpg_a), .b(tpg_b), .ci(tpg_ci), .last(tpg_last_unused)
  );

  ripple_carry_adder #(.WIDTH(N)) u_rca (
    .a(tpg_a), .b(tpg_b), .cin(tpg_ci), .s(sum_rca), .cout(cout_rca));

  ripple_cla_adder #(.WIDTH(N)) u_rcla (
    .a(tpg_a), .b(tpg_b), .cin(tpg_ci), .s(sum_rcla), .cout(cout_rcla));

  ripple_lcu_adder #(.WIDTH(N)) u_rlcu (
    .a(tpg_a), .b(tpg_b), .cin(tpg_ci), .s(sum_rlcu), .cout(cout_rlcu));

  multistage_lcu_adder #(.WIDTH(N)) u_mlcu (
    .a(tpg_a), .b(tpg_b), .cin(tpg_ci), .s(sum_mlcu), .cout(cout_mlcu));

  // ---------------------------------------------------------------- DSP
  opmode_t           bist_opmode, sl_opmode;
  logic [DSP_W-1:0]  bist_c, sl_c;
  logic              bist_cin, bist_sub, sl_cin, sl_sub;
  logic [MULT_W-1:0] sl_a, sl_b;

  dsp_bist_ctrl #(.N(DSP_W)) u_ctrl (
    .clk(clk), .rst(rst), .start(bist_start && bist_mode),
    .opmode(bist_opmode), .c(bist_c), .cin(bist_cin), .sub(bist_sub),
    .busy(bist_busy), .done(bist_done),
    .resp_valid(resp_valid), .resp_stage(resp_stage),
    .resp_a(resp_a), .resp_b(resp_b), .resp_ci(resp_ci)
  );

  always_comb begin
    if (bist_mode) begin
      sl_opmode = bist_opmode;
      sl_c      = bist_c;
      sl_cin    = bist_cin;
      sl_sub    = bist_sub;
      sl_a      = '0;
      sl_b      = '0;
    end else begin
      sl_opmode = dsp_opmode;
      sl_c      = dsp_c;
      sl_cin    = dsp_cin;
      sl_sub    = dsp_sub;
      sl_a      = dsp_a;
      sl_b      = dsp_b;
    end
  end

  dsp_slice u_dsp (
    .clk(clk), .rst(rst), .a(sl_a), .b(sl_b), .c(sl_c), .opmode(sl_opmode),
    .cin(sl_cin), .sub(sl_sub), .p(dsp_p)
  );

endmodule
