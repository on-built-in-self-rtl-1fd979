// BIST sequencer for the two-stage adder of a DSP slice.
//
// A test vector for one adder stage has 2N+1 bits (97 for N = 48): two N-bit
// operands and a carry. The slice's only N-bit inputs to the adder are the C
// port and the P register, so each vector takes two clock cycles:
//   load  (phase 0): one operand goes through the C port and the adder into P,
//                    the other multiplexers giving 0s and CIN = SUBTRACT = 0;
//   apply (phase 1): X selects P, the C port carries the other operand, the
//                    third multiplexer gives 0s, and the carry bit drives CIN
//                    (top stage) or SUBTRACT (bottom stage).
// The multiplexer settings per stage and cycle are:
//   top adder    load  X=0s Y=0s Z=C    apply X=P Y=C  Z=0s  CIN=Ci
//   bottom adder load  X=0s Y=C  Z=0s   apply X=P Y=0s Z=C   SUBTRACT=Ci
// For the bottom adder the top stage passes P through and the slice XORs it
// with SUBTRACT, so the loaded operand is inverted when Ci = 1; the bottom
// stage then sees exactly (A, B, Ci). Operand A goes through P and B through
// the C port in the apply cycle (this design's choice).
//
// Vectors come from bist_tpg with its clock enable high only in the apply
// cycle, so each vector is held for both cycles. A run, started by a one-cycle
// start pulse, tests the top adder with all 2(N+2) vectors and then the bottom
// adder with all 2(N+2) vectors, 8(N+2) cycles in all (the order is this
// design's choice). busy is high during the run and done from its end to the
// next start.
//
// Response: the cycle after each apply cycle, P holds the adder stage's
// output, which for a fault-free slice is A + B + Ci (mod 2^N) for either
// stage. resp_valid is high in that cycle, with resp_stage/resp_a/resp_b/
// resp_ci naming the vector, for an external response analyser.
// OPMODE bit 0 is always 0: the test never selects the product or A:B on X.
module dsp_bist_ctrl
  import adder_bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output opmode_t      opmode,
  output logic [N-1:0] c,
  output logic         cin,
  output logic         sub,
  output logic         busy,
  output logic         done,
  output logic         resp_valid,
  output logic         resp_stage,
  output logic [N-1:0] resp_a,
  output logic [N-1:0] resp_b,
  output logic         resp_ci
);

  typedef enum logic {STAGE_TOP = 1'b0, STAGE_BOTTOM = 1'b1} stage_e;
  typedef enum logic {PH_LOAD = 1'b0, PH_APPLY = 1'b1} phase_e;

  stage_e       stage;
  phase_e       phase;
  logic [N-1:0] tpg_a, tpg_b;
  logic         tpg_ci, tpg_last;
  logic         tpg_ce;

  assign tpg_ce = busy && (phase == PH_APPLY);

  bist_tpg #(.N(N)) u_tpg (
    .clk(clk), .rst(rst || start), .ce(tpg_ce),
    .a(tpg_a), .b(tpg_b), .ci(tpg_ci), .last(tpg_last)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= STAGE_TOP;
      phase <= PH_LOAD;
    end else if (start) begin
      busy  <= 1'b1;
      done  <= 1'b0;
      stage <= STAGE_TOP;
      phase <= PH_LOAD;
    end else if (busy) begin
      if (phase == PH_LOAD) begin
        phase <= PH_APPLY;
      end else begin
        phase <= PH_LOAD;
        if (tpg_last) begin
          if (stage == STAGE_TOP) begin
            stage <= STAGE_BOTTOM;
          end else begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    opmode = '{z: Z_ZERO, y: Y_ZERO, x: X_ZERO};
    c      = '0;
    cin    = 1'b0;
    sub    = 1'b0;
    if (busy) begin
      unique case ({stage, phase})
        {STAGE_TOP, PH_LOAD}: begin
          opmode = OPM_TOP_LOAD;
          c      = tpg_a;
        end
        {STAGE_TOP, PH_APPLY}: begin
          opmode = OPM_TOP_APPLY;
          c      = tpg_b;
          cin    = tpg_ci;
        end
        {STAGE_BOTTOM, PH_LOAD}: begin
          opmode = OPM_BOT_LOAD;
          c      = tpg_a ^ {N{tpg_ci}};
        end
        default: begin  // bottom stage, apply
          opmode = OPM_BOT_APPLY;
          c      = tpg_b;
          sub    = tpg_ci;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_valid <= 1'b0;
      resp_stage <= 1'b0;
      resp_a     <= '0;
      resp_b     <= '0;
      resp_ci    <= 1'b0;
    end else begin
      resp_valid <= busy && (phase == PH_APPLY) && !start;
      resp_stage <= stage;
      resp_a     <= tpg_a;
      resp_b     <= tpg_b;
      resp_ci    <= tpg_ci;
    end
  end

  // one test vector per two cycles: the generator only advances in apply cycles
  a_ce_apply_only: assert property (@(posedge clk) disable iff (rst)
    tpg_ce |-> phase == PH_APPLY);

endmodule
