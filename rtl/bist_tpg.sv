// Test pattern generator for an N-bit adder (modified twisted-ring form).
//
// State: an (N+1)-bit serial shift register sreg[N:0] and one extra
// flip-flop ff. On each enabled clock the shift register takes ~ff (the
// flip-flop's Q-bar) into sreg[0] and shifts towards sreg[N], while ff
// takes sreg[N]. The N+2 flip-flops thus form a twisted ring (Johnson)
// counter of period 2(N+2). Per bit i the adder receives
//   A_i = XNOR(sreg[i], sreg[i+1]) XOR sreg[N]
//   B_i = sreg[i+1]
//   Ci  = ~ff
// After reset (all flip-flops 0) the sequence for N = 4 is, as A3..A0 B3..B0 Ci:
//   1111 0000 1, 1110 0000 1, 1101 0001 1, 1011 0011 1, 0111 0111 1,
//   0000 1111 1, 0000 1111 0, 0001 1111 0, 0010 1110 0, 0100 1100 0,
//   1000 1000 0, 1111 0000 0, then it repeats.
// The sixth and twelfth vectors are the two that the earlier version of this
// generator (an inverter in place of ff, period 2(N+1)) never produces; they
// complete the stuck-at fault coverage of CLA adders with OR-type propagate.
//
// ce holds the whole state when low, so a vector can be held for several
// cycles (two per vector on the DSP). last is high while the final vector of
// the period (sreg all 0, ff = 1) is presented. Synchronous active-high reset;
// the reset polarity and the last flag are this design's choices.
module bist_tpg #(
  parameter int unsigned N = 48
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         ci,
  output logic         last
);

  logic [N:0] sreg;
  logic       ff;

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
      ff   <= 1'b0;
    end else if (ce) begin
      sreg <= {sreg[N-1:0], ~ff};
      ff   <= sreg[N];
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      a[i] = ~(sreg[i] ^ sreg[i+1]) ^ sreg[N];
      b[i] = sreg[i+1];
    end
    ci   = ~ff;
    last = ff && (sreg == '0);
  end

endmodule
