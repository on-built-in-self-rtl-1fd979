// DSP slice datapath: multiplier, X/Y/Z multiplexers, 3-port
// adder/subtractor and P register.
//
// The 48-bit adder is reachable only through three multiplexers:
//   X: 0s, the product AxB, the P register, or A:B (36 bits)
//   Y: 0s, the product's partner code, or the C port
//   Z: 0s, the P register, or the C port
// and computes P <= Z +/- (X + Y + CIN) on each rising clock. OPMODE[1:0],
// [3:2] and [6:4] select X, Y and Z (codes in adder_bist_pkg, Virtex-4 style,
// this design's choice). Codes with no input listed above give 0s. The
// product is sign-extended and placed whole on X for X = AxB; Y = AxB adds 0,
// so selecting both adds the product once. A:B is zero-extended. Only the
// output (P) register is modelled; it has a synchronous active-high reset to 0.
// The multiplexers, the two CLA stages and the register give one cycle from
// inputs to P.
module dsp_slice
  import adder_bist_pkg::*;
#(
  parameter adder_arch_e ARCH = ARCH_MULTI_LCU
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [MULT_W-1:0] a,
  input  logic [MULT_W-1:0] b,
  input  logic [DSP_W-1:0]  c,
  input  opmode_t           opmode,
  input  logic              cin,
  input  logic              sub,
  output logic [DSP_W-1:0]  p
);

  logic signed [PROD_W-1:0] m;
  logic [DSP_W-1:0]         x, y, z, sum;
  logic [DSP_W-1:0]         top_s_unused;

  dsp_multiplier u_mult (.a(a), .b(b), .m(m));

  always_comb begin
    unique case (opmode.x)
      X_ZERO:  x = '0;
      X_M:     x = DSP_W'(m);                      // sign-extended product
      X_P:     x = p;
      X_AB:    x = {{(DSP_W-PROD_W){1'b0}}, a, b};
      default: x = '0;
    endcase
    unique case (opmode.y)
      Y_C:     y = c;
      default: y = '0;                              // 0s, product partner, unused code
    endcase
    case (opmode.z)
      Z_C:     z = c;
      Z_P:     z = p;
      default: z = '0;
    endcase
  end

  dsp_adder2 #(.WIDTH(DSP_W), .ARCH(ARCH)) u_add (
    .x(x), .y(y), .z(z), .cin(cin), .sub(sub), .s(sum), .top_s(top_s_unused));

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= sum;
  end

endmodule
