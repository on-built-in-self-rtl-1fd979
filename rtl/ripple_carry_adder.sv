// Ripple carry adder, WIDTH bits.
//
// The simplest of the four adder structures the test pattern generator is
// evaluated on. Each bit is a full adder, S = A^B^C and
// Cout = A&B | C&(A|B), and each carry feeds the next bit, so the carry path
// is two gate levels per bit (96 for 48 bits). The gate-level form of the full
// adder is this design's choice. Combinational.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 48
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] | b[i]));
  end

  assign cout = c[WIDTH];

endmodule
