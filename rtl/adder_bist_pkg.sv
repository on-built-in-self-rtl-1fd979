// Shared types and constants for the adder BIST design.
//
// p_kind_e selects how a carry look-ahead adder cell forms its propagate
// signal: with an OR gate (P_OR, the configuration used throughout) or with
// the sum XOR gate (P_XOR). adder_arch_e names the four 48-bit adder
// structures that the test pattern generator is applied to, and selects the
// one used inside the DSP slice's two-stage adder. The OPMODE constants are
// the X/Y/Z multiplexer codes of the DSP slice (bits [1:0] X, [3:2] Y,
// [6:4] Z); the code values follow the Virtex-4 DSP48 convention and are this
// design's choice, since only the number of OPMODE bits (seven) is given.
package adder_bist_pkg;

  typedef enum logic {
    P_OR  = 1'b0,   // P = A | B, S = A ^ B ^ Cin
    P_XOR = 1'b1    // P = A ^ B, S = P ^ Cin
  } p_kind_e;

  typedef enum logic [1:0] {
    ARCH_RIPPLE_CARRY = 2'd0,  // plain ripple carry adder
    ARCH_RIPPLE_CLA   = 2'd1,  // 4-bit CLAs, carry rippled LCU to LCU
    ARCH_RIPPLE_LCU   = 2'd2,  // 16-bit two-level CLAs, carry rippled
    ARCH_MULTI_LCU    = 2'd3   // tree of LCUs (three levels for 48 bits)
  } adder_arch_e;

  // X multiplexer select, OPMODE[1:0]
  typedef enum logic [1:0] {
    X_ZERO = 2'b00,
    X_M    = 2'b01,   // multiplier product
    X_P    = 2'b10,   // P register feedback
    X_AB   = 2'b11    // A:B concatenation
  } xsel_e;

  // Y multiplexer select, OPMODE[3:2]
  typedef enum logic [1:0] {
    Y_ZERO = 2'b00,
    Y_M    = 2'b01,   // partner of X_M (adds nothing, see dsp_slice)
    Y_RSV  = 2'b10,   // unused code, gives zeros
    Y_C    = 2'b11    // C port
  } ysel_e;

  // Z multiplexer select, OPMODE[6:4]; codes not listed give zeros
  typedef enum logic [2:0] {
    Z_ZERO = 3'b000,
    Z_P    = 3'b010,  // P register feedback
    Z_C    = 3'b011   // C port
  } zsel_e;

  typedef struct packed {
    zsel_e z;
    ysel_e y;
    xsel_e x;
  } opmode_t;

  // DSP datapath widths
  localparam int unsigned DSP_W   = 48;  // adder, C port and P register
  localparam int unsigned MULT_W  = 18;  // A and B ports
  localparam int unsigned PROD_W  = 36;  // product and A:B

  // Adder test schedule (see dsp_bist_ctrl): load and apply cycle per stage
  localparam opmode_t OPM_TOP_LOAD  = '{z: Z_C,    y: Y_ZERO, x: X_ZERO};
  localparam opmode_t OPM_TOP_APPLY = '{z: Z_ZERO, y: Y_C,    x: X_P};
  localparam opmode_t OPM_BOT_LOAD  = '{z: Z_ZERO, y: Y_C,    x: X_ZERO};
  localparam opmode_t OPM_BOT_APPLY = '{z: Z_C,    y: Y_ZERO, x: X_P};

endpackage
