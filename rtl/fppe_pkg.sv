// fppe_pkg: widths, types and helper functions shared by the FIR filter and
// the floating-point processing element (FPPE).
//
// The FIR numbers (51 taps, 16-bit samples and coefficients, 32-bit tap
// products, 6-bit coefficient address) are the ones the design's simulation
// shows. The single-precision layout is IEEE-754 binary32 (1 sign, 8
// exponent, 23 fraction bits, bias 127). The Q1.15 output scaling of the
// filter is this design's own choice.
package fppe_pkg;

  // ---------------- FIR filter ----------------
  localparam int unsigned FIR_TAPS   = 51;  // coefficients b[0:50]
  localparam int unsigned FIR_DATA_W = 16;  // x, z1..z50, d_out
  localparam int unsigned FIR_COEF_W = 16;  // b[k]
  localparam int unsigned FIR_PROD_W = 32;  // temp0..temp50
  localparam int unsigned FIR_ADDR_W = 6;   // coeff_add

  // ---------------- binary32 ----------------
  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_FRAC_W = 23;
  localparam int unsigned FP_BIAS   = 127;

  typedef struct packed {
    logic                 sign;
    logic [FP_EXP_W-1:0]  exponent;
    logic [FP_FRAC_W-1:0] fraction;
  } fp32_t;

  // Exception flags of the floating-point multiplier.
  typedef struct packed {
    logic overflow;   // result too large, returned as +/- infinity
    logic underflow;  // result too small for a normal number, returned as +/- zero
    logic zero;       // an operand was zero (or subnormal), result is +/- zero
    logic invalid;    // an operand was infinity or NaN, result is NaN or infinity
  } fp_flags_t;

  // One-bit shift types of the ALU shift unit. They differ only in the bit
  // shifted into the vacated position.
  typedef enum logic [2:0] {
    SH_LSL = 3'd0,  // logical left:            0 in at bit 0
    SH_LSR = 3'd1,  // logical right:           0 in at the MSB
    SH_ASR = 3'd2,  // arithmetic right:        sign bit repeated
    SH_ROL = 3'd3,  // rotate left:             old MSB in at bit 0
    SH_ROR = 3'd4,  // rotate right:            old bit 0 in at the MSB
    SH_RCL = 3'd5,  // rotate left through carry:  carry in at bit 0
    SH_RCR = 3'd6   // rotate right through carry: carry in at the MSB
  } shift_op_t;

  localparam fp32_t FP_QNAN = '{sign: 1'b0, exponent: '1, fraction: 23'h400000};

endpackage
