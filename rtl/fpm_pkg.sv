// fpm_pkg: types and constants shared by the single-precision multiplier.
//
// binary32 word layout (sign 31, exponent 30..23, fraction 22..0), the operand
// classes of IEEE 754 (zero, infinity, NaN, denormal, normal), the one-hot
// digit select produced by the classical recoder, and the exception flags.
// The field positions and the bias of 127 are the standard ones; the select
// and flag encodings are this design's own.
package fpm_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;    // significand incl. hidden bit
  localparam int unsigned PROD_W = 2 * SIG_W;     // 48-bit significand product
  localparam int unsigned BIAS   = 127;
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;  // 255: infinity / NaN
  // Signed width that carries exponents through the datapath without wrap.
  localparam int unsigned E_W    = 10;

  localparam logic [31:0] QNAN   = 32'h7FC0_0000;

  typedef struct packed {
    logic                  sign;
    logic [EXP_W-1:0]      exp;
    logic [FRAC_W-1:0]     frac;
  } fp32_t;

  typedef enum logic [2:0] {
    FP_ZERO      = 3'd0,
    FP_DENORMAL  = 3'd1,
    FP_NORMAL    = 3'd2,
    FP_INF       = 3'd3,
    FP_QNAN      = 3'd4,
    FP_SNAN      = 3'd5
  } fp_class_e;

  // Decoded 2-bit multiplier digit: which multiple of the multiplicand block
  // the partial product takes. All zero selects the zero partial product.
  typedef struct packed {
    logic x3;   // digit 11: A + 2A
    logic x2;   // digit 10: A with a 0 appended as LSB
    logic x1;   // digit 01: A with a 0 prepended as MSB
  } cr_sel_t;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

endpackage
