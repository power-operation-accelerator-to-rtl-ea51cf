// fastpow_pkg: types and constants shared by the Fastpow floating-point
// multiplier.
//
// The unit works on IEEE-754 single-precision operands. The power path
// treats the 32-bit word of cos(a) as an unsigned fixed-point number with 23
// fraction bits (exponent field = integer part, mantissa field = fraction),
// so the FP exponent bias becomes the constant BIAS_FX = 127 << 23. The three
// log-approximation constants below follow from the piecewise-linear log2
// approximation log2(1+x) ~ 1.25x | x+1/16 | 0.75x+1/4, rewritten with
// two's-complement identities (~v = -v-1) so that one 3:2 CSA and one adder
// produce -log2(cos a). The segment equations, the 8.16 fixed-point format
// of Srm and the shift amounts follow the published Fastpow scheme; the
// constant values are derived here from the segment equations in the
// 23-fraction-bit scale of the FP word.
package fastpow_pkg;

  // Operation selected for the shared multiplier.
  typedef enum logic {
    OP_FMUL = 1'b0,   // ordinary FP multiply a*b
    OP_POW  = 1'b1    // (cos a)^Srm via log/exp approximation
  } fpu_op_e;

  // Field view of a single-precision number.
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] mant;
  } fp32_t;

  // Range of the fraction x, decoded from its two MSBs.
  typedef enum logic [1:0] {
    RANGE_LO  = 2'd0,  // 0    <= x < 0.25
    RANGE_MID = 2'd1,  // 0.25 <= x < 0.75
    RANGE_HI  = 2'd2   // 0.75 <= x < 1
  } x_range_e;

  localparam int unsigned FRAC_W   = 23;                 // fraction bits of x
  localparam int unsigned BIAS     = 127;
  localparam logic [31:0] BIAS_FX  = 32'(BIAS) << FRAC_W; // 0x3F800000
  localparam logic [31:0] ONE_16TH = 32'h0008_0000;       // 0.0625 in .23
  localparam logic [31:0] ONE_4TH  = 32'h0020_0000;       // 0.25   in .23

  // Constants added by the CSA for each range (see log_approx).
  localparam logic [31:0] LOG_CONST_LO  = BIAS_FX + 32'd2;            // 0x3F800002
  localparam logic [31:0] LOG_CONST_MID = BIAS_FX + 32'd1 - ONE_16TH; // 0x3F780001
  localparam logic [31:0] LOG_CONST_HI  = BIAS_FX + 32'd1 - ONE_4TH;  // 0x3F600001

  // Fixed-point formats of the multiplier operands in power mode.
  localparam int unsigned MUL_W     = 24;  // multiplier operand width
  localparam int unsigned PROD_W    = 2 * MUL_W;
  localparam int unsigned SRM_FRAC  = 16;  // Srm: 8 integer . 16 fraction
  localparam int unsigned LOG_SHIFT = 7;   // 32-bit .23 log -> 24-bit .16
  localparam int unsigned POW_SHIFT = 9;   // 48-bit .32 product -> .23 fraction

  localparam logic [31:0] FP_ONE = 32'h3F80_0000;

endpackage
