// pow_scale_sat: turns the fixed-point product z = Srm * |log2(cos a)| into
// the integer and fraction fields used by the exponential approximation.
//
// Both multiplier operands are unsigned 8.16 fixed point, so the 48-bit
// product has 16 integer bits (prod[47:32]) and 32 fraction bits. Dropping
// the low 9 bits leaves a 23-bit fraction y = prod[31:9]; the integer part n
// = prod[47:32] must fit in 8 bits. If it does not, the result saturates to
// the largest representable value (n = 255, y = all ones) and sat is set.
// Combinational. Shift amount and saturation rule follow the design.
module pow_scale_sat
  import fastpow_pkg::*;
(
  input  logic [PROD_W-1:0] prod,
  output logic [7:0]        n,
  output logic [22:0]       y,
  output logic              sat
);

  localparam int unsigned FRAC_LSB = POW_SHIFT;             // 9
  localparam int unsigned INT_LSB  = 2 * SRM_FRAC;          // 32

  always_comb begin
    sat = |prod[PROD_W-1:INT_LSB+8];
    n   = sat ? 8'hFF       : prod[INT_LSB +: 8];
    y   = sat ? {23{1'b1}}  : prod[FRAC_LSB +: 23];
  end

endmodule
