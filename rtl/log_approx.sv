// log_approx: piecewise-linear approximation of -log2(cos a).
//
// cos a is a positive single-precision number below or equal to 1, so
// log2(cos a) = N + log2(1+x) is negative (N = exponent - 127, x = the 23
// mantissa bits as a fraction). log2(1+x) is approximated by three lines
//   1.25x          for 0    <= x < 0.25
//   x + 0.0625     for 0.25 <= x < 0.75
//   0.75x + 0.25   for 0.75 <= x < 1
// Reading the whole FP word w as a fixed-point number with 23 fraction bits
// (w = exponent + x) and using ~v = -v - 1, the magnitude becomes one
// three-operand sum:
//   lo : (BIAS_FX + 2)            + ~w + ~(x >> 2)
//   mid: (BIAS_FX + 1 - 0.0625)   + ~w + 0
//   hi : (BIAS_FX + 1 - 0.25)     + ~w +  (x >> 2)
// A 3:2 carry-save adder reduces the three operands to a sum and a carry
// word and a 32-bit carry-select adder adds them. The constant is selected by
// range_detect from x[22:21].
//
// Interface: cos_w is the FP word of cos a (the caller guarantees a positive
// normal number <= 1.0); mag is -log2(cos a) as unsigned fixed point with 23
// fraction bits (8 integer bits in mag[30:23]); range reports the segment.
// Combinational; the caller registers the result. The operand arrangement
// and the two's-complement rewriting follow the design; the constant values
// were derived from the three line equations above.
module log_approx
  import fastpow_pkg::*;
(
  input  logic [31:0] cos_w,
  output logic [31:0] mag,
  output x_range_e    range
);

  logic [22:0] x;
  logic [31:0] x_q;        // x >> 2, zero-extended
  logic [31:0] op_const, op_cos, op_x;
  logic [31:0] csa_sum, csa_carry;
  logic        lo, mid, hi;
  logic        cout_unused;

  assign x   = cos_w[22:0];
  assign x_q = 32'(x >> 2);

  range_detect u_range (
    .x_msb (x[22:21]),
    .lo    (lo),
    .mid   (mid),
    .hi    (hi),
    .range (range)
  );

  always_comb begin
    op_cos = ~cos_w;
    unique case (1'b1)
      hi:      begin op_const = LOG_CONST_HI;  op_x = x_q;     end
      mid:     begin op_const = LOG_CONST_MID; op_x = '0;      end
      default: begin op_const = LOG_CONST_LO;  op_x = ~x_q;    end
    endcase
  end

  csa #(.W(32)) u_csa (
    .a     (op_const),
    .b     (op_cos),
    .c     (op_x),
    .sum   (csa_sum),
    .carry (csa_carry)
  );

  // Sum and carry words are added modulo 2^32: the carries out of the top
  // bit are the wrap-around of the two's-complement terms.
  carry_select_adder #(.W(32), .BLK(8)) u_cpa (
    .a    (csa_sum),
    .b    ({csa_carry[30:0], 1'b0}),
    .cin  (1'b0),
    .sum  (mag),
    .cout (cout_unused)
  );

endmodule
