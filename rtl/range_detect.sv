// range_detect: decodes which linear segment of the log2 approximation the
// mantissa fraction x of cos(a) falls in, from the two MSBs x[22:21].
//
//   hi  (x >= 0.75)        = x22 & x21
//   mid (0.25 <= x < 0.75) = x22 ^ x21
//   lo  (x < 0.25)         = ~(x22 | x21)
//
// Purely combinational; exactly one output is high for every input. The
// decode rule is the one the design is built around; the packed range code
// output is a convenience of this implementation.
module range_detect
  import fastpow_pkg::*;
(
  input  logic [1:0] x_msb,   // x[22:21]
  output logic       lo,
  output logic       mid,
  output logic       hi,
  output x_range_e   range
);

  always_comb begin
    hi  = x_msb[1] & x_msb[0];
    mid = x_msb[1] ^ x_msb[0];
    lo  = ~(x_msb[1] | x_msb[0]);
    unique case (1'b1)
      hi:      range = RANGE_HI;
      mid:     range = RANGE_MID;
      default: range = RANGE_LO;
    endcase
  end

endmodule
