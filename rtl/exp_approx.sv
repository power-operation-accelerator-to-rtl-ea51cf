// exp_approx: approximates 2^-(n+y) as a single-precision number.
//
// With n an integer and 0 <= y < 1,
//   2^-(n+y) = 2^-(n+1) * 2^(1-y) ~ 2^-(n+1) * (1 + (1-y)),
// i.e. the exponent field is bias - (n+1) and the mantissa field is the
// fraction 1-y. The exponent comes from one 8-bit adder, 127 + ~n, whose
// carry-out is 1 exactly when n <= 126; the mantissa is ~y, which is 1-y
// less one unit in the last place and needs no incrementer. When the
// exponent field would be 0 or negative (n >= 126) the result is flushed to
// +0 and underflow is set. The result is never negative.
// Combinational. The exponent/mantissa split follows the design; the
// one's-complement mantissa and the flush to zero are this design's choices.
module exp_approx
  import fastpow_pkg::*;
(
  input  logic [7:0]  n,
  input  logic [22:0] y,
  output logic [31:0] result,
  output logic        underflow
);

  logic [8:0] e_sum;

  always_comb begin
    e_sum     = {1'b0, 8'(BIAS)} + {1'b0, ~n};   // 8-bit adder with carry out
    underflow = ~e_sum[8] | (e_sum[7:0] == 8'd0);
    result    = underflow ? 32'd0 : {1'b0, e_sum[7:0], ~y};
  end

endmodule
