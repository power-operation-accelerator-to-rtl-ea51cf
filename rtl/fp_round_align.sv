// fp_round_align: last stage of the single-precision multiply.
//
// The 48-bit product of the two 24-bit significands (hidden bit included)
// lies in [1, 4). Two candidate results are formed side by side: one for a
// product below 2 (fraction prod[45:23]) and one for a product of 2 or more
// (fraction prod[46:24], exponent + 1). prod[47] chooses between them, then
// the chosen fraction is rounded to nearest, ties to even (guard bit and
// sticky OR of the bits below), and a rounding carry out of the fraction
// bumps the exponent. Finally the sign, exponent and fraction are aligned
// into the IEEE word, with the special cases applied:
//   nan  -> quiet NaN 0x7FC00000
//   inf  -> signed infinity, also on exponent overflow
//   zero -> signed zero, also on exponent underflow (no subnormals)
// Interface: exp_sum is ea + eb - 127 as a signed number (biased exponent of
// the result before normalisation). Combinational. Only the stage names
// (increment / normal result choose, align result) come from the design;
// rounding mode and special-value handling are this implementation's
// choices.
module fp_round_align (
  input  logic        sign,
  input  logic [9:0]  exp_sum,      // signed
  input  logic [47:0] prod,
  input  logic        is_zero,
  input  logic        is_inf,
  input  logic        is_nan,
  output logic [31:0] result
);

  logic        hi;
  logic [22:0] frac;
  logic        guard, sticky, inc;
  logic [23:0] frac_r;              // {carry, rounded fraction}
  logic signed [10:0] exp_r;

  always_comb begin
    hi = prod[47];
    if (hi) begin
      frac   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
    end else begin
      frac   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    inc    = guard & (sticky | frac[0]);
    frac_r = {1'b0, frac} + 24'(inc);
    exp_r  = $signed({exp_sum[9], exp_sum}) + 11'(hi) + 11'(frac_r[23]);

    if (is_nan) begin
      result = 32'h7FC0_0000;
    end else if (is_inf) begin
      result = {sign, 8'hFF, 23'd0};
    end else if (is_zero || exp_r <= 0) begin
      result = {sign, 31'd0};
    end else if (exp_r >= 255) begin
      result = {sign, 8'hFF, 23'd0};
    end else begin
      result = {sign, exp_r[7:0], frac_r[22:0]};
    end
  end

endmodule
