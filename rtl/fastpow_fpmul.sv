// fastpow_fpmul: single-precision floating-point multiplier extended with
// the "Fastpow" path, which computes the specular power (cos a)^Srm of the
// Phong lighting model in the same 4 cycles as a multiply.
//
// The power is evaluated as 2^(Srm * log2(cos a)). Both transcendental steps
// are piecewise-linear approximations that cost almost no hardware: the log
// (log_approx) is one CSA plus a 32-bit carry-select adder, the exponential
// (exp_approx) is an 8-bit adder, and the product Srm * log2(cos a) reuses
// the multiplier's own 24x24 Booth/Wallace array.
//
// Pipeline (one operation accepted per cycle, result 4 cycles later):
//   stage 1  operand decode; POW: log approximation of cos a, >> 7 to 8.16
//            fixed point; the multiplier inputs are muxed between the FP
//            significands and {log, Srm}
//   stage 2  Booth-recoded Wallace tree -> sum and carry words
//   stage 3  48-bit carry-select adder -> product; POW: >> 9, saturation of
//            an integer part wider than 8 bits
//   stage 4  FMUL: normalise, round, align; POW: exponential approximation
// An operation presented with in_valid at clock edge t has its result on
// out_* after edge t+4 (out_valid high for that one cycle). There is no
// back-pressure.
//
// Interface: in_op selects OP_FMUL (out = in_a * in_b) or OP_POW (out ~
// in_a ^ Srm, in_a = cos a, in_b unused). Srm is written through srm_we /
// srm_wdata (8.16 fixed point) and read by a POW when it issues. out_pow_sat
// flags a POW whose integer exponent saturated.
//
// The structure (shared multiplier, log and exp units, fixed-point formats,
// shifts, saturation, 4-cycle latency) follows the design. This design's own
// choices: cos a is taken from operand A; a POW with cos a <= 0 or subnormal
// returns +0 and one with cos a >= 1 (or Inf/NaN) is evaluated as cos a = 1;
// FMUL rounds to nearest-even and flushes subnormals to zero.
module fastpow_fpmul
  import fastpow_pkg::*;
#(
  parameter int unsigned LATENCY = 4   // documentation of the fixed depth
) (
  input  logic        clk,
  input  logic        rst_n,
  // issue
  input  logic        in_valid,
  input  fpu_op_e     in_op,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  // Srm special register
  input  logic        srm_we,
  input  logic [23:0] srm_wdata,
  output logic [23:0] srm_q,
  // result
  output logic        out_valid,
  output fpu_op_e     out_op,
  output logic [31:0] out_result,
  output logic        out_pow_sat
);

  // Sideband that travels with an operation through the pipeline.
  typedef struct packed {
    fpu_op_e    op;
    logic       sign;
    logic [9:0] exp_sum;   // ea + eb - 127, signed
    logic       is_zero;   // FMUL zero result, or POW of cos a <= 0
    logic       is_inf;
    logic       is_nan;
  } side_t;

  // ---------------------------------------------------------------- stage 1
  fp32_t       fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        pow_zero, pow_clamp;
  logic [31:0] cos_w;
  logic [31:0] log_mag;
  x_range_e    log_range;
  logic [MUL_W-1:0] mx, my;
  side_t       side0;

  assign fa = fp32_t'(in_a);
  assign fb = fp32_t'(in_b);

  always_comb begin
    a_zero = (fa.exp == 8'd0);
    b_zero = (fb.exp == 8'd0);
    a_inf  = (fa.exp == 8'hFF) && (fa.mant == '0);
    b_inf  = (fb.exp == 8'hFF) && (fb.mant == '0);
    a_nan  = (fa.exp == 8'hFF) && (fa.mant != '0);
    b_nan  = (fb.exp == 8'hFF) && (fb.mant != '0);
    pow_zero  = fa.sign || a_zero;
    pow_clamp = !pow_zero && (fa.exp >= 8'(BIAS));
    cos_w     = pow_clamp ? FP_ONE : in_a;
  end

  log_approx u_log (
    .cos_w (cos_w),
    .mag   (log_mag),
    .range (log_range)
  );

  srm_reg #(.W(MUL_W)) u_srm (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (srm_we),
    .wdata (srm_wdata),
    .q     (srm_q)
  );

  always_comb begin
    side0.op = in_op;
    if (in_op == OP_POW) begin
      mx            = log_mag[LOG_SHIFT +: MUL_W];   // 8.16 fixed point
      my            = srm_q;
      side0.sign    = 1'b0;
      side0.exp_sum = '0;
      side0.is_zero = pow_zero;
      side0.is_inf  = 1'b0;
      side0.is_nan  = 1'b0;
    end else begin
      mx            = {1'b1, fa.mant};
      my            = {1'b1, fb.mant};
      side0.sign    = fa.sign ^ fb.sign;
      side0.exp_sum = 10'({2'b00, fa.exp}) + 10'({2'b00, fb.exp}) - 10'(BIAS);
      side0.is_nan  = a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
      side0.is_inf  = (a_inf || b_inf) && !side0.is_nan;
      side0.is_zero = (a_zero || b_zero) && !side0.is_nan;
    end
  end

  logic             v1;
  side_t            side1;
  logic [MUL_W-1:0] mx1, my1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    side1 <= side0;
    mx1   <= mx;
    my1   <= my;
  end

  // ---------------------------------------------------------------- stage 2
  logic [PROD_W-1:0] tree_sum, tree_carry;

  booth_wallace_tree #(.N(MUL_W)) u_tree (
    .a     (mx1),
    .b     (my1),
    .sum   (tree_sum),
    .carry (tree_carry)
  );

  logic              v2;
  side_t             side2;
  logic [PROD_W-1:0] sum2, carry2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    side2  <= side1;
    sum2   <= tree_sum;
    carry2 <= tree_carry;
  end

  // ---------------------------------------------------------------- stage 3
  logic [PROD_W-1:0] prod;
  logic              prod_cout_unused;
  logic [7:0]        pow_n;
  logic [22:0]       pow_y;
  logic              pow_sat;

  carry_select_adder #(.W(PROD_W), .BLK(8)) u_cpa (
    .a    (sum2),
    .b    (carry2),
    .cin  (1'b0),
    .sum  (prod),
    .cout (prod_cout_unused)
  );

  pow_scale_sat u_scale (
    .prod (prod),
    .n    (pow_n),
    .y    (pow_y),
    .sat  (pow_sat)
  );

  logic              v3;
  side_t             side3;
  logic [PROD_W-1:0] prod3;
  logic [7:0]        n3;
  logic [22:0]       y3;
  logic              sat3;

  always_ff @(posedge clk) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
    side3 <= side2;
    prod3 <= prod;
    n3    <= pow_n;
    y3    <= pow_y;
    sat3  <= pow_sat;
  end

  // ---------------------------------------------------------------- stage 4
  logic [31:0] pow_result, mul_result;
  logic        pow_underflow_unused;

  exp_approx u_exp (
    .n         (n3),
    .y         (y3),
    .result    (pow_result),
    .underflow (pow_underflow_unused)
  );

  fp_round_align u_round (
    .sign    (side3.sign),
    .exp_sum (side3.exp_sum),
    .prod    (prod3),
    .is_zero (side3.is_zero),
    .is_inf  (side3.is_inf),
    .is_nan  (side3.is_nan),
    .result  (mul_result)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v3;
    out_op <= side3.op;
    if (side3.op == OP_POW) begin
      out_result  <= side3.is_zero ? 32'd0 : pow_result;
      out_pow_sat <= sat3 && !side3.is_zero;
    end else begin
      out_result  <= mul_result;
      out_pow_sat <= 1'b0;
    end
  end

  // A power of a number in [0, 1] is itself in [0, 1]: a POW result is
  // never negative and never above 1.0.
  a_pow_range: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && out_op == OP_POW |-> !out_result[31] && out_result <= FP_ONE);

  // The pipeline depth is fixed by the four register stages above.
  if (LATENCY != 4) begin : g_bad_latency
    $error("fastpow_fpmul: LATENCY must be 4");
  end

endmodule
