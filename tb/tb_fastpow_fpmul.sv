// tb_fastpow_fpmul: end-to-end test of the Fastpow floating-point
// multiplier at its default configuration.
//
// A random stream of FMUL and POW operations is issued, back to back or
// with bubbles, while Srm is rewritten from time to time. Each issued
// operation is recorded with its expected result and issue cycle; every
// result must appear exactly 4 cycles later, in order. Expected values:
//   FMUL - exact double product rounded to nearest-even (fp_ref_pkg)
//   POW  - the power approximation evaluated from its equations with plain
//          integer arithmetic (pow_model), and in addition compared with the
//          true cos^Srm from $pow: the approximation is never off by more
//          than about 0.05 for any Srm, so 0.06 is the bound.
// The test counts how often each mechanism of the design was exercised
// (three log segments, exponent saturation, exponential underflow flush,
// zero/negative and >= 1 inputs to POW, FMUL overflow, underflow, NaN and
// infinity, mode switches, Srm rewrites, back-to-back issue) and counts a
// failure for any that never happened.
module tb_fastpow_fpmul;
  import fastpow_pkg::*;
  import fp_ref_pkg::*;

  localparam int NOPS = 20000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  fpu_op_e     in_op = OP_FMUL;
  logic [31:0] in_a = '0, in_b = '0;
  logic        srm_we = 0;
  logic [23:0] srm_wdata = '0, srm_q;
  logic        out_valid, out_pow_sat;
  fpu_op_e     out_op;
  logic [31:0] out_result;

  fastpow_fpmul dut (
    .clk, .rst_n, .in_valid, .in_op, .in_a, .in_b,
    .srm_we, .srm_wdata, .srm_q,
    .out_valid, .out_op, .out_result, .out_pow_sat
  );

  always #5 clk = ~clk;

  typedef struct {
    fpu_op_e     op;
    logic [31:0] a;
    logic [23:0] srm;
    logic [31:0] expect_w;
    logic        expect_sat;
    longint      issue_cycle;
  } txn_t;

  txn_t   sb[$];
  longint cycle = 0;
  int     checks = 0, failures = 0, received = 0;
  real    max_pow_err = 0.0;

  // mechanism counters
  int n_lo = 0, n_mid = 0, n_hi = 0, n_sat = 0, n_flush = 0, n_pow_zero = 0;
  int n_pow_clamp = 0, n_mul_ovf = 0, n_mul_unf = 0, n_mul_nan = 0, n_mul_inf = 0;
  int n_switch = 0, n_srm_write = 0, n_b2b = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NOPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      txn_t t;
      received++;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", out_result);
      end else begin
        t = sb.pop_front();
        if (cycle - t.issue_cycle != 4) begin
          failures++;
          $display("FAIL latency %0d cycles", cycle - t.issue_cycle);
        end
        if (out_op !== t.op || out_result !== t.expect_w ||
            (t.op == OP_POW && out_pow_sat !== t.expect_sat)) begin
          failures++;
          $display("FAIL op=%0d a=%h srm=%h result=%h sat=%b expected %h sat=%b",
                   t.op, t.a, t.srm, out_result, out_pow_sat, t.expect_w, t.expect_sat);
        end
        if (t.op == OP_POW && !t.a[31] && t.a[30:23] != 0 && t.a[30:23] < 127) begin
          real truth, got, err;
          truth = $pow(fp_to_real(t.a), real'(t.srm) / 65536.0);
          got   = fp_to_real(out_result);
          err   = absr(got - truth);
          if (err > max_pow_err) max_pow_err = err;
          checks++;
          if (err > 0.06) begin
            failures++;
            $display("FAIL accuracy cos=%h srm=%h got=%f true=%f", t.a, t.srm, got, truth);
          end
        end
      end
    end
  end

  function automatic logic [31:0] rand_cos();
    logic [31:0] w;
    int k;
    k = $urandom_range(99, 0);
    w = {1'b0, 8'd126, 23'($urandom)};                            // [0.5, 1)
    if (k < 30)      w[30:23] = 8'($urandom_range(126, 120));     // [2^-7, 1)
    else if (k < 40) w[30:23] = 8'($urandom_range(126, 1));       // any normal
    else if (k < 43) w = 32'h3F80_0000;                           // exactly 1
    else if (k < 45) w = {1'b0, 8'($urandom_range(254, 127)), 23'($urandom)}; // > 1
    else if (k < 47) w = {1'b1, 31'($urandom)};                   // negative
    else if (k < 49) w = {1'b0, 8'd0, 23'($urandom)};             // zero/subnormal
    return w;
  endfunction

  function automatic logic [31:0] rand_fp();
    logic [31:0] w;
    int k;
    w = $urandom;
    k = $urandom_range(99, 0);
    if (k < 60)      w[30:23] = 8'($urandom_range(150, 104));
    else if (k < 63) w[30:0] = '0;                                // zero
    else if (k < 65) w[30:0] = {8'hFF, 23'd0};                    // inf
    else if (k < 66) w[30:23] = 8'hFF;                            // NaN (mostly)
    else if (k < 80) w[30:23] = 8'($urandom_range(254, 190));     // large
    else if (k < 94) w[30:23] = 8'($urandom_range(64, 1));        // small
    return w;
  endfunction

  initial begin
    fpu_op_e last_op;
    logic    last_valid;
    logic [23:0] srm_now;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    srm_now = 24'h0A28F6;                       // Srm = 10.16
    srm_we <= 1; srm_wdata <= srm_now;
    @(posedge clk);
    srm_we <= 0;
    last_op = OP_FMUL;
    last_valid = 0;
    for (int i = 0; i < NOPS; i++) begin
      txn_t t;
      logic sat;
      // occasional bubble
      while ($urandom_range(9, 0) == 0) begin
        in_valid <= 0;
        last_valid = 0;
        @(posedge clk);
      end
      // occasional Srm rewrite (the new value is seen by the next issue)
      if ($urandom_range(49, 0) == 0) begin
        automatic int k = $urandom_range(3, 0);
        srm_now = (k == 0) ? 24'h50028F :                          // 80.01
                  (k == 1) ? 24'($urandom_range(24'hFF_FFFF, 24'h40_0000)) : // huge
                  (k == 2) ? 24'($urandom_range(24'h10_0000, 0)) :
                             24'h0A28F6;
        in_valid <= 0;
        srm_we <= 1; srm_wdata <= srm_now;
        @(posedge clk);
        srm_we <= 0;
        n_srm_write++;
        last_valid = 0;
      end
      t.op  = ($urandom_range(1, 0) == 1) ? OP_POW : OP_FMUL;
      t.srm = srm_now;
      if (t.op == OP_POW) begin
        t.a = rand_cos();
        in_b <= $urandom;
        t.expect_w = pow_model(t.a, srm_now, sat);
        t.expect_sat = sat;
        if (t.a[31] || t.a[30:23] == 0) n_pow_zero++;
        else if (t.a[30:23] >= 127) n_pow_clamp++;
        else begin
          case (t.a[22:21])
            2'b00:   n_lo++;
            2'b11:   n_hi++;
            default: n_mid++;
          endcase
          if (sat) n_sat++;
          else if (t.expect_w == 0) n_flush++;
        end
      end else begin
        logic [31:0] b;
        t.a = rand_fp();
        b   = rand_fp();
        in_b <= b;
        t.expect_w = fmul_ref(t.a, b);
        t.expect_sat = 0;
        if (is_nan(t.expect_w)) n_mul_nan++;
        else if (is_inf(t.expect_w) && !is_inf(t.a) && !is_inf(b)) n_mul_ovf++;
        else if (is_inf(t.expect_w)) n_mul_inf++;
        else if (t.expect_w[30:0] == 0 && t.a[30:23] != 0 && b[30:23] != 0) n_mul_unf++;
      end
      if (last_valid && last_op != t.op) n_switch++;
      if (last_valid) n_b2b++;
      last_op = t.op;
      last_valid = 1;
      in_valid <= 1;
      in_op    <= t.op;
      in_a     <= t.a;
      @(posedge clk);
      t.issue_cycle = cycle;   // edge at which the operation was sampled
      sb.push_back(t);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (received != NOPS || sb.size() != 0) begin
      failures++;
      $display("FAIL received %0d of %0d results", received, NOPS);
    end
    $display("segments lo/mid/hi=%0d/%0d/%0d sat=%0d flush=%0d pow_zero=%0d pow_clamp=%0d",
             n_lo, n_mid, n_hi, n_sat, n_flush, n_pow_zero, n_pow_clamp);
    $display("fmul ovf=%0d unf=%0d nan=%0d inf=%0d switches=%0d srm_writes=%0d back_to_back=%0d",
             n_mul_ovf, n_mul_unf, n_mul_nan, n_mul_inf, n_switch, n_srm_write, n_b2b);
    $display("max |pow error| vs true power: %f", max_pow_err);
    begin
      int cnt[14];
      cnt = '{n_lo, n_mid, n_hi, n_sat, n_flush, n_pow_zero, n_pow_clamp,
                      n_mul_ovf, n_mul_unf, n_mul_nan, n_mul_inf, n_switch,
                      n_srm_write, n_b2b};
      for (int k = 0; k < 14; k++) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
