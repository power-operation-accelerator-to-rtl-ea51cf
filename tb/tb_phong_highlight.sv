// tb_phong_highlight: a rendered specular highlight. A unit sphere is
// sampled on a 64 x 64 pixel grid, viewed along +z and lit by one
// directional light from the upper right. For each pixel on the sphere the
// testbench computes the normal N, the reflected light vector
// R = 2(N.L)N - L and cos a = R.V in real arithmetic, clamps it at 0, and
// issues a POW with Srm = 10.16 (one pixel per cycle). The specular
// intensity 255 * (cos a)^Srm, rounded to an 8-bit level, is compared with
// the same level from the exact power. The test checks every result
// against the bit-exact model and bounds the difference in 8-bit levels:
// mean below one level, no pixel off by more than 12 levels (under 5% of
// full scale). It also checks that the brightest approximated pixel is the
// brightest exact pixel, i.e. the highlight does not move.
module tb_phong_highlight;
  import fastpow_pkg::*;
  import fp_ref_pkg::*;

  localparam int RES = 64;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  fpu_op_e     in_op = OP_POW;
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

  localparam logic [23:0] SRM = 24'h0A28F6;   // 10.16

  int   checks = 0, failures = 0, npix = 0, ndone = 0;
  int   hist[11];
  real  sum_diff = 0.0;
  int   max_diff = 0;
  logic [31:0] cos_q[$];
  real  best_exact = -1.0, best_approx = -1.0;
  logic [31:0] best_exact_cos, best_approx_cos;

  initial begin
    repeat (RES * RES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(real v);
    int l;
    l = int'(v * 255.0);           // rounds to nearest
    return (l > 255) ? 255 : l;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] c, e;
      logic sat;
      real exact, approx;
      int d;
      c = cos_q.pop_front();
      e = pow_model(c, SRM, sat);
      checks++;
      if (out_result !== e) begin
        failures++;
        $display("FAIL cos=%h result=%h expected %h", c, out_result, e);
      end
      exact  = (fp_to_real(c) > 0.0) ? $pow(fp_to_real(c), real'(SRM) / 65536.0) : 0.0;
      approx = fp_to_real(out_result);
      d = level(approx) - level(exact);
      if (d < 0) d = -d;
      sum_diff += real'(d);
      if (d > max_diff) max_diff = d;
      hist[(d > 10) ? 10 : d]++;
      if (exact > best_exact) begin best_exact = exact; best_exact_cos = c; end
      if (approx > best_approx) begin best_approx = approx; best_approx_cos = c; end
      ndone++;
    end
  end

  initial begin
    real lx, ly, lz, ln;
    foreach (hist[k]) hist[k] = 0;
    lx = 0.5; ly = 0.5; lz = 0.7071;            // light from the upper right
    ln = $sqrt(lx * lx + ly * ly + lz * lz);
    lx /= ln; ly /= ln; lz /= ln;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    srm_we <= 1; srm_wdata <= SRM;
    @(posedge clk);
    srm_we <= 0;
    for (int py = 0; py < RES; py++) begin
      for (int px = 0; px < RES; px++) begin
        real nx, ny, nz, r2, ndl, rz;
        logic [31:0] c;
        nx = (real'(px) + 0.5) / real'(RES) * 2.0 - 1.0;
        ny = 1.0 - (real'(py) + 0.5) / real'(RES) * 2.0;
        r2 = nx * nx + ny * ny;
        if (r2 < 1.0) begin
          nz  = $sqrt(1.0 - r2);
          ndl = nx * lx + ny * ly + nz * lz;
          rz  = 2.0 * ndl * nz - lz;            // R.V with V = (0,0,1)
          c   = real_to_fp((rz > 0.0) ? rz : 0.0);
          cos_q.push_back(c);
          in_valid <= 1; in_op <= OP_POW; in_a <= c;
          npix++;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (ndone != npix) begin
      failures++;
      $display("FAIL %0d of %0d pixels returned", ndone, npix);
    end
    $display("%0d sphere pixels; mean |level diff| %f, max %0d", npix, sum_diff / npix, max_diff);
    for (int k = 0; k <= 10; k++)
      $display("  |level diff| %s%0d: %0d pixels", (k == 10) ? ">=" : "", k, hist[k]);
    checks++;
    if (sum_diff / npix >= 1.0 || max_diff > 12) begin
      failures++;
      $display("FAIL highlight differs visibly");
    end
    checks++;
    if (best_exact_cos !== best_approx_cos) begin
      failures++;
      $display("FAIL highlight peak moved: %h vs %h", best_exact_cos, best_approx_cos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
