// tb_fp_round_align: feeds the normalise/round/align stage with the exact
// significand product and exponent sum of random single-precision operand
// pairs and compares the packed result with a double-precision reference
// rounded to nearest-even. Exponents are drawn so that overflow to
// infinity and underflow to zero both occur; the special-value inputs are
// checked as well.
module tb_fp_round_align;
  import fp_ref_pkg::*;

  logic        sign, zf, inf_f, nan_f;
  logic [9:0]  exp_sum;
  logic [47:0] prod;
  logic [31:0] result;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0, n_rnd = 0;

  fp_round_align dut (.sign(sign), .exp_sum(exp_sum), .prod(prod),
                      .is_zero(zf), .is_inf(inf_f), .is_nan(nan_f), .result(result));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] a, logic [31:0] b);
    logic [31:0] e;
    sign    = a[31] ^ b[31];
    exp_sum = 10'(int'(a[30:23]) + int'(b[30:23]) - 127);
    prod    = 48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]});
    zf = 0; inf_f = 0; nan_f = 0;
    #1;
    e = fmul_ref(a, b);
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", a, b, result, e);
    end
    if (e[30:23] == 8'hFF) n_ovf++;
    if (e[30:0] == 0) n_unf++;
    if (prod[22:0] != 0) n_rnd++;
  endtask

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    check(32'h7F7F_FFFF, 32'h4000_0000);     // overflow
    check(32'h0080_0000, 32'h3F00_0000);     // underflow
    check(32'h0080_0001, 32'h3F7F_FFFF);
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      a[30:23] = 8'($urandom_range(254, 1));
      b[30:23] = 8'($urandom_range(254, 1));
      if (i % 3 == 0) b[30:23] = 8'($urandom_range(254 - int'(a[30:23]) + 3 > 254 ? 254 : 254 - int'(a[30:23]) + 3, 254 - int'(a[30:23]) < 1 ? 1 : 254 - int'(a[30:23])));
      check(a, b);
    end
    // special flags take priority over the product
    sign = 1; exp_sum = 10'd127; prod = 48'h8000_0000_0000;
    zf = 1; inf_f = 0; nan_f = 0; #1; checks++; if (result !== 32'h8000_0000) failures++;
    zf = 0; inf_f = 1;            #1; checks++; if (result !== 32'hFF80_0000) failures++;
    inf_f = 0; nan_f = 1;         #1; checks++; if (result !== 32'h7FC0_0000) failures++;
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_rnd == 0) failures++;
    $display("overflows=%0d underflows=%0d", n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
