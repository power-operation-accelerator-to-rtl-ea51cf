// tb_exp_approx: for every integer n and random fractions y, checks the
// result word against 2^-(n+1) * (2 - y - 2^-23) computed in real
// arithmetic (exact in double), the flush to zero for n >= 126, and that the
// value stays within 6.2% of the true 2^-(n+y) (the largest relative error
// of the linear 2^f ~ 1+f approximation).
module tb_exp_approx;
  import fp_ref_pkg::*;

  logic [7:0]  n;
  logic [22:0] y;
  logic [31:0] r;
  logic        uf;
  int checks = 0, failures = 0, nuf = 0;

  exp_approx dut (.n(n), .y(y), .result(r), .underflow(uf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int nn, logic [22:0] yy);
    real yf, expect_v, truth;
    logic eu;
    n = 8'(nn); y = yy;
    #1;
    yf = real'(yy) / 8388608.0;
    eu = (nn >= 126);
    checks++;
    if (eu) begin
      nuf++;
      if (!uf || r !== 32'd0) begin
        failures++;
        $display("FAIL n=%0d expected flush, got %h", nn, r);
      end
    end else begin
      expect_v = (2.0 - yf - 1.0 / 8388608.0) * $pow(2.0, -real'(nn + 1));
      truth    = $pow(2.0, -(real'(nn) + yf));
      if (uf || r !== real_to_fp(expect_v) || absr(fp_to_real(r) - truth) > 0.062 * truth) begin
        failures++;
        $display("FAIL n=%0d y=%h r=%h expected %h", nn, yy, r, real_to_fp(expect_v));
      end
    end
  endtask

  initial begin
    for (int nn = 0; nn < 256; nn++) begin
      check(nn, '0);
      check(nn, '1);
      for (int k = 0; k < 8; k++) check(nn, 23'($urandom));
    end
    checks++;
    if (nuf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
