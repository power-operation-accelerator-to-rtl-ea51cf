// tb_specular_sweep: the specular-highlight workload. cos a is swept over
// (0, 1] in steps of 1/4096 for the two material exponents Srm = 10.16 and
// Srm = 80.01 (held as 8.16 fixed point: 0x0A28F6 and 0x50028F), one POW
// issued per cycle through the full unit at its default configuration.
// For each curve the test checks that
//   - every result equals the bit-exact model of the approximation,
//   - the curve never decreases as cos a grows (a brighter point must not
//     come out darker than its neighbour),
//   - the mean absolute error against the true power stays below 0.005 and
//     the largest below 0.05,
// and it prints the mean and largest absolute error and the throughput.
module tb_specular_sweep;
  import fastpow_pkg::*;
  import fp_ref_pkg::*;

  localparam int STEPS = 4096;

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

  int checks = 0, failures = 0;
  logic [31:0] cos_q[$];
  logic [23:0] cur_srm;
  real  sum_err, max_err;
  logic [31:0] prev;
  int   nres;
  longint cycle = 0, first_out, last_out;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4 * STEPS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] c, e;
      logic sat;
      real truth, err;
      c = cos_q.pop_front();
      e = pow_model(c, cur_srm, sat);
      checks++;
      if (out_result !== e) begin
        failures++;
        $display("FAIL cos=%h result=%h expected %h", c, out_result, e);
      end
      checks++;
      if (nres > 0 && out_result < prev) begin     // positive floats order as integers
        failures++;
        $display("FAIL not monotonic at cos=%h: %h after %h", c, out_result, prev);
      end
      truth = $pow(fp_to_real(c), real'(cur_srm) / 65536.0);
      err = absr(fp_to_real(out_result) - truth);
      sum_err += err;
      if (err > max_err) max_err = err;
      if (nres == 0) first_out = cycle;
      last_out = cycle;
      prev = out_result;
      nres++;
    end
  end

  task automatic sweep(logic [23:0] srm, string name);
    cur_srm = srm;
    sum_err = 0.0; max_err = 0.0; nres = 0;
    srm_we <= 1; srm_wdata <= srm;
    @(posedge clk);
    srm_we <= 0;
    for (int i = 1; i <= STEPS; i++) begin
      logic [31:0] c;
      c = real_to_fp(real'(i) / real'(STEPS));
      cos_q.push_back(c);
      in_valid <= 1; in_op <= OP_POW; in_a <= c; in_b <= '0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (nres != STEPS || last_out - first_out != longint'(STEPS) - 1) begin
      failures++;
      $display("FAIL %s: %0d results over %0d cycles", name, nres, last_out - first_out + 1);
    end
    $display("%s: %0d results in %0d cycles, mean |err| %f, max |err| %f",
             name, nres, last_out - first_out + 1, sum_err / nres, max_err);
    checks++;
    if (sum_err / nres > 0.005 || max_err > 0.05) begin
      failures++;
      $display("FAIL %s accuracy", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    sweep(24'h0A28F6, "Srm=10.16");
    sweep(24'h50028F, "Srm=80.01");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
