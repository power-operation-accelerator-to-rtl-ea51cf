// tb_log_approx: drives the log approximation with cos values spread over
// (0, 1] (random words with exponent 0..126, the segment edges, and 1.0).
// Each result is compared bit-exactly with the line-segment formula
// computed in plain integer arithmetic, and its value with the true
// -log2(cos) (the approximation's own error stays below 0.025, near x = 0.5).
module tb_log_approx;
  import fastpow_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] cos_w, mag;
  x_range_e    range;
  int checks = 0, failures = 0;
  int seen_lo = 0, seen_mid = 0, seen_hi = 0;
  real max_err = 0.0;

  log_approx dut (.cos_w(cos_w), .mag(mag), .range(range));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] w);
    longint   e;
    real      truth, got, err;
    x_range_e er;
    cos_w = w;
    #1;
    e  = log_mag_ref(w);
    er = (w[22:21] == 2'b11) ? RANGE_HI : ((w[22:21] == 2'b00) ? RANGE_LO : RANGE_MID);
    checks++;
    if (longint'(mag) != e || range != er) begin
      failures++;
      $display("FAIL cos=%h mag=%h exp=%h range=%0d", w, mag, e, range);
    end
    truth = -log2r(fp_to_real(w));
    got   = real'(mag) / 8388608.0;
    err   = absr(got - truth);
    if (err > max_err) max_err = err;
    checks++;
    if (err > 0.025) begin
      failures++;
      $display("FAIL accuracy cos=%h got=%f true=%f", w, got, truth);
    end
    case (range)
      RANGE_LO:  seen_lo++;
      RANGE_MID: seen_mid++;
      default:   seen_hi++;
    endcase
  endtask

  initial begin
    check(32'h3F80_0000);               // 1.0 -> 0
    check(32'h3F7F_FFFF);               // just below 1
    check(32'h3F00_0000);               // 0.5 -> 1
    check(32'h0080_0000);               // smallest normal -> 126
    for (int m = 0; m < 4; m++) begin   // segment edges
      check({1'b0, 8'd125, 2'(m), 21'd0});
      check({1'b0, 8'd125, 2'(m), 21'h1F_FFFF});
    end
    for (int i = 0; i < 3000; i++)
      check({1'b0, 8'($urandom_range(126, 1)), 23'($urandom)});
    checks++;
    if (seen_lo == 0 || seen_mid == 0 || seen_hi == 0) failures++;
    $display("max |error| of -log2 approximation: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
