// tb_pow_scale_sat: checks the split of the 16.32 fixed-point product into
// an 8-bit integer n and the 23-bit fraction below it, and the saturation
// to n=255, y=all ones when the integer part needs more than 8 bits.
// Expected values are computed from the product's numeric value.
module tb_pow_scale_sat;
  logic [47:0] prod;
  logic [7:0]  n;
  logic [22:0] y;
  logic        sat;
  int checks = 0, failures = 0, nsat = 0;

  pow_scale_sat dut (.prod(prod), .n(n), .y(y), .sat(sat));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [47:0] p);
    longint ip;
    longint fp;
    logic   es;
    prod = p;
    #1;
    ip = longint'(p) / 64'h1_0000_0000;                 // integer part
    fp = (longint'(p) % 64'h1_0000_0000) / 512;         // top 23 fraction bits
    es = (ip > 255);
    if (es) begin ip = 255; fp = 64'h7F_FFFF; nsat++; end
    checks++;
    if (sat !== es || longint'(n) != ip || longint'(y) != fp) begin
      failures++;
      $display("FAIL prod=%h n=%0d y=%h sat=%b", p, n, y, sat);
    end
  endtask

  initial begin
    check('0);
    check(48'h00FF_FFFF_FFFF);
    check(48'h0100_0000_0000);
    check(48'hFFFF_FFFF_FFFF);
    check(48'h0000_0000_01FF);
    for (int i = 0; i < 2000; i++) begin
      logic [47:0] p;
      p = 48'({$urandom, $urandom});
      if (i % 2 == 0) p[47:40] = '0;       // half in range
      check(p);
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
