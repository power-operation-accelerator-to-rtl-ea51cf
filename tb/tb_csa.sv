// tb_csa: random and corner test of the 3:2 carry-save adder row. The
// invariant a + b + c == sum + 2*carry is checked with 64-bit arithmetic,
// at the default width and at an odd width.
module tb_csa;
  localparam int W2 = 13;
  logic [31:0] a, b, c, s, cy;
  logic [W2-1:0] a2, b2, c2, s2, cy2;
  int checks = 0, failures = 0;

  csa dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));
  csa #(.W(W2)) dut2 (.a(a2), .b(b2), .c(c2), .sum(s2), .carry(cy2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] z);
    longint exp_v, got_v, exp2, got2;
    a = x; b = y; c = z;
    a2 = W2'(x); b2 = W2'(y); c2 = W2'(z);
    #1;
    exp_v = longint'(x) + longint'(y) + longint'(z);
    got_v = longint'(s) + 2 * longint'(cy);
    exp2  = longint'(a2) + longint'(b2) + longint'(c2);
    got2  = longint'(s2) + 2 * longint'(cy2);
    checks++;
    if (exp_v != got_v || exp2 != got2) begin
      failures++;
      $display("FAIL %h %h %h -> s=%h c=%h", x, y, z, s, cy);
    end
  endtask

  initial begin
    check('0, '0, '0);
    check('1, '1, '1);
    check('1, '0, '0);
    check(32'h3F80_0002, 32'hC07F_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
