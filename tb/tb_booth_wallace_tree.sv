// tb_booth_wallace_tree: checks that (sum + carry) mod 2^48 equals the
// integer product a*b for random operands, all Booth-digit patterns in the
// multiplier (alternating bits, all ones) and the extremes; and the same at
// N = 8 exhaustively over a sample of pairs.
module tb_booth_wallace_tree;
  logic [23:0] a, b;
  logic [47:0] s, c;
  logic [7:0]  a8, b8;
  logic [15:0] s8, c8;
  int checks = 0, failures = 0;

  booth_wallace_tree dut (.a(a), .b(b), .sum(s), .carry(c));
  booth_wallace_tree #(.N(8)) dut8 (.a(a8), .b(b8), .sum(s8), .carry(c8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] x, logic [23:0] y);
    logic [47:0] p;
    a = x; b = y;
    #1;
    p = 48'(x) * 48'(y);
    checks++;
    if (48'(s + c) !== p) begin
      failures++;
      $display("FAIL %h * %h: %h expected %h", x, y, 48'(s + c), p);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 24'd1);
    check(24'h800000, 24'h800000);
    check(24'hFFFFFF, 24'hAAAAAA);
    check(24'h555555, 24'h555555);
    check(24'h123456, 24'hC3C3C3);
    for (int i = 0; i < 3000; i++) check(24'($urandom), 24'($urandom));
    for (int x = 0; x < 256; x += 3) begin
      for (int y = 0; y < 256; y += 5) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (16'(s8 + c8) !== 16'(x * y)) begin
          failures++;
          $display("FAIL N=8 %0d*%0d", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
