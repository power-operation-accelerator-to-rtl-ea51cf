// tb_carry_select_adder: random and carry-chain corner tests of the
// carry-select adder at 32 bits (default), 48 bits (product width) and 30
// bits (not a multiple of the block size). Expected {cout, sum} is the
// plain integer sum a + b + cin.
module tb_carry_select_adder;
  logic [31:0] a, b, s;
  logic [47:0] a48, b48, s48;
  logic [29:0] a30, b30, s30;
  logic cin, co, co48, co30;
  int checks = 0, failures = 0;

  carry_select_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  carry_select_adder #(.W(48), .BLK(8)) dut48 (.a(a48), .b(b48), .cin(cin), .sum(s48), .cout(co48));
  carry_select_adder #(.W(30), .BLK(8)) dut30 (.a(a30), .b(b30), .cin(cin), .sum(s30), .cout(co30));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] x, logic [63:0] y, logic ci);
    logic [32:0] e32;
    logic [48:0] e48;
    logic [30:0] e30;
    a = x[31:0]; b = y[31:0]; a48 = x[47:0]; b48 = y[47:0];
    a30 = x[29:0]; b30 = y[29:0]; cin = ci;
    #1;
    e32 = 33'(x[31:0]) + 33'(y[31:0]) + 33'(ci);
    e48 = 49'(x[47:0]) + 49'(y[47:0]) + 49'(ci);
    e30 = 31'(x[29:0]) + 31'(y[29:0]) + 31'(ci);
    checks++;
    if ({co, s} !== e32 || {co48, s48} !== e48 || {co30, s30} !== e30) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%b: %h %h %h", x, y, ci, {co, s}, {co48, s48}, {co30, s30});
    end
  endtask

  initial begin
    check('1, 64'd0, 1'b1);          // full carry ripple through all blocks
    check('1, 64'd1, 1'b0);
    check(64'h0000_00FF_0000_00FF, 64'h1, 1'b0);
    check('0, '0, 1'b0);
    check('1, '1, 1'b1);
    for (int i = 0; i < 3000; i++)
      check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
