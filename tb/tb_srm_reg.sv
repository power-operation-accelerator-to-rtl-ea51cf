// tb_srm_reg: the Srm register clears on reset, loads on a write-enabled
// clock edge and holds its value on every other edge. Checked against a
// model variable updated by the same rule.
module tb_srm_reg;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [23:0] wdata = '0, q, model;
  int checks = 0, failures = 0;

  srm_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .wdata(wdata), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (q !== 24'd0) failures++;
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      we    = 1'($urandom);
      wdata = 24'($urandom);
      @(posedge clk);
      if (we) model = wdata;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h model=%h", i, q, model);
      end
    end
    // 10.16 as in the lighting examples: 0x0A28F6
    we = 1; wdata = 24'h0A28F6; @(posedge clk); #1; we = 0;
    checks++; if (q !== 24'h0A28F6) failures++;
    rst_n = 0; @(posedge clk); #1;
    checks++; if (q !== 24'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
