// srm_reg: the special register that holds the material's specular
// exponent Srm for the power operation.
//
// Srm is stored as unsigned fixed point with the binary point at bit 16:
// q[23:16] is the integer part, q[15:0] the fraction (so 10.16 is held as
// 0x0A28F6). The register loads wdata on a clock edge when we is high and
// keeps its value otherwise; an active-low synchronous reset clears it to 0.
// The 8.16 format follows the design; the write port and reset are this
// design's choices.
module srm_reg #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= wdata;
  end

endmodule
