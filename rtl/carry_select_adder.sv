// carry_select_adder: W-bit adder built from BLK-bit blocks.
//
// Every block except the lowest computes its sum twice, once for carry-in 0
// and once for carry-in 1, in parallel; the real carry arriving from the
// block below then only selects one of the two results. The delay is one
// block addition plus a chain of W/BLK multiplexers. Combinational:
// {cout, sum} = a + b + cin. The block size is this design's choice.
module carry_select_adder #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = (W + BLK - 1) / BLK;
  localparam int unsigned WP   = NBLK * BLK;   // width padded to whole blocks

  logic [WP-1:0] ap, bp, sp;
  logic [NBLK:0] c;          // carry into each block

  assign ap = WP'(a);
  assign bp = WP'(b);

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLK:0] s0, s1;    // {carry, sum} for carry-in 0 and 1
    always_comb begin
      s0 = {1'b0, ap[k*BLK +: BLK]} + {1'b0, bp[k*BLK +: BLK]};
      s1 = {1'b0, ap[k*BLK +: BLK]} + {1'b0, bp[k*BLK +: BLK]} + (BLK+1)'(1);
    end
    assign sp[k*BLK +: BLK] = c[k] ? s1[BLK-1:0] : s0[BLK-1:0];
    assign c[k+1]           = c[k] ? s1[BLK]     : s0[BLK];
  end

  assign c[0] = cin;
  assign sum  = sp[W-1:0];
  // When W is not a multiple of BLK the carry out of bit W-1 sits inside the
  // top block's padded sum.
  if (WP == W) begin : g_cout_exact
    assign cout = c[NBLK];
  end else begin : g_cout_pad
    assign cout = sp[W];
  end

endmodule
