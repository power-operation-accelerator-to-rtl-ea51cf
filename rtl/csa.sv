// csa: a row of W full adders forming a 3:2 carry-save adder.
//
// Each bit position i adds a[i]+b[i]+c[i] and produces sum[i] and carry[i];
// the carry vector has the weight of the next bit, so a+b+c == sum +
// (carry << 1) (modulo 2^(W+1) when carry_out is kept). No carry ripples
// between bit positions, so the delay is one full adder whatever W is.
// Combinational.
module csa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry   // weight 2^(i+1) for bit i
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end

endmodule
