// booth_wallace_tree: first stage of the unsigned N x N multiplier.
//
// The multiplier operand b is recoded radix-4 (modified Booth): each group
// of bits b[2i+1], b[2i], b[2i-1] selects 0, +a, +2a, -2a or -a, giving
// N/2+1 partial products for an unsigned operand. A negative partial product
// is formed as the inverted magnitude, and the "+1" that completes its two's
// complement is collected in one extra correction row. The rows are then
// reduced by a Wallace tree of 3:2 carry-save adders, level by level,
// until two words remain. The product is (sum + carry) mod 2^(2N); a
// carry-select adder in the next pipeline stage resolves it.
//
// Used with mantissas for FP multiplication and with two unsigned 8.16
// fixed-point numbers in power mode. Combinational. Booth recoding and the
// Wallace tree follow the design; the sign handling through a correction
// row is this implementation's choice.
module booth_wallace_tree #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] sum,
  output logic [2*N-1:0] carry
);

  localparam int unsigned PW   = 2 * N;
  localparam int unsigned NPP  = N / 2 + 1;   // Booth partial products
  localparam int unsigned NROW = NPP + 1;     // plus the correction row

  // Rows left after 'lev' levels of 3:2 reduction.
  function automatic int unsigned rows_at(int unsigned lev);
    int unsigned r = NROW;
    for (int unsigned k = 0; k < lev; k++) r = (r / 3) * 2 + (r % 3);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = NROW;
    int unsigned l = 0;
    while (r > 2) begin
      r = (r / 3) * 2 + (r % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();

  logic [N+2:0] b_ext;         // {0, 0, b, 0}: bit 2i of b_ext is b[2i-1]

  assign b_ext = {2'b00, b, 1'b0};

  always_comb begin
    logic [PW-1:0] row [NROW];
    logic [PW-1:0] nxt [NROW];
    logic [PW-1:0] corr;
    int unsigned   rin, ngrp;

    // Booth recoding and partial product generation (level 0 of the tree).
    corr = '0;
    for (int unsigned i = 0; i < NPP; i++) begin
      logic [2:0]    grp;
      logic [PW-1:0] mag;
      logic          neg;
      grp = b_ext[2*i +: 3];
      unique case (grp)
        3'b001, 3'b010: begin mag = PW'(a);        neg = 1'b0; end
        3'b011:         begin mag = PW'(a) << 1;   neg = 1'b0; end
        3'b100:         begin mag = PW'(a) << 1;   neg = 1'b1; end
        3'b101, 3'b110: begin mag = PW'(a);        neg = 1'b1; end
        default:        begin mag = '0;            neg = 1'b0; end
      endcase
      row[i]    = (neg ? ~mag : mag) << (2 * i);
      corr[2*i] = neg;
    end
    row[NPP] = corr;

    // Wallace reduction: at each level every full group of three rows
    // becomes a sum row and a carry row (a 3:2 CSA, one full adder per bit);
    // leftover rows pass through unchanged.
    for (int unsigned l = 0; l < NLEV; l++) begin
      rin  = rows_at(l);
      ngrp = rin / 3;
      for (int unsigned r = 0; r < NROW; r++) nxt[r] = '0;
      for (int unsigned g = 0; g < NROW / 3; g++) begin
        if (g < ngrp) begin
          logic [PW-1:0] x, y, z;
          x = row[3*g];
          y = row[3*g+1];
          z = row[3*g+2];
          nxt[2*g]   = x ^ y ^ z;
          nxt[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
        end
      end
      for (int unsigned r = 0; r < NROW; r++) begin
        if (r >= 3 * ngrp && r < rin) nxt[r - ngrp] = row[r];
      end
      row = nxt;
    end

    sum   = row[0];
    carry = row[1];
  end

endmodule
