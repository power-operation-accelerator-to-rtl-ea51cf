// tb_range_detect: exhaustive test of the x-range decoder. For each value
// of x[22:21] the expected segment is worked out from the fraction value
// x = x[22]/2 + x[21]/4 (+ anything below, which never crosses a segment
// boundary) and compared with the three flags and the range code.
module tb_range_detect;
  import fastpow_pkg::*;

  logic [1:0] x_msb;
  logic       lo, mid, hi;
  x_range_e   range;
  int         checks = 0, failures = 0;

  range_detect dut (.x_msb(x_msb), .lo(lo), .mid(mid), .hi(hi), .range(range));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      for (int low = 0; low < 2; low++) begin
        // smallest and largest fraction with these MSBs
        real xv;
        logic e_lo, e_mid, e_hi;
        x_range_e e_rng;
        x_msb = 2'(v);
        xv = real'(v) / 4.0 + (low != 0 ? 0.2499 : 0.0);
        e_lo  = (xv < 0.25);
        e_mid = (xv >= 0.25) && (xv < 0.75);
        e_hi  = (xv >= 0.75);
        e_rng = e_hi ? RANGE_HI : (e_mid ? RANGE_MID : RANGE_LO);
        #1;
        checks++;
        if ({lo, mid, hi} !== {e_lo, e_mid, e_hi} || range !== e_rng) begin
          failures++;
          $display("FAIL x_msb=%b lo/mid/hi=%b%b%b range=%0d", x_msb, lo, mid, hi, range);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
