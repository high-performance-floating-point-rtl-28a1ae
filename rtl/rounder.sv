// Rounder of the floating-point dataflow.
//
// Takes a normalized 116-bit significand (leading digit at the top) and
// keeps the precision of the format: 24/53/113 bits for binary short, long
// and quad, 24/56/112 bits (6/14/28 hex digits) for hexadecimal short, long
// and quad. Binary formats are rounded by the IEEE 754 rounding modes from
// the guard bit and a sticky bit (all lower bits ORed with sticky_in);
// hexadecimal results are truncated, as that architecture defines. When
// rounding carries out of the significand (all ones rounded up) the result is
// 1.000.. and carry is set so the exponent can be incremented. inexact
// reports a non-zero discarded part. Purely combinational.
//
// Hex truncation follows the original design; the set of IEEE modes and the
// way guard and sticky are formed are this design's choice.
module rounder
  import fpu_pkg::*;
#(
  parameter int unsigned W = DF_W
)(
  input  logic [W-1:0] din,
  input  logic         sticky_in,
  input  logic         sign,
  input  logic         hex,
  input  logic [1:0]   fmt,      // 0 short, 1 long, 2 quad
  input  logic [1:0]   rmode,    // 0 nearest even, 1 toward zero, 2 +inf, 3 -inf
  output logic [W-1:0] dout,     // rounded, low bits zero
  output logic         carry,
  output logic         inexact,
  output logic         incr      // rounding incremented the significand
);

  int unsigned  prec;
  logic [W-1:0] keep_mask, ulp, kept;
  logic         guard, sticky, lsb;
  logic [W:0]   rsum;

  always_comb begin
    unique case ({hex, fmt})
      3'b0_00: prec = 24;
      3'b0_01: prec = 53;
      3'b0_10: prec = 113;
      3'b1_00: prec = 24;
      3'b1_01: prec = 56;
      default: prec = 112;
    endcase
    keep_mask = ~('1 >> prec);
    ulp       = W'(1) << (W - prec);
    kept      = din & keep_mask;
    guard     = din[W - 1 - prec];
    sticky    = sticky_in || |(din & ~keep_mask & ~(W'(1) << (W - 1 - prec)));
    lsb       = din[W - prec];
    inexact   = guard || sticky;
    if (hex) incr = 1'b0;
    else begin
      unique case (rmode)
        2'd0:    incr = guard && (sticky || lsb);
        2'd1:    incr = 1'b0;
        2'd2:    incr = !sign && inexact;
        default: incr = sign && inexact;
      endcase
    end
    rsum  = {1'b0, kept} + (incr ? {1'b0, ulp} : '0);
    carry = rsum[W];
    dout  = carry ? {1'b1, (W-1)'(0)} : rsum[W-1:0];
  end

endmodule
