// Divisor multiple generation of the radix-4 SRT divider.
//
// The digit q = q1 + 2*q2 (q1, q2 in {-1,0,+1}) is turned into two addends
// for the subtractor: one for the divisor multiple 1D and one for 2D. Both are
// inverted when the digit is positive, i.e. when the partial remainder is
// positive and the multiple has to be subtracted; for a negative remainder the
// multiples are added as they are. A multiple that is not selected is zero.
// The "+1" that completes each two's complement is returned as a separate
// hot-one bit (inv1, inv2) and is injected at bit 0 by the subtractor, so no
// carry-propagate adder is needed here.
//
// Alignment in the 116-bit remainder frame: the divisor's implied one sits at
// bit 114 (weight 1), so 1D occupies bits 114..2 and 2D bits 115..3.
// Purely combinational.
//
// Selecting multiples of one and two and inverting them for subtraction
// follow the original design; delivering the two's complement hot ones as
// separate outputs is this design's choice.
module srt_multiple
  import fpu_pkg::*;
#(
  parameter int unsigned W  = DIV_W,   // remainder frame width
  parameter int unsigned DW = DVSR_W   // divisor width
)(
  input  logic [DW-1:0] d,      // divisor 1.f, implied one at bit DW-1
  input  qdigit_t       q,      // quotient digit
  output logic [W-1:0]  m1,     // +-1D or 0
  output logic [W-1:0]  m2,     // +-2D or 0
  output logic          inv1,   // two's complement hot one for m1
  output logic          inv2    // two's complement hot one for m2
);

  logic [W-1:0] d1, d2;
  logic         sub;

  always_comb begin
    d1   = W'({1'b0, d, {(W-DW-1){1'b0}}});
    d2   = W'({d, {(W-DW){1'b0}}});
    sub  = !q.neg;
    m1   = q.one ? (sub ? ~d1 : d1) : '0;
    m2   = q.two ? (sub ? ~d2 : d2) : '0;
    inv1 = q.one && sub;
    inv2 = q.two && sub;
  end

endmodule
