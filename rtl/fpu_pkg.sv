// Shared types and constants of the floating-point unit.
//
// The divide macro works on a 116-bit partial remainder (112-bit HFP quad
// fraction plus one hex guard digit), a 113-bit divisor (BFP quad significand
// with its implied one) and keeps one carry bit for every four sum bits, 28 in
// all. Quotient digits lie in {-3..+3} and are carried as a sign and two
// magnitude flags, q = q1 + 2*q2, as the divide recurrence splits them.
// The main dataflow (adder, normalizer) is 116 bits wide.
//
// Widths follow the original design (116-bit divide dataflow, 113-bit
// divisor, 28 stored carries); the digit encoding is this design's choice.
package fpu_pkg;

  localparam int unsigned DIV_W  = 116;  // partial remainder and quotient width
  localparam int unsigned DVSR_W = 113;  // divisor register width
  localparam int unsigned PC_W   = 28;   // sparse carry bits of the partial remainder
  localparam int unsigned DF_W   = 116;  // main adder / normalizer width
  localparam int unsigned LZC_W  = 7;    // leading zero count register width

  // Quotient digit q = (neg ? -1 : 1) * (one + 2*two).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } qdigit_t;

  // Divide formats. The floating-point formats differ only in the number of
  // iterations; the integer formats use the start/stop pointer.
  typedef enum logic [2:0] {
    DIV_SHORT = 3'd0,
    DIV_LONG  = 3'd1,
    DIV_QUAD  = 3'd2,
    DIV_INT32 = 3'd3,
    DIV_INT64 = 3'd4
  } div_mode_e;

  // Iterations of the floating-point divides (2 quotient bits each).
  localparam int unsigned ITER_SHORT = 14;
  localparam int unsigned ITER_LONG  = 28;
  localparam int unsigned ITER_QUAD  = 58;

  function automatic int digit_value(qdigit_t q);
    int v;
    v = (q.one ? 1 : 0) + (q.two ? 2 : 0);
    return q.neg ? -v : v;
  endfunction

endpackage
