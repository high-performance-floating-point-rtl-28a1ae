// High-sum incrementer and result select of the fused multiply-add dataflow.
//
// The addend bits above the main adder (the high-sum) bypass the adder; only
// the adder's carry (addition) or borrow (subtraction) has to be applied to
// them, so they go through an incrementer instead of a wide adder. At the end
// of the add cycle a multiplexer chooses between high-sum and its
// incremented/decremented value and whether the result is shifted by 60
// bits: when the high part is non-zero, it and the upper 56 adder bits are
// kept (the 60 lower adder bits only feed the sticky bit); otherwise the
// 116-bit adder output is kept as it is.
//
// For a subtraction the adder delivers |P - C_low| with neg = (C_low > P).
// With a non-zero high-sum the addend dominates: if P > C_low the borrow is
// taken from the high-sum and the low part is 2^116 - (P - C_low). The
// leading zero count comes from the adder's precount when the adder output is
// kept unchanged, and is counted here otherwise. Purely combinational.
//
// Choosing between high-sum and high-sum plus one and the 60-bit shift follow
// the original design; the borrow/recomplement for an effective subtraction
// and the recount of leading zeros after the shift are this design's own.
module his_select #(
  parameter int unsigned HW = 60,
  parameter int unsigned LW = 116,
  parameter int unsigned ZW = 7
)(
  input  logic [HW-1:0] his,
  input  logic [LW-1:0] sum,       // main adder output
  input  logic          cout,      // adder carry out (addition)
  input  logic          neg,       // adder chose the complement (subtraction)
  input  logic          eff_sub,
  input  logic [ZW-1:0] add_lzc,   // adder leading zero precount of sum
  output logic [LW-1:0] dout,
  output logic [ZW-1:0] lzc,
  output logic          shift60,   // dout = {high, sum[115:60]}
  output logic          sticky,    // non-zero adder bits dropped by the shift
  output logic          flip       // result sign is the addend's (sub, C > P)
);

  logic [HW-1:0] hi;
  logic [LW-1:0] lo;
  logic          negated;

  function automatic int unsigned lz(logic [LW-1:0] v);
    for (int i = LW - 1; i >= 0; i--) if (v[i]) return unsigned'(LW - 1 - i);
    return LW;
  endfunction

  always_comb begin
    negated = 1'b0;
    flip    = 1'b0;
    if (!eff_sub) begin
      hi = his + HW'(cout);
      lo = sum;
    end else if (his != '0) begin
      flip = 1'b1;
      if (!neg && sum != '0) begin
        hi      = his - HW'(1);
        lo      = -sum;
        negated = 1'b1;
      end else begin
        hi = his;
        lo = sum;
      end
    end else begin
      hi   = '0;
      lo   = sum;
      flip = neg;
    end
    shift60 = (hi != '0);
    if (shift60) begin
      dout   = {hi, lo[LW-1:HW]};
      sticky = |lo[HW-1:0];
      lzc    = ZW'(lz({hi, (LW-HW)'(0)}));
    end else begin
      dout   = lo;
      sticky = 1'b0;
      lzc    = negated ? ZW'(lz(lo)) : add_lzc;
    end
  end

endmodule
