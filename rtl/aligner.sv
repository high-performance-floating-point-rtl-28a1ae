// Addend aligner of the fused multiply-add dataflow.
//
// Places the 56-bit addend fraction (leading bit at the top) at the top of the
// 176-bit dataflow, 60 bits of addend field above the 116-bit product field,
// and shifts it right by the shift amount. A negative shift leaves it
// unshifted. Bits shifted out below the dataflow are ORed into sticky; a
// shift beyond the whole width makes C nothing but sticky. The upper 60 bits
// of the result are the high-sum part (they do not enter the main adder but
// its incrementer); the lower 116 bits go into the last 3:2 counter with the
// product. Purely combinational.
//
// The 60/116-bit partition and the sticky rule for shifts beyond the dataflow
// follow the original design; clamping a negative shift to zero here (with the
// product reduced to sticky by the caller) is this design's choice.
module aligner #(
  parameter int unsigned N  = 56,
  parameter int unsigned HW = 60,    // addend field / high-sum width
  parameter int unsigned LW = 116,   // product field / adder width
  parameter int unsigned SW = 14     // shift amount width (signed)
)(
  input  logic [N-1:0]         c,
  input  logic signed [SW-1:0] sa,
  output logic [HW-1:0]        his,
  output logic [LW-1:0]        low,
  output logic                 sticky
);

  localparam int unsigned FW = HW + LW;

  logic [2*FW-1:0] wide;
  int unsigned     sh;

  always_comb begin
    if (sa < 0)                 sh = 0;
    else if (int'(sa) > int'(FW)) sh = FW;
    else                        sh = unsigned'(int'(sa));
    wide   = {c, (2*FW-N)'(0)} >> sh;
    his    = wide[2*FW-1 -: HW];
    low    = wide[2*FW-1-HW -: LW];
    sticky = |wide[FW-1:0];
  end

endmodule
