// Normalizer of the floating-point dataflow.
//
// Shifts the adder result left by the leading zero count that the main adder
// stored in the LZC register. The count is exact, so no correction shift
// follows. For hexadecimal formats the two low-order bits of the count are
// ignored, so the shift is a whole number of hex digits and the result is
// hex-normalized (leading hex digit non-zero). Purely combinational; 116 bits
// wide.
//
// Ignoring the two low count bits for hex follows the original design; the
// plain barrel shifter is this design's choice.
module normalizer
  import fpu_pkg::*;
#(
  parameter int unsigned W  = DF_W,
  parameter int unsigned LW = LZC_W
)(
  input  logic [W-1:0]  din,
  input  logic [LW-1:0] lzc,
  input  logic          hex,     // hexadecimal format
  output logic [W-1:0]  dout,
  output logic [LW-1:0] shamt    // shift actually applied
);

  always_comb begin
    shamt = hex ? {lzc[LW-1:2], 2'b00} : lzc;
    dout  = din << shamt;
  end

endmodule
