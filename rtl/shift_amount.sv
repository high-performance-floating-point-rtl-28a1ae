// Alignment shift amount of the fused multiply-add dataflow.
//
// The addend C is right-shifted against the product A*B, whose radix point is
// fixed in the dataflow. For binary operands the shift is
//   SA = E_A + E_B - E_C + K,  K = 59 + 2 - bias,
// which places C's leading bit on the product's integer bit when the product
// exponent equals E_C. Denormalized operands are only detected in this same
// cycle, so the shift is formed for the exponent difference D and for D+1
// and D-1 (and D+2 for two denormalized factors) from the raw exponent
// fields, and the right one is selected by the denormal flags: a denormal
// factor counts with exponent 1 instead of 0 (+1), a denormal addend likewise
// (-1). Purely combinational; the result is signed (negative: C is not
// shifted at all).
//
// The formula and the D-1/D/D+1 selection follow the original design; the
// D+2 case for two denormal factors is this design's completion.
module shift_amount #(
  parameter int unsigned EW   = 11,
  parameter int          BIAS = 1023
)(
  input  logic [EW-1:0]       ea, eb, ec,
  input  logic                a_den, b_den, c_den,
  output logic signed [EW+2:0] sa
);

  localparam int K = 59 + 2 - BIAS;

  logic signed [EW+2:0] d0, dm1, dp1, dp2;

  always_comb begin
    d0  = (EW+3)'(ea) + (EW+3)'(eb) - (EW+3)'(ec) + (EW+3)'(K);
    dm1 = d0 - 1;
    dp1 = d0 + 1;
    dp2 = d0 + 2;
    unique case ({a_den, b_den, c_den})
      3'b000, 3'b101, 3'b011: sa = d0;
      3'b001:                 sa = dm1;
      3'b100, 3'b010, 3'b111: sa = dp1;
      default:                sa = dp2;   // 3'b110
    endcase
  end

endmodule
