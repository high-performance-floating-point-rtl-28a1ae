// Booth-encoded fraction multiplier, first half of the counter tree, with
// correction for denormalized operands.
//
// Multiplies two 56-bit fractions X and Y (radix point after the top bit) for
// the fused multiply-add dataflow. Y is recoded into 29 radix-4 Booth digits
// in {-2..+2}; each selects 0, +-X or +-2X as a partial product. The binary
// formats are loaded with the implied one always set; whether it really is
// one is known only later (denormalized operands), so:
//  * the two digits that contain Y's implied bit (the top digit and the one
//    below it) are decoded both ways and selected by y_imp; the top one enters
//    the tree as a delayed partial product;
//  * X is used with its implied one forced (X'), and the correction term
//    -Y * (1 - x_imp) * 2^55 is added as one more partial product, so that
//    X'*Y - Y*(not x0) = X*Y.
// The 28 regular partial products and the correction term are reduced by four
// levels of 3:2 counters to 7 vectors; with the delayed partial product that
// makes the 8 vectors of the carry-save stage register. Products are placed
// in the 116-bit product field with 4 guard bits: bit 115..114 hold the
// integer part of X*Y, and all arithmetic is modulo 2^116.
// Purely combinational; the caller registers pp_out.
module booth_multiplier #(
  parameter int unsigned N  = 56,    // operand width
  parameter int unsigned W  = 116,   // product field
  parameter int unsigned G  = 4,     // guard bits below the product
  parameter int unsigned NPP = N / 2 + 1
)(
  input  logic [N-1:0] x,       // multiplicand, implied bit position N-1 forced to 1
  input  logic [N-1:0] y,       // multiplier, bit N-1 ignored (see y_imp)
  input  logic         x_imp,   // real implied bit of X
  input  logic         y_imp,   // real implied bit of Y
  output logic [W-1:0] pp_out [8]
);

  logic [W-1:0] pp [NPP];             // 28 regular + correction
  logic [W-1:0] red [NPP];
  logic [W-1:0] xs, ys, delayed;
  logic [N+2:0] yb;                   // {0, 0, y, 0}: Booth scan bits

  // Partial product for digit d (-2..2) of X' at radix-4 position j.
  function automatic logic [W-1:0] booth_pp(logic [2:0] bits, logic [W-1:0] xv, int unsigned j);
    logic [W-1:0] m;
    unique case (bits)
      3'b001, 3'b010: m = xv;
      3'b011:         m = xv << 1;
      3'b100:         m = -(xv << 1);
      3'b101, 3'b110: m = -xv;
      default:        m = '0;
    endcase
    return m << (2 * j + G);
  endfunction

  always_comb begin
    xs = W'({1'b1, x[N-2:0]});
    ys = W'({y_imp, y[N-2:0]});
    // Digits 0 .. NPP-3 do not depend on the implied bit of Y.
    yb = {2'b00, 1'b1, y[N-2:0], 1'b0};
    for (int unsigned j = 0; j < NPP - 2; j++) pp[j] = booth_pp(yb[2*j +: 3], xs, j);
    // Digit NPP-2 scans the implied bit: decoded for both values, then selected.
    pp[NPP-2] = y_imp ? booth_pp({1'b1, y[N-2:N-3]}, xs, NPP - 2)
                      : booth_pp({1'b0, y[N-2:N-3]}, xs, NPP - 2);
    // Correction of the multiplicand: -Y * 2^(N-1) when X is denormalized.
    pp[NPP-1] = x_imp ? '0 : -(ys << (N - 1 + G));
    // Top digit (= implied bit of Y) enters late.
    delayed   = y_imp ? booth_pp(3'b001, xs, NPP - 1) : '0;
  end

  csa_tree #(.W(W), .N(NPP), .LEVELS(4)) u_tree (.din(pp), .dout(red));

  always_comb begin
    for (int i = 0; i < 7; i++) pp_out[i] = red[i];
    pp_out[7] = delayed;
  end

endmodule
