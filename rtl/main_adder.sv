// Main adder of the floating-point dataflow: true and complement adders with
// leading zero precount.
//
// With sub = 0 it returns a + b. With sub = 1 it computes both a - b (true
// adder) and b - a (complement adder) in parallel and selects by the carry out
// of the true adder, so the magnitude |a - b| is available without a
// recomplement cycle; neg reports that b > a. Both adders are 116 bits wide.
//
// The leading zero count is produced alongside the sum (zero digit count):
// the result is cut into 16-bit blocks; for every block the zero count of
// both candidate block sums, without and with a carry into the block, is
// formed from the operands alone, and the real block carries only select
// among them. The count is exact (no later correction), 0..116, and is
// intended for the 7-bit LZC register. Purely combinational; the block
// structure follows the document, the 116-bit frame padded to 8 blocks at
// the low end is this design's own arrangement.
module main_adder
  import fpu_pkg::*;
#(
  parameter int unsigned W  = DF_W,
  parameter int unsigned LW = LZC_W
)(
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          sub,
  output logic [W-1:0]  sum,
  output logic          cout,   // carry out of the addition (sub = 0)
  output logic          neg,    // b > a (sub = 1)
  output logic [LW-1:0] lzc
);

  localparam int unsigned NB = (W + 15) / 16;
  localparam int unsigned PW = NB * 16;

  logic [W:0]    t_full, c_full;   // true and complement results with carry out
  logic [W-1:0]  x, y;             // operands of the selected adder
  logic          cin;
  logic [PW-1:0] xp, yp, carries;
  logic [15:0]   blk0, blk1;
  logic [4:0]    z0 [NB];
  logic [4:0]    z1 [NB];
  logic          found;
  int            lzi;
  logic [NB-1:0] bc;               // carry into each block

  function automatic logic [4:0] lz16(logic [15:0] v);
    for (int i = 15; i >= 0; i--) if (v[i]) return 5'(15 - i);
    return 5'd16;
  endfunction

  always_comb begin
    t_full = {1'b0, a} + {1'b0, (sub ? ~b : b)} + (W+1)'(sub);
    c_full = {1'b0, ~a} + {1'b0, b} + (W+1)'(1);
    // Select: true adder unless a subtraction came out negative.
    if (sub && !t_full[W]) begin
      x = ~a; y = b; cin = 1'b1;
    end else begin
      x = a; y = sub ? ~b : b; cin = sub;
    end
    sum  = (sub && !t_full[W]) ? c_full[W-1:0] : t_full[W-1:0];
    cout = !sub && t_full[W];
    neg  = sub && !t_full[W];

    // Zero digit count on 16-bit blocks of SUM and SUM+1.
    xp = {x, (PW-W)'(0)};
    yp = {y, (PW-W)'(0)};
    carries = (xp ^ yp) ^ ({sum, (PW-W)'(0)});   // carry into every bit
    for (int k = 0; k < int'(NB); k++) begin
      blk0  = xp[16*k +: 16] + yp[16*k +: 16];
      // The lowest block holds the padding; its carry-in enters above it.
      blk1  = xp[16*k +: 16] + yp[16*k +: 16] + ((k == 0) ? 16'(1 << (PW - W)) : 16'd1);
      z0[k] = lz16(blk0);
      z1[k] = lz16(blk1);
      bc[k] = (k == 0) ? cin : carries[16*k];
    end
    lzi   = int'(PW);
    found = 1'b0;
    for (int k = int'(NB) - 1; k >= 0; k--) begin
      if (!found && (bc[k] ? z1[k] : z0[k]) != 5'd16) begin
        lzi   = 16 * (int'(NB) - 1 - k) + (bc[k] ? int'(z1[k]) : int'(z0[k]));
        found = 1'b1;
      end
    end
    lzc = LW'((lzi > int'(W)) ? int'(W) : lzi);
  end

endmodule
