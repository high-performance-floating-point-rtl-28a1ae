// Partial remainder subtractor of the radix-4 SRT divider.
//
// Computes Ps' + Pc' = 4*(Ps + Pc) - q1*D - q2*2D in the reduced carry-save
// form: the sum part Ps is a full 116-bit vector, the carry part Pc holds only
// one bit for every four sum bits (28 bits). The reduction is one 3:2 carry-save
// stage over {4*Ps, multiple 1D, multiple 2D} followed by independent 4-bit
// carry-propagate adders. Each 4-bit adder adds the CSA sum and carry bits of
// its group plus one carry-in, which is the stored sparse carry of the previous
// iteration; its carry-out becomes the new sparse carry. The high-order bits
// are resolved by one explicit carry-propagate adder, so the bits the digit
// table reads are always explicit.
//
// The 4-bit groups alternate between two alignments from one iteration to the
// next (phase 0: groups start at bits 0,4,..,104, explicit top 115..108;
// phase 1: a 2-bit group 1..0, groups start at 2,6,..,106, explicit top
// 115..110, i.e. six bits). This is the design's own choice: because 4*P
// moves every bit two places up, a carry stored at a group boundary lands
// exactly on a group boundary of the other alignment, and every 4-bit adder
// keeps a single carry-in. The hot ones that complete the two's complement
// of subtracted multiples enter as CSA carry bit 0 (inv1) and as carry-in
// of the lowest group (inv2).
//
// Purely combinational. All arithmetic is modulo 2^W; the bound |P| < D
// keeps the true value inside the W-bit two's complement range.
module srt_subtractor
  import fpu_pkg::*;
#(
  parameter int unsigned W    = DIV_W,        // sum width, multiple of 4
  parameter int unsigned NC   = (W - 4) / 4   // sparse carry bits
)(
  input  logic          phase,      // alignment of this iteration's groups
  input  logic [W-1:0]  ps,         // sum part P_s of P_i
  input  logic [NC-1:0] pc,         // sparse carries of P_i (made with !phase)
  input  logic [W-1:0]  m1,         // divisor multiple 1D (maybe inverted)
  input  logic [W-1:0]  m2,         // divisor multiple 2D (maybe inverted)
  input  logic          inv1,       // hot one of m1
  input  logic          inv2,       // hot one of m2
  output logic [W-1:0]  ps_next,    // sum part of P_{i+1}
  output logic [NC-1:0] pc_next     // sparse carries of P_{i+1}
);

  localparam int unsigned TOP0 = W - 8;   // explicit region start, phase 0
  localparam int unsigned TOP1 = W - 6;   // explicit region start, phase 1

  logic [W-1:0] a, cv, s, c;
  logic [4:0]   grp;
  logic [7:0]   top;
  int unsigned  lsb;

  // Weight of stored carry k, as produced by an iteration of phase ph.
  function automatic int unsigned carry_weight(logic ph, int unsigned k);
    if (!ph) return 4 * k + 4;
    else     return (k == 0) ? 2 : 4 * k + 2;
  endfunction

  always_comb begin
    // 4*P: shift the sum part and place the sparse carries two bits higher.
    a  = {ps[W-3:0], 2'b00};
    cv = '0;
    for (int unsigned k = 0; k < NC; k++) begin
      if (carry_weight(!phase, k) + 2 < W)
        cv[carry_weight(!phase, k) + 2] = pc[k];
    end

    // One 3:2 carry-save stage.
    s = a ^ m1 ^ m2;
    c = {(a[W-2:0] & m1[W-2:0]) | (a[W-2:0] & m2[W-2:0]) | (m1[W-2:0] & m2[W-2:0]), inv1};

    // 4-bit carry-propagate groups.
    ps_next = '0;
    pc_next = '0;
    for (int unsigned k = 0; k < NC; k++) begin
      grp = '0;
      if (!phase) begin
        if (k < TOP0 / 4) begin
          lsb = 4 * k;
          grp = {1'b0, s[lsb +: 4]} + {1'b0, c[lsb +: 4]} + {4'b0, (k == 0) ? inv2 : cv[lsb]};
          ps_next[lsb +: 4] = grp[3:0];
          pc_next[k]        = grp[4];
        end
      end else begin
        if (k == 0) begin
          grp = {3'b0, s[1:0]} + {3'b0, c[1:0]} + {4'b0, inv2};
          ps_next[1:0] = grp[1:0];
          pc_next[0]   = grp[2];
        end else begin
          lsb = 4 * k - 2;
          grp = {1'b0, s[lsb +: 4]} + {1'b0, c[lsb +: 4]} + {4'b0, cv[lsb]};
          ps_next[lsb +: 4] = grp[3:0];
          pc_next[k]        = grp[4];
        end
      end
    end

    // Explicit high-order adder; the carry out of the top is discarded.
    if (!phase) begin
      top = s[W-1:TOP0] + c[W-1:TOP0] + cv[W-1:TOP0];
      ps_next[W-1:TOP0] = top;
    end else begin
      top = {2'b00, s[W-1:TOP1] + c[W-1:TOP1] + cv[W-1:TOP1]};
      ps_next[W-1:TOP1] = top[5:0];
    end
  end

endmodule
