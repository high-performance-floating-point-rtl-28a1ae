// Fused multiply-add pipeline of the fraction dataflow (binary long format).
//
// Computes A*B + C (or A*B - C) with one rounding, one operation per cycle,
// in a register stage E0 and five execution cycles:
//   E0  A, B, C registers: 56-bit fractions with the implied one assumed 1
//   E1  denormal detection; shift amount for D-1/D/D+1 selected by the
//       denormal flags; Booth decode and four levels of 3:2 counters
//       (29 -> 7 vectors, plus the delayed top partial product) into the
//       carry-save stage register; addend with its real implied bit into C2
//   E2  alignment of C2 in the 176-bit dataflow (60-bit addend field above a
//       116-bit product field); four more counter levels (8 -> 2) and the
//       last 3:2 counter that adds the low part of the aligned addend
//       (inverted for an effective subtraction) -> SUM/CARRY registers; the
//       addend bits above the product field -> HIS register
//   E3  main adder (true and complement) with leading zero precount,
//       high-sum incrementer and the 60-bit shift select -> ADD OUT, LZC
//   E4  normalization by the stored count -> NORM_OUT
//   E5  rounding (IEEE modes), exponent adjust, packing -> RESULT
// Result for an operation presented in cycle t (in_valid) is on result /
// out_valid in cycle t+6, i.e. 5 execution cycles after the operand cycle E0.
//
// The internal representation keeps the binary bias; the radix point of the
// product is fixed and the addend is shifted right by SA = E_A + E_B - E_C +
// 59 + 2 - bias. A negative SA (addend far above the product) leaves C
// unshifted and reduces the product to a sticky unit; a shift beyond the
// dataflow reduces C to a sticky unit. Denormalized inputs are handled
// without prenormalization (correction term in the multiplier, shift amount
// selection). Outside this model: hexadecimal and the short/quad formats,
// NaN/infinity operands (exc), results that overflow (exc), and results
// below the normal range whose product exponent lies below the dataflow's
// reach (exc); other results below the normal range are delivered
// denormalized (gradual underflow with the trap disabled); no trap handling.
// The stage split
// and the dataflow widths follow the original design. The sticky-unit
// treatment, these limits, and running the carry-save vectors and the main
// adder two bits wider (118) than the 116-bit product field, so that the
// adder's carry or borrow into the high-sum is exact, are this design's
// choices.
module fpu_fma
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [63:0] c,
  input  logic        op_sub,     // A*B - C
  input  logic [1:0]  rmode,
  output logic        out_valid,
  output logic [63:0] result,
  output logic        exc,
  output logic        inexact,
  // stage values the result write-back path taps (E5 before RESULT)
  output logic        e5_valid,
  output logic [63:0] e5_result,
  output logic        e5_exc
);

  localparam int unsigned N  = 56;
  localparam int unsigned HW = 60;
  localparam int unsigned LW = DF_W;
  localparam int unsigned AW = DF_W + 2;   // carry-save width with two extension bits
  localparam int          BIAS = 1023;

  // ---------------- E0: A, B, C registers ----------------
  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [N-1:0] frac;    // {1, f52, 000}
  } opnd_t;

  logic  v0, sub0;
  logic [1:0] rm0;
  opnd_t a0, b0, c0;

  function automatic opnd_t unpack(logic [63:0] x);
    return '{sign: x[63], exp: x[62:52], frac: {1'b1, x[51:0], 3'b000}};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; sub0 <= 1'b0; rm0 <= '0; a0 <= '0; b0 <= '0; c0 <= '0;
    end else begin
      v0 <= in_valid;
      sub0 <= op_sub; rm0 <= rmode;
      a0 <= unpack(a); b0 <= unpack(b); c0 <= unpack(c);
    end
  end

  // ---------------- E1 ----------------
  logic a_den, b_den, c_den, spec1;
  logic signed [13:0] sa1;
  logic [AW-1:0] pp1 [8];

  assign a_den = (a0.exp == '0);
  assign b_den = (b0.exp == '0);
  assign c_den = (c0.exp == '0);
  assign spec1 = (a0.exp == '1) || (b0.exp == '1) || (c0.exp == '1);

  shift_amount #(.EW(11), .BIAS(BIAS)) u_sa (
    .ea(a0.exp), .eb(b0.exp), .ec(c0.exp),
    .a_den(a_den), .b_den(b_den), .c_den(c_den), .sa(sa1)
  );

  booth_multiplier #(.N(N), .W(AW), .G(4)) u_mul (
    .x(a0.frac), .y(b0.frac), .x_imp(!a_den), .y_imp(!b_den), .pp_out(pp1)
  );

  logic               v1, spec1_q, sub1, pzero1, sp1, sc1;
  logic [1:0]         rm1;
  logic [AW-1:0]      csa_reg [8];       // carry-save stage register
  logic [N-1:0]       c2_reg;            // addend with real implied bit
  logic signed [13:0] sa_reg, ebase1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; spec1_q <= 1'b0; sub1 <= 1'b0; pzero1 <= 1'b0; sp1 <= 1'b0; sc1 <= 1'b0;
      rm1 <= '0; c2_reg <= '0; sa_reg <= '0; ebase1 <= '0;
      for (int i = 0; i < 8; i++) csa_reg[i] <= '0;
    end else begin
      v1      <= v0;
      spec1_q <= spec1;
      sp1     <= a0.sign ^ b0.sign;
      sc1     <= c0.sign ^ sub0;
      sub1    <= a0.sign ^ b0.sign ^ c0.sign ^ sub0;
      pzero1  <= (a_den && a0.frac[N-2:0] == '0) || (b_den && b0.frac[N-2:0] == '0);
      rm1     <= rm0;
      csa_reg <= pp1;
      c2_reg  <= {!c_den, c0.frac[N-2:0]};
      sa_reg  <= sa1;
      ebase1  <= 14'(a_den ? 11'd1 : a0.exp) + 14'(b_den ? 11'd1 : b0.exp) - 14'sd1023;
    end
  end

  // ---------------- E2 ----------------
  logic [AW-1:0] red2 [8];
  logic [HW-1:0] his2;
  logic [LW-1:0] low2;
  logic [AW-1:0] ceff2, ps2, pc2;
  logic          st2;

  csa_tree #(.W(AW), .N(8), .LEVELS(4)) u_tree2 (.din(csa_reg), .dout(red2));

  aligner #(.N(N), .HW(HW), .LW(LW), .SW(14)) u_align (
    .c(c2_reg), .sa(sa_reg), .his(his2), .low(low2), .sticky(st2)
  );

  always_comb begin
    // Product far below the addend: only its being non-zero matters.
    if (sa_reg < 0) begin
      ps2 = pzero1 ? '0 : AW'(1);
      pc2 = '0;
    end else begin
      ps2 = red2[0];
      pc2 = red2[1];
    end
    ceff2 = sub1 ? ~AW'(low2 | LW'(st2)) : AW'(low2);
  end

  logic               v2, spec2, sub2, st2_q, sp2, sc2;
  logic [1:0]         rm2;
  logic [AW-1:0]      sum_reg, carry_reg;
  logic [HW-1:0]      his_reg;
  logic signed [13:0] ebase2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; spec2 <= 1'b0; sub2 <= 1'b0; st2_q <= 1'b0; sp2 <= 1'b0; sc2 <= 1'b0;
      rm2 <= '0; sum_reg <= '0; carry_reg <= '0; his_reg <= '0; ebase2 <= '0;
    end else begin
      v2        <= v1;
      spec2     <= spec1_q;
      sub2      <= sub1;
      st2_q     <= st2;
      sp2       <= sp1;
      sc2       <= sc1;
      rm2       <= rm1;
      // Last 3:2 counter: product sum and carry with the aligned addend.
      sum_reg   <= ps2 ^ pc2 ^ ceff2;
      carry_reg <= {(ps2[AW-2:0] & pc2[AW-2:0]) | (ps2[AW-2:0] & ceff2[AW-2:0]) |
                    (pc2[AW-2:0] & ceff2[AW-2:0]), 1'b0};
      his_reg   <= his2;
      ebase2    <= (sa_reg < 0) ? ebase1 - sa_reg : ebase1;
    end
  end

  // ---------------- E3 ----------------
  logic [AW-1:0]    add_sum;
  logic [LW-1:0]    sel3;
  logic             add_cout, add_neg, sh60, st3, flip3;
  logic [LZC_W-1:0] add_lzc, lzc3;

  // The adder runs over the 116-bit field plus the two extension bits, so its
  // result is the exact sum of the carry-save pair; bit 116 is the carry into
  // the high-sum, and its count includes the two extension bits.
  main_adder #(.W(AW), .LW(LZC_W)) u_add (
    .a(sum_reg), .b(sub2 ? ~carry_reg : carry_reg), .sub(sub2),
    .sum(add_sum), .cout(add_cout), .neg(add_neg), .lzc(add_lzc)
  );

  his_select #(.HW(HW), .LW(LW), .ZW(LZC_W)) u_his (
    .his(his_reg), .sum(add_sum[LW-1:0]), .cout(!sub2 && add_sum[LW]), .neg(add_neg),
    .eff_sub(sub2), .add_lzc(add_lzc - LZC_W'(2)), .dout(sel3), .lzc(lzc3), .shift60(sh60), .sticky(st3), .flip(flip3)
  );

  logic               v3, spec3, st3_q, sign3, zero3;
  logic [1:0]         rm3;
  logic [LW-1:0]      add_out;
  logic [LZC_W-1:0]   lzc_reg;
  logic signed [13:0] e3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; spec3 <= 1'b0; st3_q <= 1'b0; sign3 <= 1'b0; zero3 <= 1'b0;
      rm3 <= '0; add_out <= '0; lzc_reg <= '0; e3 <= '0;
    end else begin
      v3      <= v2;
      spec3   <= spec2;
      st3_q   <= st2_q || st3;
      zero3   <= (sel3 == '0);
      sign3   <= (sel3 == '0) ? (sub2 ? (rm2 == 2'd3) : sp2) : (flip3 ? sc2 : sp2);
      rm3     <= rm2;
      add_out <= sel3;
      lzc_reg <= lzc3;
      e3      <= ebase2 + 14'sd1 + (sh60 ? 14'sd60 : 14'sd0);
    end
  end

  // ---------------- E4 ----------------
  // The normalization shift is limited so that the exponent does not fall
  // below 1: a result below the normal range stays denormalized (gradual
  // underflow). A result that would need a right shift instead is flagged.
  logic [LW-1:0]      norm4;
  logic [LZC_W-1:0]   shamt4, lzc4;
  logic signed [13:0] lim4;
  logic               tiny4;

  always_comb begin
    lim4  = e3 - 14'sd1;
    tiny4 = (lim4 < 0);
    lzc4  = (!tiny4 && lim4 < 14'(lzc_reg)) ? LZC_W'(lim4) : lzc_reg;
  end

  normalizer u_norm (.din(add_out), .lzc(lzc4), .hex(1'b0), .dout(norm4), .shamt(shamt4));

  logic               v4, spec4, st4, sign4, zero4;
  logic [1:0]         rm4;
  logic [LW-1:0]      norm_out;
  logic signed [13:0] e4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v4 <= 1'b0; spec4 <= 1'b0; st4 <= 1'b0; sign4 <= 1'b0; zero4 <= 1'b0;
      rm4 <= '0; norm_out <= '0; e4 <= '0;
    end else begin
      v4 <= v3; spec4 <= spec3 || (tiny4 && !zero3); st4 <= st3_q; sign4 <= sign3; zero4 <= zero3; rm4 <= rm3;
      norm_out <= norm4;
      e4       <= e3 - 14'(shamt4);
    end
  end

  // ---------------- E5 ----------------
  logic [LW-1:0]      rnd5;
  logic               rcarry5, rinexact5, rincr5;
  logic signed [13:0] e5;

  rounder u_rnd (
    .din(norm_out), .sticky_in(st4), .sign(sign4), .hex(1'b0), .fmt(2'd1), .rmode(rm4),
    .dout(rnd5), .carry(rcarry5), .inexact(rinexact5), .incr(rincr5)
  );

  always_comb begin
    e5        = e4 + (rcarry5 ? 14'sd1 : 14'sd0);
    e5_valid  = v4;
    // A denormalized result keeps exponent 1 internally and has no leading
    // one; it is packed with exponent field 0 (rounding may carry it into
    // the normal range, then the leading one is there).
    e5_exc    = spec4 || (!zero4 && e5 > 14'sd2046);
    e5_result = zero4 ? {sign4, 63'b0}
                      : {sign4, (rnd5[LW-1] ? e5[10:0] : 11'd0), rnd5[LW-2 -: 52]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; result <= '0; exc <= 1'b0; inexact <= 1'b0;
    end else begin
      out_valid <= v4;
      result    <= e5_result;
      exc       <= e5_exc;
      inexact   <= !zero4 && rinexact5;
    end
  end

endmodule
