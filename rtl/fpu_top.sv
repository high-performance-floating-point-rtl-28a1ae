// Floating-point unit: register file, fused multiply-add pipeline and divide.
//
// Multiply-add: an FMA request reads A, B and C from the register file (three
// read ports, wrap register bypass included) and issues into the pipelined
// multiply-add dataflow (E0 operand register + five execution cycles), one
// operation per cycle. The rounded result is written to the target register
// at the end of E5 and shown on fma_result in the next cycle, 6 cycles after
// issue. Loads take the same issue slot: a cycle with load_valid issues the
// load, and fma_valid in that cycle is not taken (fma_taken low). Because a
// load writes the array when it leaves the fifth wrap register, 5 cycles
// after issue, just as an FMA writes at the end of E5, the two never need the
// write port in the same cycle. The issuer must not read an FMA's target
// register before its result has been written (there is no result bypass).
// While a divide waits to write back, no FMA is issued, so the multiply-add
// pipeline drains and the divide gets the write port within 5 cycles.
//
// Divide: connects the 116-bit radix-4 SRT divide macro and the back end of the main fraction dataflow (main adder with
// leading zero precount, normalizer, rounder) into a working binary (IEEE 754)
// long divide, the way the divide engine uses the main dataflow: the operands
// are read from the register file, unpacked into the dividend and divisor
// registers, the divide loops run in the divide macro, and then the remainder
// and the quotient (held as QPOS/QNEG) are moved out into the main adder,
// added there to explicit values, normalized by the leading zero count and
// rounded.
//
// Sequence of one divide (one state per cycle except the loops):
//   READ   operands read (wrap register bypass included), unpacked
//   DIV    divide macro: load + 28 loops
//   REM    adder: remainder sum + carries -> sign and non-zero (sticky)
//   QUO    adder: QPOS - QNEG
//   CORR   adder: quotient minus one ulp when the remainder is negative;
//          the zero digit count goes to the LZC register
//   NORM   normalizer shifts by the LZC
//   ROUND  rounder (IEEE rounding mode), exponent adjusted
//   WB     result on fpu_result and written to the target register; waits
//          while a load or an FMA result uses the write port
// Loads arrive on fetch_bus with a target register and are staged through the
// wrap registers; an operand can be read while its load is still in flight.
//
// Only normalized, finite binary long operands are divided; zero, denormal,
// infinite and NaN operands, and results that overflow or underflow, raise
// exc instead of producing a value (their handling is not part of this
// model). The same holds for multiply-add operands that are infinite or NaN
// and for results outside the normal range. Divide and multiply-add use
// separate adder/normalizer/rounder instances here, whereas the document's
// divide engine reuses the main dataflow; the state sequence, the issue slot
// rule and the write-back stall are this design's own.
module fpu_top
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // loads
  input  logic        load_valid,
  input  logic [4:0]  load_addr,
  input  logic [63:0] fetch_bus,
  // divide request
  input  logic        div_valid,    // start a divide FPR[ra] / FPR[rb] -> FPR[rt]
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  input  logic [4:0]  rt,
  input  logic [1:0]  rmode,        // 0 nearest even, 1 zero, 2 +inf, 3 -inf
  output logic        busy,
  output logic        result_valid, // one cycle, with fpu_result
  output logic [63:0] fpu_result,
  output logic        exc,          // unsupported operand or range, with result_valid
  output logic        inexact,      // rounded result differs from the exact quotient
  // multiply-add request: FPR[ra] * FPR[rb] +- FPR[rc] -> FPR[rt]
  input  logic        fma_valid,
  input  logic        fma_sub,      // subtract the addend
  input  logic [4:0]  rc,
  output logic        fma_taken,    // request issued this cycle
  output logic        fma_valid_out,// one cycle, 6 cycles after issue
  output logic [63:0] fma_result,
  output logic        fma_exc,
  output logic        fma_inexact,
  output logic [2:0]  rd_bypass     // operand reads served by wrap registers (ports a, b, c)
);

  typedef enum logic [3:0] {
    T_IDLE, T_START, T_DIV, T_REM, T_QUO, T_CORR, T_NORM, T_ROUND, T_WB
  } tstate_e;
  tstate_e st;

  localparam int unsigned QLSB = DF_W - 2 * ITER_LONG;   // ulp of the 56-bit quotient

  // Operand registers
  logic               sign_q;
  logic signed [13:0] exp_q;
  logic [51:0]        fa_q, fb_q;
  logic [4:0]         rt_q;
  logic [1:0]         rmode_q;
  logic               bad_q;

  // Register file
  logic [4:0]  raddr [3];
  logic [63:0] rdata [3];
  logic        wr_en;
  logic [4:0]  load_hist;   // loads in flight in the wrap registers

  assign raddr[0] = ra;
  assign raddr[1] = rb;
  assign raddr[2] = rc;

  // Multiply-add pipeline and its target register pipe
  logic        e5_valid, e5_exc, fma_wr, div_wr;
  logic [63:0] e5_result;
  logic [4:0]  frt [5];

  assign fma_taken = fma_valid && !load_valid && !(st == T_IDLE && div_valid) && (st != T_WB);

  fpu_fma u_fma (
    .clk, .rst_n,
    .in_valid(fma_taken), .a(rdata[0]), .b(rdata[1]), .c(rdata[2]),
    .op_sub(fma_sub), .rmode(rmode),
    .out_valid(fma_valid_out), .result(fma_result), .exc(fma_exc), .inexact(fma_inexact),
    .e5_valid(e5_valid), .e5_result(e5_result), .e5_exc(e5_exc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 5; i++) frt[i] <= '0;
    else begin
      frt[0] <= rt;
      for (int i = 1; i < 5; i++) frt[i] <= frt[i-1];
    end
  end

  assign fma_wr = e5_valid && !e5_exc;

  fpr_file u_fpr (
    .clk, .rst_n,
    .raddr(raddr), .rdata(rdata), .rbypass(rd_bypass),
    .load_valid(load_valid), .load_addr(load_addr), .load_data(fetch_bus),
    .wr_en(wr_en), .wr_addr(fma_wr ? frt[4] : rt_q), .wr_data(fma_wr ? e5_result : fpu_result)
  );

  // Divide macro
  logic               div_start, div_busy, div_done;
  logic [6:0]         div_iters;
  logic [DIV_W-1:0]   qpos, qneg, rem_sum, rem_carry;

  srt_divider u_div (
    .clk, .rst_n,
    .start(div_start),
    .mode(DIV_LONG),
    .dividend({1'b1, fa_q, 63'b0}),
    .divisor({1'b1, fb_q, 60'b0}),
    .nv(8'd0), .nd(8'd0),
    .busy(div_busy), .done(div_done), .iters(div_iters),
    .qpos, .qneg, .rem_sum, .rem_carry
  );

  // Main adder, normalizer, rounder
  logic [DF_W-1:0]  add_a, add_b, add_sum, add_out, norm_out, rnd_out;
  logic             add_sub, add_cout, add_neg;
  logic [LZC_W-1:0] add_lzc, lzc_q, shamt;
  logic             rem_neg, rem_nz;
  logic             rnd_carry, rnd_inexact, rnd_incr;

  main_adder u_add (
    .a(add_a), .b(add_b), .sub(add_sub),
    .sum(add_sum), .cout(add_cout), .neg(add_neg), .lzc(add_lzc)
  );

  normalizer u_norm (
    .din(add_out), .lzc(lzc_q), .hex(1'b0), .dout(norm_out), .shamt(shamt)
  );

  rounder u_rnd (
    .din(norm_out), .sticky_in(rem_nz), .sign(sign_q), .hex(1'b0), .fmt(2'd1),
    .rmode(rmode_q), .dout(rnd_out), .carry(rnd_carry), .inexact(rnd_inexact),
    .incr(rnd_incr)
  );

  always_comb begin
    add_a = '0; add_b = '0; add_sub = 1'b0;
    unique case (st)
      T_REM:  begin add_a = rem_sum; add_b = rem_carry; add_sub = 1'b0; end
      T_QUO:  begin add_a = qpos;    add_b = qneg;      add_sub = 1'b1; end
      T_CORR: begin add_a = add_out; add_b = rem_neg ? (DF_W'(1) << QLSB) : '0; add_sub = 1'b1; end
      default: ;
    endcase
  end

  assign div_start = (st == T_START) && !bad_q;
  assign div_wr    = (st == T_WB) && !load_hist[4] && !e5_valid && !exc;
  assign wr_en     = div_wr || fma_wr;
  assign busy      = (st != T_IDLE);

  logic [10:0] ea, eb;
  assign ea = rdata[0][62:52];
  assign eb = rdata[1][62:52];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= T_IDLE;
      load_hist    <= '0;
      sign_q       <= 1'b0;
      exp_q        <= '0;
      fa_q         <= '0;
      fb_q         <= '0;
      rt_q         <= '0;
      rmode_q      <= '0;
      bad_q        <= 1'b0;
      add_out      <= '0;
      lzc_q        <= '0;
      rem_neg      <= 1'b0;
      rem_nz       <= 1'b0;
      fpu_result   <= '0;
      exc          <= 1'b0;
      inexact      <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      load_hist    <= {load_hist[3:0], load_valid};
      result_valid <= 1'b0;
      unique case (st)
        T_IDLE: if (div_valid) begin
          sign_q  <= rdata[0][63] ^ rdata[1][63];
          exp_q   <= 14'(ea) - 14'(eb) + 14'sd1023;
          fa_q    <= rdata[0][51:0];
          fb_q    <= rdata[1][51:0];
          rt_q    <= rt;
          rmode_q <= rmode;
          bad_q   <= (ea == 11'd0) || (ea == 11'h7FF) || (eb == 11'd0) || (eb == 11'h7FF);
          exc     <= 1'b0;
          inexact <= 1'b0;
          st      <= T_START;
        end
        T_START: st <= bad_q ? T_WB : T_DIV;
        T_DIV:   if (div_done) st <= T_REM;
        T_REM: begin
          rem_neg <= add_sum[DF_W-1];
          rem_nz  <= |add_sum;
          st      <= T_QUO;
        end
        T_QUO: begin
          add_out <= add_sum;
          st      <= T_CORR;
        end
        T_CORR: begin
          add_out <= add_sum;
          lzc_q   <= add_lzc;
          st      <= T_NORM;
        end
        T_NORM: begin
          add_out <= norm_out;        // NORM_OUT register
          lzc_q   <= '0;
          exp_q   <= exp_q - 14'(shamt);
          st      <= T_ROUND;
        end
        T_ROUND: begin
          logic signed [13:0] e;
          e = exp_q + (rnd_carry ? 14'sd1 : 14'sd0);
          fpu_result <= {sign_q, e[10:0], rnd_out[DF_W-2 -: 52]};
          exc        <= (e < 14'sd1) || (e > 14'sd2046);
          inexact    <= rnd_inexact;
          st         <= T_WB;
        end
        T_WB: begin
          if (bad_q) begin
            exc          <= 1'b1;
            fpu_result   <= '0;
            result_valid <= 1'b1;
            st           <= T_IDLE;
          end else if (!load_hist[4] && !e5_valid) begin
            result_valid <= 1'b1;
            st           <= T_IDLE;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
