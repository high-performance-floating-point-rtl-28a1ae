// Radix-4 SRT divide macro with a 116-bit dataflow.
//
// Holds the divisor register (113 bits), the partial remainder register
// (116 sum bits and 28 sparse carry bits), the quotient registers QPOS/QNEG
// and the control counter. Every iteration retires one radix-4 digit
// (two quotient bits):  Ps+Pc <- 4*(Ps+Pc) - q1*D - q2*2D, q = q1 + 2*q2,
// with q chosen by the digit table from the five top sum bits and the two
// divisor bits after the implied one.
//
// Operands arrive normalized from the main dataflow: the dividend as a
// 116-bit value with weight 1 at bit 115, the divisor 1.f with the implied
// one at bit 112. Inside the remainder frame weight 1 is bit 114.
//  * Floating-point formats: P0 = dividend/2, so the quotient fraction
//    Q = sum q_i 4^-i = dividend/(2*divisor) lies in (1/4, 1). Iterations:
//    14 (short), 28 (long), 58 (quad).
//  * Integer formats (32/64 bit, operands already made positive): the
//    effective bit counts nV, nD give the quotient length
//    nQ = nV - nD (+1 when dividend_norm >= divisor_norm), rounded up to an
//    even nQE (at least 2). The digits are written from pointer
//    P_start = width - nQE up to P_stop = width, i.e. the integer quotient
//    ends right-aligned in the top "width" bits of QPOS/QNEG, and only
//    nQE/2 iterations run. The dividend is pre-shifted by 2*k - (nV - nD)
//    so that dividend = divisor * Q_int + P_k * 2^(nD-1).
// After the last iteration done rises and stays high until the next start;
// QPOS, QNEG and the remainder (sum part and carries expanded to their bit
// weights) are then read out for the main adder. No sign correction of the
// final remainder happens here: that belongs to the main dataflow.
//
// Timing: start is accepted in IDLE or DONE; the next cycle loads the
// registers, then one digit per cycle. done is high (iterations + 2) cycles
// after the start cycle. The choice of P0 and the pre-shift are this design's own.
module srt_divider
  import fpu_pkg::*;
#(
  parameter int unsigned W  = DIV_W,
  parameter int unsigned DW = DVSR_W,
  parameter int unsigned NC = (W - 4) / 4
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  div_mode_e       mode,
  input  logic [W-1:0]    dividend,   // normalized, weight 1 at bit W-1
  input  logic [DW-1:0]   divisor,    // normalized, weight 1 at bit DW-1
  input  logic [7:0]      nv,         // effective dividend bits (integer)
  input  logic [7:0]      nd,         // effective divisor bits (integer)
  output logic            busy,
  output logic            done,
  output logic [6:0]      iters,      // iterations of the current divide
  output logic [W-1:0]    qpos,
  output logic [W-1:0]    qneg,
  output logic [W-1:0]    rem_sum,    // remainder sum part (weight 1 at bit W-2)
  output logic [W-1:0]    rem_carry   // remainder carries at their weights
);

  localparam int unsigned PW = $clog2(W);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ITER, S_DONE} state_e;
  state_e state;

  logic [DW-1:0]   dreg;
  logic [W-1:0]    ps, ps_next;
  logic [NC-1:0]   pc, pc_next;
  logic            phase;
  logic [6:0]      cnt;
  logic [PW-1:0]   ptr;
  qdigit_t         q;
  logic [W-1:0]    m1, m2;
  logic            inv1, inv2;

  // Start-of-divide set-up (computed from the inputs at start).
  logic [6:0]      n_iter;
  logic [PW-1:0]   p_start;
  logic [W-1:0]    p0;
  logic [W-1:0]    div_lat;
  logic [DW-1:0]   dvsr_lat;
  div_mode_e       mode_lat;
  logic [7:0]      nv_lat, nd_lat;

  always_comb begin
    int nq, nqe, width, sh;
    logic ge;
    ge     = div_lat[W-1:W-DW] >= dvsr_lat;
    width  = (mode_lat == DIV_INT32) ? 32 : 64;
    nq     = int'(nv_lat) - int'(nd_lat) + (ge ? 1 : 0);
    nqe    = (nq <= 0) ? 2 : ((nq + 1) / 2) * 2;
    if (nqe > width) nqe = width;
    sh     = nqe - (int'(nv_lat) - int'(nd_lat));
    unique case (mode_lat)
      DIV_SHORT: begin n_iter = 7'(ITER_SHORT); p_start = '0; p0 = div_lat >> 2; end
      DIV_LONG:  begin n_iter = 7'(ITER_LONG);  p_start = '0; p0 = div_lat >> 2; end
      DIV_QUAD:  begin n_iter = 7'(ITER_QUAD);  p_start = '0; p0 = div_lat >> 2; end
      default: begin
        n_iter  = 7'(nqe / 2);
        p_start = PW'(width - nqe);
        p0      = (sh >= int'(W)) ? '0 : (div_lat >> 1) >> sh;
      end
    endcase
  end

  srt_table u_table (
    .p_est (ps[W-1:W-5]),
    .d_est (dreg[DW-2:DW-3]),
    .q     (q)
  );

  srt_multiple #(.W(W), .DW(DW)) u_mult (
    .d(dreg), .q(q), .m1(m1), .m2(m2), .inv1(inv1), .inv2(inv2)
  );

  srt_subtractor #(.W(W), .NC(NC)) u_sub (
    .phase(phase), .ps(ps), .pc(pc), .m1(m1), .m2(m2), .inv1(inv1), .inv2(inv2),
    .ps_next(ps_next), .pc_next(pc_next)
  );

  srt_quotient_reg #(.W(W), .PW(PW)) u_qreg (
    .clk(clk), .rst_n(rst_n),
    .clear(state == S_LOAD),
    .we(state == S_ITER),
    .ptr(ptr), .q(q),
    .qpos(qpos), .qneg(qneg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dreg     <= '0;
      ps       <= '0;
      pc       <= '0;
      phase    <= 1'b0;
      cnt      <= '0;
      ptr      <= '0;
      iters    <= '0;
      div_lat  <= '0;
      dvsr_lat <= '0;
      mode_lat <= DIV_LONG;
      nv_lat   <= '0;
      nd_lat   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            div_lat  <= dividend;
            dvsr_lat <= divisor;
            mode_lat <= mode;
            nv_lat   <= nv;
            nd_lat   <= nd;
            state    <= S_LOAD;
          end
        end
        S_LOAD: begin
          dreg  <= dvsr_lat;
          ps    <= p0;
          pc    <= '0;
          phase <= 1'b0;
          cnt   <= n_iter;
          iters <= n_iter;
          ptr   <= p_start;
          state <= S_ITER;
        end
        S_ITER: begin
          ps    <= ps_next;
          pc    <= pc_next;
          phase <= !phase;
          ptr   <= ptr + PW'(2);
          cnt   <= cnt - 7'd1;
          if (cnt == 7'd1) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_LOAD) || (state == S_ITER);
  assign done = (state == S_DONE);

  // Remainder readout: sparse carries placed at their weights. The last
  // iteration ran with phase !phase.
  always_comb begin
    rem_sum   = ps;
    rem_carry = '0;
    for (int unsigned k = 0; k < NC; k++) begin
      if (phase) rem_carry[4 * k + 4] = pc[k];
      else       rem_carry[(k == 0) ? 2 : 4 * k + 2] = pc[k];
    end
  end

  // The recurrence only stays bounded with a normalized divisor.
  a_norm: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_ITER |-> dreg[DW-1]);

endmodule
