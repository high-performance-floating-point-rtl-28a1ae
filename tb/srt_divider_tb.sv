// Self-checking testbench of the SRT divide macro.
//
// Floating-point formats: random normalized dividend and divisor; the check is
// the exact division identity P0 = D*Q + P_n*4^-n worked out in wide integer
// arithmetic, plus the remainder bound |P_n| <= D (equality occurs for a divisor of exactly 1.0) and the iteration count
// (14/28/58) and latency. Integer formats: random positive 32- and 64-bit
// operands are normalized here, divided, and the quotient and remainder,
// after the usual one-step correction for a negative remainder, are compared
// with the '/' and '%' operators. Directed cases cover divisors 1.000..0 and
// 1.111..1, equal operands and small quotients.
module srt_divider_tb;
  import fpu_pkg::*;

  localparam int W = 116, DW = 113;

  logic clk = 0, rst_n = 0, start = 0;
  div_mode_e mode;
  logic [W-1:0] dividend;
  logic [DW-1:0] divisor;
  logic [7:0] nv, nd;
  logic busy, done;
  logic [6:0] iters;
  logic [W-1:0] qpos, qneg, rem_sum, rem_carry;
  int checks = 0, failures = 0;

  srt_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] rnd_div(int mode_sel);
    logic [DW-1:0] d;
    for (int i = 0; i < DW; i += 32) d[i +: 32] = $urandom;   // part-selects past DW are ignored
    if (mode_sel == 1) d = '0;
    if (mode_sel == 2) d = '1;
    d[DW-1] = 1'b1;
    return d;
  endfunction

  task automatic run(output int cycles);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check_fp(div_mode_e m, logic [W-1:0] v, logic [DW-1:0] d);
    int cyc, n;
    logic signed [399:0] lhs, rhs, pn, dd, qi, p0;
    mode = m; dividend = v; divisor = d;
    run(cyc);
    n = (m == DIV_SHORT) ? 14 : (m == DIV_LONG) ? 28 : 58;
    checks++;
    if (iters != 7'(n) || cyc != n + 2) begin
      failures++;
      $display("FAIL fp latency mode=%0d iters=%0d cycles=%0d", m, iters, cyc);
    end
    p0 = 400'(v >> 2);
    dd = 400'(d);
    qi = 400'(qpos) - 400'(qneg);
    pn = 400'($signed(rem_sum + rem_carry));
    rhs = ((dd * qi) >>> (116 - 2 * n) <<< 2) + pn;
    lhs = p0 <<< (2 * n);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL fp identity mode=%0d v=%h d=%h", m, v, d);
    end
    checks++;
    if (pn > (dd <<< 2) || -pn > (dd <<< 2)) begin
      failures++;
      $display("FAIL fp remainder bound mode=%0d pn=%0d d4=%0d v=%h d=%h", m, pn, dd <<< 2, v, d);
    end
  endtask

  function automatic int nbits(logic [63:0] x);
    for (int i = 63; i >= 0; i--) if (x[i]) return i + 1;
    return 0;
  endfunction

  task automatic check_int(div_mode_e m, logic [63:0] a, logic [63:0] b);
    int cyc, w, na, nb, nq, nqe;
    logic [W-1:0] qdiff;
    logic signed [199:0] pn, r, q, dv;
    w  = (m == DIV_INT32) ? 32 : 64;
    na = nbits(a); nb = nbits(b);
    mode = m; nv = 8'(na); nd = 8'(nb);
    dividend = W'({a, 52'b0}) << (64 - na);
    divisor  = DW'({b, 49'b0} << (64 - nb));
    run(cyc);
    // Expected iteration count from the effective bit counts.
    nq  = na - nb + (((a << (64 - na)) >= (b << (64 - nb))) ? 1 : 0);
    nqe = (nq <= 0) ? 2 : ((nq + 1) / 2) * 2;
    checks++;
    if (int'(iters) != nqe / 2 || cyc != nqe / 2 + 2) begin
      failures++;
      $display("FAIL int latency a=%h b=%h iters=%0d exp=%0d cyc=%0d", a, b, iters, nqe / 2, cyc);
    end
    qdiff = qpos - qneg;
    q  = 200'(qdiff >> (W - w));
    pn = 200'($signed(rem_sum + rem_carry));
    r  = (pn <<< (nb - 1)) >>> 114;
    dv = 200'(b);
    if (pn < 0) begin q = q - 1; r = r + dv; end
    checks++;
    if (q != 200'(a / b) || r != 200'(a % b)) begin
      failures++;
      $display("FAIL int a=%0d b=%0d q=%0d r=%0d", a, b, q, r);
    end
  endtask

  initial begin
    logic [W-1:0] v;
    logic [63:0] a, b;
    mode = DIV_LONG; dividend = '0; divisor = '0; nv = 0; nd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Directed floating-point cases.
    check_fp(DIV_QUAD, {1'b1, 115'b0}, {1'b1, 112'b0});
    check_fp(DIV_QUAD, '1, {1'b1, 112'b0});
    check_fp(DIV_QUAD, {1'b1, 115'b0}, '1);
    check_fp(DIV_QUAD, '1, '1);
    for (int i = 0; i < 300; i++) begin
      for (int j = 0; j < W; j += 32) v[j +: 32] = $urandom;
      v[W-1] = 1'b1;
      check_fp(div_mode_e'(i % 3), v, rnd_div(i % 7));
    end
    // Integer divides.
    check_int(DIV_INT64, 64'd100, 64'd7);
    check_int(DIV_INT64, 64'd5, 64'd9);
    check_int(DIV_INT64, 64'd9, 64'd9);
    check_int(DIV_INT64, '1, 64'd1);
    check_int(DIV_INT32, 64'hFFFF_FFFF, 64'd3);
    for (int i = 0; i < 300; i++) begin
      a = {$urandom, $urandom} >> ($urandom % 64);
      b = {$urandom, $urandom} >> ($urandom % 64);
      if (a == 0) a = 1;
      if (b == 0) b = 3;
      if (i % 2 == 0) begin
        a = a & 64'hFFFF_FFFF; b = b & 64'hFFFF_FFFF;
        if (a == 0) a = 77;
        if (b == 0) b = 5;
        check_int(DIV_INT32, a, b);
      end else check_int(DIV_INT64, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
