// Self-checking testbench of the fused multiply-add pipeline.
//
// Issues one operation every cycle (back to back) and checks every result in
// order, exactly 6 cycles after issue (operand register E0 plus five
// execution cycles). The reference is the simulator's double arithmetic:
// the factors are drawn with at most 26 significant bits so that A*B is
// exact in double precision and A*B +- C is rounded only once, exactly as a
// fused multiply-add; with C = 0 the factors are full width. Results below
// the normal range must come out denormalized (exc is accepted only when the
// product itself is below 2^-1021, out of the dataflow's reach); overflowing
// results must raise exc. Covers denormalized factors and
// addends, effective subtraction with cancellation, addends far above and
// far below the product, and counts how often each dataflow case occurred
// (denormal corrections, 60-bit high-sum shift, high-sum increment and
// borrow, complement adder selected, product reduced to sticky, addend
// reduced to sticky); a case that never occurred is a failure.
module fpu_fma_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid, op_sub, out_valid, exc, inexact, e5_valid, e5_exc;
  logic [63:0] a, b, c, result, e5_result;
  logic [1:0] rmode;
  int checks = 0, failures = 0;
  int n_aden = 0, n_cden = 0, n_sh60 = 0, n_hinc = 0, n_hborrow = 0, n_neg = 0,
      n_psticky = 0, n_csticky = 0, n_denres = 0, n_tiny = 0;

  fpu_fma dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] expv;
    bit          want_exc;
    bit          may_exc;   // denormal result with a product below the dataflow's reach
    int          issued;
    logic [63:0] a, b, c;
  } exp_t;
  exp_t q [$];
  int cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dut.v1 && (dut.a0.exp == 0 || dut.b0.exp == 0)) n_aden++;
    if (dut.v1 && dut.c0.exp == 0 && dut.c0.frac[54:0] != 0) n_cden++;
    if (dut.v3 && dut.sh60) n_sh60++;
    if (dut.v3 && !dut.sub2 && dut.add_sum[116]) n_hinc++;
    if (dut.v3 && dut.sub2 && dut.his_reg != 0 && !dut.add_neg && dut.add_sum != 0) n_hborrow++;
    if (dut.v3 && dut.sub2 && dut.add_neg) n_neg++;
    if (dut.v2 && dut.sa_reg < 0) n_psticky++;
    if (dut.v2 && dut.sa_reg > 176) n_csticky++;
  end

  // Result checker.
  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = q.pop_front();
        if (cycle - e.issued != 6) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.issued);
        end else if (e.may_exc && exc) begin
          n_tiny++;
        end else if (e.want_exc ? !exc : (exc || result != e.expv)) begin
          failures++;
          $display("FAIL %h * %h + %h -> %h exc=%0d expected %h exc=%0d",
                   e.a, e.b, e.c, result, exc, e.expv, e.want_exc);
        end
        else if (!exc && result[62:52] == 0 && result[51:0] != 0) n_denres++;
      end
    end
  end

  function automatic logic [63:0] short_mant(int e, bit den);
    logic [63:0] v = {$urandom, $urandom};
    v[26:0] = '0;                       // at most 26 significant bits
    v[62:52] = den ? 11'd0 : 11'(e);
    return v;
  endfunction

  task automatic issue(logic [63:0] av, logic [63:0] bv, logic [63:0] cv, bit sub);
    exp_t e;
    real r;
    @(negedge clk);
    in_valid = 1; a = av; b = bv; c = cv; op_sub = sub; rmode = 0;
    r = sub ? ($bitstoreal(av) * $bitstoreal(bv) - $bitstoreal(cv))
            : ($bitstoreal(av) * $bitstoreal(bv) + $bitstoreal(cv));
    e.expv = $realtobits(r);
    e.want_exc = e.expv[62:52] == 11'h7FF;
    e.may_exc  = (e.expv[62:52] == 0 && e.expv[51:0] != 0) &&
                 ($bitstoreal(av) * $bitstoreal(bv) < 2.0 ** -1021 && $bitstoreal(av) * $bitstoreal(bv) > -(2.0 ** -1021));
    e.issued = cycle;
    e.a = av; e.b = bv; e.c = cv;
    q.push_back(e);
  endtask

  initial begin
    logic [63:0] av, bv, cv;
    int ea, eb, ec;
    in_valid = 0; a = 0; b = 0; c = 0; op_sub = 0; rmode = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue($realtobits(2.0), $realtobits(3.0), $realtobits(1.0), 0);
    issue($realtobits(2.0), $realtobits(3.0), $realtobits(6.0), 1);     // exact zero
    issue($realtobits(1.5), $realtobits(1.5), $realtobits(1.0e30), 0);  // product -> sticky
    issue($realtobits(1.0e30), $realtobits(1.0), $realtobits(3.0), 1);  // addend -> sticky
    for (int i = 0; i < 6000; i++) begin
      ea = 1023 + int'($urandom % 200) - 100;
      eb = 1023 + int'($urandom % 200) - 100;
      ec = ea + eb - 1023 + int'($urandom % 140) - 70;
      if (i % 9 == 0) ec = ea + eb - 1023 + int'($urandom % 6) - 3;   // cancellation
      av = short_mant(ea, 0);
      bv = short_mant(eb, 0);
      cv = {$urandom, $urandom};
      cv[62:52] = 11'(ec);
      case (i % 13)
        3: begin av = short_mant(0, 1); bv = short_mant(2000 + $urandom % 40, 0);
                 ec = 1023 - 22 - 52 + int'($urandom % 60) - 30; cv[62:52] = 11'(ec); end
        5: begin cv = {$urandom, $urandom}; cv[62:52] = 0; ea = 1023 - 500; eb = 1023 - 520 + int'($urandom % 20);
                 av = short_mant(ea, 0); bv = short_mant(eb, 0); end
        7: begin av = {$urandom, $urandom}; bv = {$urandom, $urandom};
                 av[62:52] = 11'(ea); bv[62:52] = 11'(eb); cv = 64'(0); end
        9: begin bv = short_mant(0, 1); av = short_mant(1900 + $urandom % 100, 0);
                 cv[62:52] = 11'(1023 - 100 + int'($urandom % 60)); end
        11: begin av = short_mant(512, 0); bv = short_mant(511 + $urandom % 2, 0);   // product near 2^-1022
                  cv = {$urandom, $urandom}; cv[62:52] = 0; end
        default: ;
      endcase
      issue(av, bv, cv, 1'($urandom));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    $display("cases: den_factor=%0d den_addend=%0d shift60=%0d his_inc=%0d his_borrow=%0d cmpl=%0d p_sticky=%0d c_sticky=%0d den_result=%0d tiny_exc=%0d",
             n_aden, n_cden, n_sh60, n_hinc, n_hborrow, n_neg, n_psticky, n_csticky, n_denres, n_tiny);
    checks++;
    if (q.size() != 0 || n_aden == 0 || n_cden == 0 || n_sh60 == 0 || n_hinc == 0 ||
        n_hborrow == 0 || n_neg == 0 || n_psticky == 0 || n_csticky == 0 || n_denres == 0) begin
      failures++;
      $display("FAIL missing results or a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
