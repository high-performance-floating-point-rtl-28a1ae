// End-to-end testbench of the FPU at full size: divide and multiply-add.
//
// Part 1, divide:
// Loads random binary long (double precision) operands through the fetch bus
// into the register file, divides them, and compares the rounded result
// (round to nearest even) with the simulator's own double precision division,
// bit for bit, plus the inexact flag and the register the result was written
// to. Operands are sometimes read while their load is still in the wrap
// registers, loads are timed so that write-back has to wait for the shared
// write port, and special operands must raise exc. The testbench counts how
// often each mechanism occurred (wrap bypass, array read, negative final
// remainder corrected, normalization shift, rounding increment, write-back
// stall, exception) and fails if one never did. It also checks the fixed
// latency of a divide: 1 (read) + 1 (start) + 30 (divide macro: load and 28
// loops, done) + 6 (remainder, quotient, correction, normalize, round,
// write) cycles.
//
// Part 2, multiply-add: a random stream mixing loads and FMA requests (one
// issue per cycle, back to back) reads its operands from the register file,
// partly from loads still in the wrap registers; each result is compared with
// the simulator's double arithmetic (factors with at most 26 significant bits
// so that the product is exact and A*B +- C is rounded once), must appear
// exactly 6 cycles after issue and must be in its target register. A divide
// started in the middle of the stream has to wait for the write port. Counted
// mechanisms: FMA issued, FMA not taken because of a load or divide, operand
// bypass, denormal factor, 60-bit high-sum shift, complement result, divide
// write-back stalled by an FMA write.
module fpu_top_tb;
  logic clk = 0, rst_n = 0;
  logic load_valid, div_valid;
  logic [4:0] load_addr, ra, rb, rt;
  logic [63:0] fetch_bus, fpu_result;
  logic [1:0] rmode;
  logic busy, result_valid, exc, inexact;
  logic [2:0] rd_bypass;
  logic fma_valid, fma_sub, fma_taken, fma_valid_out, fma_exc, fma_inexact;
  logic [4:0] rc;
  logic [63:0] fma_result;
  int checks = 0, failures = 0;
  int n_fma = 0, n_notaken = 0, n_fbypass = 0, n_fden = 0, n_fsh60 = 0, n_fcmpl = 0, n_fstall = 0, n_sdiv = 0;
  int cycle = 0;
  int n_bypass = 0, n_array = 0, n_remneg = 0, n_shift = 0, n_round = 0, n_stall = 0, n_exc = 0;

  fpu_top dut (.*);
  always #5 clk = ~clk;

  localparam int LATENCY = 38;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors.
  always @(posedge clk) begin
    if (dut.st == dut.T_CORR && dut.rem_neg) n_remneg++;
    if (dut.st == dut.T_NORM && dut.shamt != 0) n_shift++;
    if (dut.st == dut.T_ROUND && dut.rnd_incr) n_round++;
    if (dut.st == dut.T_WB && !dut.bad_q && dut.load_hist[4]) n_stall++;
    if (dut.st == dut.T_WB && !dut.bad_q && dut.e5_valid) n_fstall++;
    if (dut.st == dut.T_WB && fma_taken) begin
      failures++;
      $display("FAIL FMA issued while a divide waits for the write port");
    end
    if (dut.u_fma.v1 && (dut.u_fma.a0.exp == 0 || dut.u_fma.b0.exp == 0)) n_fden++;
    if (dut.u_fma.v3 && dut.u_fma.sh60) n_fsh60++;
    if (dut.u_fma.v3 && dut.u_fma.sub2 && dut.u_fma.add_neg) n_fcmpl++;
    cycle <= cycle + 1;
  end

  // Multiply-add result checker.
  typedef struct {
    logic [63:0] expv;
    bit          want_exc;
    bit          may_exc;
    logic [4:0]  rt;
    int          issued;
  } fexp_t;
  fexp_t fq [$];

  always @(negedge clk) begin
    if (fma_valid_out) begin
      fexp_t e;
      checks++;
      if (fq.size() == 0) begin
        failures++;
        $display("FAIL unexpected FMA result");
      end else begin
        e = fq.pop_front();
        if (cycle - e.issued != 6) begin
          failures++;
          $display("FAIL FMA latency %0d", cycle - e.issued);
        end else if (e.may_exc && fma_exc) begin
          // accepted
        end else if (e.want_exc ? !fma_exc : (fma_exc || fma_result != e.expv ||
                                               dut.u_fpr.regs[e.rt] != e.expv)) begin
          failures++;
          $display("FAIL FMA result %h exc=%0d expected %h exc=%0d reg=%h", fma_result, fma_exc,
                   e.expv, e.want_exc, dut.u_fpr.regs[e.rt]);
        end
      end
    end
  end

  function automatic logic [63:0] rnd_double(bit special);
    logic [63:0] v = {$urandom, $urandom};
    v[62:52] = 11'(900 + $urandom % 240);
    if (special) v[62:52] = ($urandom % 2) ? 11'h7FF : 11'h000;
    return v;
  endfunction

  task automatic load(logic [4:0] ad, logic [63:0] d);
    load_valid = 1; load_addr = ad; fetch_bus = d;
    @(negedge clk);
    load_valid = 0;
  endtask

  task automatic divide(logic [4:0] a_r, logic [4:0] b_r, logic [4:0] t_r,
                        logic [63:0] av, logic [63:0] bv, bit late_load);
    int cyc;
    bit special;
    logic [63:0] expv;
    real q;
    ra = a_r; rb = b_r; rt = t_r; rmode = 0; div_valid = 1;
    #1;
    if (rd_bypass[0]) n_bypass++; else n_array++;
    if (rd_bypass[1]) n_bypass++; else n_array++;
    @(negedge clk);
    div_valid = 0;
    cyc = 1;
    special = (av[62:52] == 0) || (av[62:52] == 11'h7FF) || (bv[62:52] == 0) || (bv[62:52] == 11'h7FF);
    while (!result_valid) begin
      // A load timed to leave the wrap registers at write-back.
      if (late_load && cyc == LATENCY - 6) load(5'd19, 64'h0123_4567_89ab_cdef);
      else @(negedge clk);
      cyc++;
    end
    q = $bitstoreal(av) / $bitstoreal(bv);
    expv = $realtobits(q);
    checks++;
    if (special) begin
      n_exc++;
      if (!exc) begin failures++; $display("FAIL special operand without exc"); end
    end else if (exc || fpu_result != expv) begin
      failures++;
      $display("FAIL %h / %h = %h expected %h exc=%0d ra=%0d rb=%0d", av, bv, fpu_result, expv, exc, a_r, b_r);
    end else begin
      checks++;
      if (inexact != ($bitstoreal(expv) * $bitstoreal(bv) != $bitstoreal(av))) begin
        // inexact must be set whenever the product does not give back a exactly
        if (inexact == 0) begin failures++; $display("FAIL inexact flag"); end
      end
      checks++;
      if (!late_load && cyc != LATENCY) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cyc, LATENCY);
      end
      @(negedge clk);
      checks++;
      if (dut.u_fpr.regs[t_r] != expv) begin
        failures++;
        $display("FAIL register %0d not written", t_r);
      end
    end
  endtask

  // Operand with at most 26 significant bits; sometimes denormalized or large.
  function automatic logic [63:0] short_double(int i);
    logic [63:0] v = {$urandom, $urandom};
    v[26:0] = '0;
    v[62:52] = 11'(1023 + int'($urandom % 120) - 60);
    if (i % 11 == 3) v[62:52] = 11'd0;
    if (i % 11 == 5) v[62:52] = 11'(1023 + 960 + $urandom % 40);
    return v;
  endfunction

  task automatic fma_stream();
    logic [63:0] mreg [16];
    logic [63:0] dva, dvb, dexp;
    bit div_pending = 0;
    for (int r = 0; r < 16; r++) begin
      mreg[r] = short_double(r);
      load(5'(r), mreg[r]);
    end
    repeat (6) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      load_valid = 0; fma_valid = 0; div_valid = 0;
      if ($urandom % 5 == 0) begin
        load_valid = 1;
        load_addr = 5'($urandom % 16);
        fetch_bus = short_double($urandom);
        mreg[load_addr] = fetch_bus;
      end
      fma_valid = 1;
      ra = 5'($urandom % 16); rb = 5'($urandom % 16); rc = 5'($urandom % 16);
      rt = 5'(16 + $urandom % 3);
      fma_sub = 1'($urandom);
      rmode = 0;
      if (i % 500 == 250 && !busy) begin      // divide in the middle of the stream
        div_valid = 1;
        rt = 5'd19;
        dva = mreg[ra]; dvb = mreg[rb];
        div_pending = 1;
      end
      #1;
      if (fma_taken) begin
        fexp_t e;
        real r;
        n_fma++;
        if (rd_bypass != 0) n_fbypass++;
        r = $bitstoreal(mreg[ra]) * $bitstoreal(mreg[rb]);
        r = fma_sub ? r - $bitstoreal(mreg[rc]) : r + $bitstoreal(mreg[rc]);
        e.expv = $realtobits(r);
        e.want_exc = e.expv[62:52] == 11'h7FF;
        // A denormal result may raise exc only when the product is below
        // the dataflow's reach.
        e.may_exc  = (e.expv[62:52] == 0 && e.expv[51:0] != 0) &&
                     ($bitstoreal(mreg[ra]) * $bitstoreal(mreg[rb]) < 2.0 ** -1021) &&
                     ($bitstoreal(mreg[ra]) * $bitstoreal(mreg[rb]) > -(2.0 ** -1021));
        e.rt = rt;
        e.issued = cycle;
        fq.push_back(e);
      end else n_notaken++;
      @(negedge clk);
      if (result_valid && div_pending) begin
        div_pending = 0;
        dexp = $realtobits($bitstoreal(dva) / $bitstoreal(dvb));
        checks++;
        n_sdiv++;
        if ((dva[62:52] != 0 && dvb[62:52] != 0 && !exc && fpu_result != dexp) ||
            ((dva[62:52] == 0 || dvb[62:52] == 0) && !exc)) begin
          failures++;
          $display("FAIL divide in FMA stream %h expected %h", fpu_result, dexp);
        end
      end
    end
    load_valid = 0; fma_valid = 0; div_valid = 0;
    repeat (50) begin
      @(negedge clk);
      if (result_valid && div_pending) div_pending = 0;
    end
    checks++;
    if (fq.size() != 0) begin failures++; $display("FAIL FMA results missing"); end
  endtask

  initial begin
    logic [63:0] av, bv;
    load_valid = 0; div_valid = 0; load_addr = 0; fetch_bus = 0;
    fma_valid = 0; fma_sub = 0; rc = 0;
    ra = 0; rb = 0; rt = 0; rmode = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Directed: exact quotients and a quotient that rounds.
    load(5'd1, $realtobits(10.0));
    load(5'd2, $realtobits(4.0));
    repeat (6) @(negedge clk);
    divide(5'd1, 5'd2, 5'd3, $realtobits(10.0), $realtobits(4.0), 0);
    load(5'd4, $realtobits(1.0));
    load(5'd5, $realtobits(3.0));
    divide(5'd4, 5'd5, 5'd6, $realtobits(1.0), $realtobits(3.0), 0);   // read from wrap registers
    for (int i = 0; i < 200; i++) begin
      bit sp;
      sp = (i % 25) == 7;
      av = rnd_double(sp);
      bv = rnd_double(0);
      load(5'(i % 16), av);
      load(5'((i + 5) % 16), bv);
      if (i % 3 == 0) repeat (6) @(negedge clk);   // operands from the array
      divide(5'(i % 16), 5'((i + 5) % 16), 5'((i + 9) % 16), av, bv, (i % 10) == 4);
    end
    fma_stream();
    $display("mechanisms: bypass=%0d array=%0d remneg=%0d shift=%0d round=%0d stall=%0d exc=%0d",
             n_bypass, n_array, n_remneg, n_shift, n_round, n_stall, n_exc);
    $display("fma: issued=%0d not_taken=%0d bypass=%0d denormal=%0d shift60=%0d complement=%0d div_stall=%0d divides=%0d",
             n_fma, n_notaken, n_fbypass, n_fden, n_fsh60, n_fcmpl, n_fstall, n_sdiv);
    checks++;
    if (n_bypass == 0 || n_array == 0 || n_remneg == 0 || n_shift == 0 || n_round == 0 ||
        n_stall == 0 || n_exc == 0 || n_fma == 0 || n_notaken == 0 || n_fbypass == 0 ||
        n_fden == 0 || n_fsh60 == 0 || n_fcmpl == 0 || n_fstall == 0 || n_sdiv == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
