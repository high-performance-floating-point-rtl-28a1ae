// Self-checking testbench of the reduced carry-save subtractor.
//
// A random sum part, random sparse carries (of the alignment opposite to the
// one under test) and random multiples are applied; the value of the result,
// sum part plus carries at their weights, must equal
// 4 * (sum + carries) + m1 + m2 + inv1 + inv2 modulo 2^116, computed here with
// plain vector arithmetic. Chains of iterations alternate the phase as the
// divider does.
module srt_subtractor_tb;
  localparam int W = 116, NC = 28;

  logic phase;
  logic [W-1:0] ps, m1, m2, ps_next;
  logic [NC-1:0] pc, pc_next;
  logic inv1, inv2;
  int checks = 0, failures = 0;

  srt_subtractor dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expand(logic [NC-1:0] c, logic ph);
    logic [W-1:0] v = '0;
    for (int k = 0; k < NC; k++) begin
      if (!ph) begin if (4 * k + 4 < W) v[4 * k + 4] = c[k]; end
      else v[(k == 0) ? 2 : 4 * k + 2] = c[k];
    end
    return v;
  endfunction

  initial begin
    logic [W-1:0] expd, got;
    ps = '0; pc = '0; phase = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 16 == 0) begin
        for (int j = 0; j < W; j += 32) ps[j +: 32] = $urandom;
        pc = NC'({$urandom});
        if (i % 32 == 0) pc = '0;
        phase = 1'($urandom);
        if (!phase) pc[NC-1] = 1'b0;   // phase-0 alignment has only 27 groups
      end
      for (int j = 0; j < W; j += 32) begin m1[j +: 32] = $urandom; m2[j +: 32] = $urandom; end
      inv1 = 1'($urandom); inv2 = 1'($urandom);
      if (i % 5 == 0) begin m1 = '1; m2 = '1; ps = '1; inv1 = 1; inv2 = 1; end
      #1;
      expd = ((ps + expand(pc, !phase)) << 2) + m1 + m2 + W'(inv1) + W'(inv2);
      got  = ps_next + expand(pc_next, phase);
      checks++;
      if (got != expd) begin
        failures++;
        $display("FAIL i=%0d phase=%0d", i, phase);
      end
      // Next iteration uses the result, with the other alignment.
      ps = ps_next; pc = pc_next; phase = !phase;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
