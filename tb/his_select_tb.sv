// Self-checking testbench of the high-sum incrementer and result select.
//
// Builds the exact 176-bit result from a random high-sum, product P and low
// addend part C_low (addition: his*2^116 + P + C_low; subtraction with a
// non-zero high-sum: his*2^116 + C_low - P; subtraction without: |P - C_low|)
// and feeds the module what the main adder would deliver. Expected: the
// result shifted right by 60 with the dropped bits as sticky when it needs
// more than 116 bits, the plain result otherwise, its leading zero count, and
// the sign flag (addend dominates in a subtraction).
module his_select_tb;
  logic [59:0] his;
  logic [115:0] sum, dout;
  logic cout, neg, eff_sub, shift60, sticky, flip;
  logic [6:0] add_lzc, lzc;
  int checks = 0, failures = 0;

  his_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz116(logic [115:0] v);
    for (int i = 115; i >= 0; i--) if (v[i]) return 115 - i;
    return 116;
  endfunction

  initial begin
    logic [115:0] p, cl;
    logic [116:0] t;
    logic [199:0] v;
    logic [115:0] e_dout;
    bit e_sh, e_st, e_flip;
    for (int i = 0; i < 6000; i++) begin
      p  = {$urandom, $urandom, $urandom, $urandom};
      cl = {$urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 0) p  = p >> ($urandom % 116);
      if (i % 5 == 0) cl = cl >> ($urandom % 116);
      if (i % 17 == 0) cl = p;
      his = (i % 2 == 0) ? 60'd0 : 60'({$urandom, $urandom} >> (2 + $urandom % 58));
      if (i % 7 == 1) his = 60'd1;
      eff_sub = 1'($urandom);
      if (!eff_sub) begin
        t = {1'b0, p} + {1'b0, cl};
        sum = t[115:0]; cout = t[116]; neg = 0;
        v = {his, 116'd0} + 200'(t);
        e_flip = 0;
      end else begin
        neg = cl > p;
        sum = neg ? cl - p : p - cl;
        cout = 0;
        if (his != 0) begin
          v = {his, 116'd0} + 200'(cl) - 200'(p);
          e_flip = 1;
        end else begin
          v = 200'(sum);
          e_flip = neg;
        end
      end
      add_lzc = 7'(lz116(sum));
      #1;
      e_sh = v >= (200'd1 << 116);
      e_dout = e_sh ? 116'(v >> 60) : v[115:0];
      e_st = e_sh && v[59:0] != 0;
      checks++;
      if (dout !== e_dout || shift60 !== e_sh || sticky !== e_st || int'(lzc) != lz116(e_dout) ||
          (v != 0 && flip !== e_flip)) begin
        failures++;
        if (failures < 10) $display("FAIL sub=%b his=%h p=%h cl=%h dout=%h exp=%h lzc=%0d", eff_sub, his, p, cl, dout, e_dout, lzc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
