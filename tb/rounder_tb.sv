// Self-checking testbench of the rounder.
//
// For random significands, every format and every rounding mode the result
// is compared with a reference that rounds by comparing the discarded part
// with half an ulp (a different method from the guard/sticky logic of the
// block). Includes all-ones significands, which carry out.
module rounder_tb;
  localparam int W = 116;

  logic [W-1:0] din, dout;
  logic sticky_in, sign, hex, carry, inexact, incr;
  logic [1:0] fmt, rmode;
  int checks = 0, failures = 0;

  rounder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    logic [W:0] rest, half, kept, e;
    logic up, inx;
    for (int i = 0; i < 6000; i++) begin
      for (int j = 0; j < W; j += 32) din[j +: 32] = $urandom;
      if (i % 10 == 0) din = '1;
      din[W-1] = 1'b1;
      sticky_in = 1'($urandom);
      sign = 1'($urandom);
      hex = 1'($urandom);
      fmt = 2'($urandom % 3);
      rmode = 2'($urandom);
      #1;
      p = hex ? (fmt == 0 ? 24 : fmt == 1 ? 56 : 112) : (fmt == 0 ? 24 : fmt == 1 ? 53 : 113);
      kept = {1'b0, din} >> (W - p);
      rest = {1'b0, din} & ~({1'b1, {W{1'b1}}} << (W - p));
      half = (W+1)'(1) << (W - p - 1);
      inx  = (rest != 0) || sticky_in;
      if (hex || rmode == 1) up = 0;
      else if (rmode == 0) up = (rest > half) || (rest == half && (sticky_in || kept[0]));
      else if (rmode == 2) up = !sign && inx;
      else up = sign && inx;
      e = (kept + (W+1)'(up)) << (W - p);
      checks++;
      if ({carry, carry ? (W)'(0) : dout} != (e[W] ? {1'b1, (W)'(0)} : e) ||
          (carry && dout != {1'b1, (W-1)'(0)}) || inexact != inx) begin
        failures++;
        $display("FAIL i=%0d p=%0d rmode=%0d", i, p, rmode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
