// Self-checking testbench of the divisor multiple generator.
//
// For random divisors and every digit -3..+3 it adds the two returned
// multiples and their hot ones modulo 2^116 and compares the sum with
// -q * D placed with weight 1 at bit 114, computed here with ordinary
// integer arithmetic.
module srt_multiple_tb;
  import fpu_pkg::*;

  localparam int W = 116, DW = 113;
  logic [DW-1:0] d;
  qdigit_t q;
  logic [W-1:0] m1, m2;
  logic inv1, inv2;
  int checks = 0, failures = 0;

  srt_multiple dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] got, expd;
    int qv;
    for (int i = 0; i < 200; i++) begin
      for (int j = 0; j < DW; j += 32) d[j +: 32] = $urandom;
      d[DW-1] = 1'b1;
      for (qv = -3; qv <= 3; qv++) begin
        q.neg = qv < 0;
        q.one = (qv == 1) || (qv == 3) || (qv == -1) || (qv == -3);
        q.two = (qv >= 2) || (qv <= -2);
        #1;
        got  = m1 + m2 + W'(inv1) + W'(inv2);
        expd = W'(-(qv * $signed({1'b0, W'(d) << 2})));
        checks++;
        if (got != expd) begin
          failures++;
          $display("FAIL q=%0d d=%h", qv, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
