// Self-checking testbench of the QPOS/QNEG quotient register.
//
// Writes random digit sequences from random (even) start pointers and
// compares QPOS - QNEG with the quotient accumulated here as an integer,
// sum of q_i * 4^(position). Also checks that clear empties both registers.
module srt_quotient_reg_tb;
  import fpu_pkg::*;
  localparam int W = 116;

  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [6:0] ptr;
  qdigit_t q;
  logic [W-1:0] qpos, qneg;
  int checks = 0, failures = 0;

  srt_quotient_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expd;
    int qv, p0;
    ptr = 0; q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (qpos != 0 || qneg != 0) begin failures++; $display("FAIL clear"); end
      p0 = 2 * ($urandom % 58);
      expd = '0;
      we = 1;
      for (int p = p0; p < W; p += 2) begin
        qv = int'($urandom % 7) - 3;
        q.neg = qv < 0;
        q.one = (qv % 2) != 0;
        q.two = (qv >= 2) || (qv <= -2);
        ptr = 7'(p);
        expd = expd + W'(qv) * (W'(1) << (W - 2 - p));
        @(negedge clk);
      end
      we = 0;
      checks++;
      if (qpos - qneg != expd) begin
        failures++;
        $display("FAIL t=%0d start=%0d", t, p0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
