// Self-checking testbench of the SRT digit table.
//
// For every one of the 32 x 4 cells it checks the selection rule the table
// exists for: for all remainder values the cell can stand for (the 5-bit
// estimate up to one unit of its last place too small) and all divisors of
// the column, the next remainder 4P - qD stays within [-D, +D]. Points that
// the bounded recurrence can not reach (|4P| >= 4D) are skipped. A few cells
// are also compared with the printed table directly.
module srt_table_tb;
  import fpu_pkg::*;

  logic [4:0] p_est;
  logic [1:0] d_est;
  qdigit_t q;
  int checks = 0, failures = 0;

  srt_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cell(logic [4:0] p, logic [1:0] d, int qv);
    p_est = p; d_est = d; #1;
    checks++;
    if (digit_value(q) != qv) begin
      failures++;
      $display("FAIL cell p=%b d=%b q=%0d expected %0d", p, d, digit_value(q), qv);
    end
  endtask

  initial begin
    real pv, dv, pr, nx;
    int qv;
    bit bad;
    for (int r = 0; r < 32; r++) begin
      for (int c = 0; c < 4; c++) begin
        p_est = 5'(r); d_est = 2'(c); #1;
        qv = digit_value(q);
        pv = $itor($signed(5'(r))) / 2.0;
        bad = 0;
        for (int i = 0; i <= 20; i++) begin
          for (int j = 0; j <= 20; j++) begin
            dv = 1.0 + c * 0.25 + 0.2499 * i / 20.0;
            pr = pv + 0.4999 * j / 20.0;
            if (pr >= 4.0 * dv || pr < -4.0 * dv) continue;
            nx = pr - qv * dv;
            if (nx > dv || nx < -dv) bad = 1;
          end
        end
        checks++;
        if (bad) begin
          failures++;
          $display("FAIL bound p=%b d=%0d q=%0d", 5'(r), c, qv);
        end
        // Sign and magnitude encoding consistency.
        checks++;
        if (q.neg && !(q.one || q.two)) begin
          failures++;
          $display("FAIL negative zero p=%b d=%0d", 5'(r), c);
        end
      end
    end
    // Printed cells.
    expect_cell(5'b00101, 2'd0, 3);   // 0010.1, 1.00
    expect_cell(5'b00101, 2'd1, 2);   // 0010.1, 1.01
    expect_cell(5'b00100, 2'd2, 1);   // 0010.0, 1.10
    expect_cell(5'b11011, 2'd2, -1);  // 1101.1, 1.10
    expect_cell(5'b11001, 2'd0, -3);  // 1100.1, 1.00
    expect_cell(5'b10111, 2'd3, -2);  // 1011.1, 1.11
    expect_cell(5'b11110, 2'd3, 0);   // 1111.0, 1.11
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
