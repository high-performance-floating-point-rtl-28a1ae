// Self-checking testbench of the alignment shift amount.
//
// A denormalized operand has exponent field 0 and counts with exponent 1.
// The result must equal E_A + E_B - E_C + 59 + 2 - 1023 with those effective
// exponents, for random exponents and every combination of denormal flags.
module shift_amount_tb;
  logic [10:0] ea, eb, ec;
  logic a_den, b_den, c_den;
  logic signed [13:0] sa;
  int checks = 0, failures = 0;

  shift_amount dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int i = 0; i < 4000; i++) begin
      {a_den, b_den, c_den} = 3'(i);
      ea = a_den ? 11'd0 : 11'(1 + $urandom % 2046);
      eb = b_den ? 11'd0 : 11'(1 + $urandom % 2046);
      ec = c_den ? 11'd0 : 11'(1 + $urandom % 2046);
      #1;
      r = (a_den ? 1 : int'(ea)) + (b_den ? 1 : int'(eb)) - (c_den ? 1 : int'(ec)) + 61 - 1023;
      checks++;
      if (int'(sa) != r) begin
        failures++;
        if (failures < 10) $display("FAIL ea=%0d eb=%0d ec=%0d den=%b%b%b sa=%0d ref=%0d", ea, eb, ec, a_den, b_den, c_den, sa, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
