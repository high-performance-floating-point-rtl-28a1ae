// Self-checking testbench of the addend aligner.
//
// Reference: bit i of C lands on dataflow bit 120 + i - SA of the 176-bit
// dataflow (SA clamped at 0); bits that would land below bit 0 only set the
// sticky bit. Shift amounts cover negative values, every in-range value and
// values far beyond the dataflow.
module aligner_tb;
  logic [55:0] c;
  logic signed [13:0] sa;
  logic [59:0] his;
  logic [115:0] low;
  logic sticky;
  int checks = 0, failures = 0;

  aligner dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [175:0] r;
    bit rs;
    int s, p;
    for (int i = 0; i < 3000; i++) begin
      c = {$urandom, $urandom};
      if (i % 4 == 0) c[20:0] = '0;
      sa = (i < 400) ? 14'(i - 100) : 14'($urandom % 600) - 14'sd200;
      #1;
      s = (sa < 0) ? 0 : int'(sa);
      r = '0; rs = 0;
      for (int k = 0; k < 56; k++) begin
        p = 120 + k - s;
        if (p >= 0) r[p] = c[k];
        else if (c[k]) rs = 1;
      end
      checks++;
      if ({his, low} !== r || sticky !== rs) begin
        failures++;
        if (failures < 10) $display("FAIL c=%h sa=%0d got %h %h %b", c, sa, his, low, sticky);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
