// Self-checking testbench of the normalizer.
//
// Random values with a known number of leading zeros are shifted by their
// count; a binary result must have its leading one at the top bit, a hex
// result a non-zero leading hex digit, and the value must equal the input
// times 2^shift.
module normalizer_tb;
  localparam int W = 116;

  logic [W-1:0] din, dout;
  logic [6:0] lzc, shamt;
  logic hex;
  int checks = 0, failures = 0;

  normalizer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z, s;
    for (int i = 0; i < 2000; i++) begin
      z = $urandom % W;
      for (int j = 0; j < W; j += 32) din[j +: 32] = $urandom;
      din = (din | {1'b1, (W-1)'(0)}) >> z;
      lzc = 7'(z);
      hex = 1'($urandom);
      #1;
      s = hex ? (z / 4) * 4 : z;
      checks++;
      if (dout != (din << s) || int'(shamt) != s ||
          (hex ? (dout[W-1:W-4] == 0) : !dout[W-1])) begin
        failures++;
        $display("FAIL z=%0d hex=%0d", z, hex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
