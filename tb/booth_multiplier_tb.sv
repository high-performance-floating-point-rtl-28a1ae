// Self-checking testbench of the Booth multiplier with denormal correction.
//
// For random fractions and all four combinations of the real implied bits,
// the eight output vectors must add up (modulo 2^116) to X*Y placed with 4
// guard bits, where X and Y carry their real implied bits. The bit at the
// implied position of the inputs is randomised too; it must not matter.
module booth_multiplier_tb;
  localparam int N = 56, W = 116, G = 4;
  logic [N-1:0] x, y;
  logic x_imp, y_imp;
  logic [W-1:0] pp_out [8];
  int checks = 0, failures = 0;

  booth_multiplier dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] acc, ref_p;
    logic [N-1:0] xr, yr;
    for (int i = 0; i < 4000; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (i % 7 == 0) x[N-2:N-9] = '0;
      if (i % 5 == 0) y[N-2:N-9] = '1;
      {x_imp, y_imp} = 2'(i);
      #1;
      acc = '0;
      for (int k = 0; k < 8; k++) acc += pp_out[k];
      xr = {x_imp, x[N-2:0]};
      yr = {y_imp, y[N-2:0]};
      ref_p = W'(xr) * W'(yr);
      ref_p = ref_p << G;
      checks++;
      if (acc !== ref_p) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h imp=%b%b sum=%h ref=%h", x, y, x_imp, y_imp, acc, ref_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
