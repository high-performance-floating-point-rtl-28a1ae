// Self-checking testbench of the 3:2 counter tree.
//
// Two instances as used in the multiply-add dataflow: 29 vectors in four
// levels (must leave 7) and 8 vectors in four levels (must leave 2). The sum
// of the outputs must equal the sum of the inputs modulo 2^W and the outputs
// beyond the remaining count must be zero.
module csa_tree_tb;
  localparam int W = 116;
  logic [W-1:0] din29 [29], dout29 [29];
  logic [W-1:0] din8 [8], dout8 [8];
  int checks = 0, failures = 0;

  csa_tree #(.W(W), .N(29), .LEVELS(4)) u29 (.din(din29), .dout(dout29));
  csa_tree #(.W(W), .N(8),  .LEVELS(4)) u8  (.din(din8),  .dout(dout8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd(int i);
    logic [W-1:0] v = {$urandom, $urandom, $urandom, $urandom};
    if (i % 11 == 0) v = '1;
    return v;
  endfunction

  initial begin
    logic [W-1:0] s_in, s_out;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 29; i++) din29[i] = rnd(t + i);
      for (int i = 0; i < 8; i++)  din8[i]  = rnd(t * 3 + i);
      #1;
      s_in = '0; s_out = '0;
      for (int i = 0; i < 29; i++) begin s_in += din29[i]; s_out += dout29[i]; end
      checks++;
      if (s_in !== s_out) begin failures++; $display("FAIL 29-input sum"); end
      checks++;
      for (int i = 7; i < 29; i++) if (dout29[i] != '0) begin failures++; $display("FAIL 29-input out %0d", i); break; end
      s_in = '0; s_out = '0;
      for (int i = 0; i < 8; i++) begin s_in += din8[i]; s_out += dout8[i]; end
      checks++;
      if (s_in !== s_out) begin failures++; $display("FAIL 8-input sum"); end
      checks++;
      for (int i = 2; i < 8; i++) if (dout8[i] != '0) begin failures++; $display("FAIL 8-input out %0d", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
