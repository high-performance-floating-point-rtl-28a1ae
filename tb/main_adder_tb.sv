// Self-checking testbench of the true/complement main adder.
//
// Random and structured operands (long runs of zeros and ones, equal
// operands, results with their leading one in every block) are applied in
// add and subtract mode. The sum, the sign of a subtraction (|a - b| must be
// returned) and the leading zero count are compared with values computed
// here by plain arithmetic and a bit scan.
module main_adder_tb;
  localparam int W = 116;

  logic [W-1:0] a, b, sum;
  logic sub, cout, neg;
  logic [6:0] lzc;
  int checks = 0, failures = 0;

  main_adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz(logic [W-1:0] v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return W - 1 - i;
    return W;
  endfunction

  task automatic check;
    logic [W:0] e;
    logic en;
    #1;
    if (sub) begin
      en = b > a;
      e  = en ? {1'b0, b - a} : {1'b0, a - b};
    end else begin
      en = 0;
      e  = {1'b0, a} + {1'b0, b};
    end
    checks++;
    if (sum != e[W-1:0] || neg != en || (!sub && cout != e[W]) || int'(lzc) != lz(e[W-1:0])) begin
      failures++;
      $display("FAIL sub=%0d a=%h b=%h sum=%h lzc=%0d exp lzc=%0d", sub, a, b, sum, lzc, lz(e[W-1:0]));
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int j = 0; j < W; j += 32) begin a[j +: 32] = $urandom; b[j +: 32] = $urandom; end
      sub = 1'($urandom);
      case (i % 5)
        1: begin b = a ^ (W'(1) << ($urandom % W)); end             // near-cancellation
        2: begin a = a >> ($urandom % W); b = b >> ($urandom % W); end
        3: begin b = a; end
        4: begin a = '1 >> ($urandom % W); b = W'(1) << ($urandom % 8); end
        default: ;
      endcase
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
