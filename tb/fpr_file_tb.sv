// Self-checking testbench of the register file with wrap registers.
//
// Keeps a reference copy of all registers and of the loads in flight. Random
// result writes and loads are issued (never both leaving at the same cycle);
// every cycle all three read ports read random addresses and must return the
// newest value: the youngest load in flight for that register, else the
// stored one. It also checks that a load reaches the array exactly when it
// leaves the fifth wrap register and counts bypassed reads.
module fpr_file_tb;
  localparam int NREG = 20, AW = 5;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] raddr [3];
  logic [63:0] rdata [3];
  logic [2:0] rbypass;
  logic load_valid, wr_en;
  logic [AW-1:0] load_addr, wr_addr;
  logic [63:0] load_data, wr_data;
  int checks = 0, failures = 0, bypasses = 0;

  fpr_file dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] ref_regs [NREG];
  logic        fv [5];
  logic [AW-1:0] fa [5];
  logic [63:0] fd [5];

  function automatic logic [63:0] expect_read(logic [AW-1:0] ad);
    logic [63:0] v = ref_regs[ad];
    for (int i = 4; i >= 0; i--) if (fv[i] && fa[i] == ad) v = fd[i];
    return v;
  endfunction

  initial begin
    load_valid = 0; wr_en = 0; load_addr = 0; wr_addr = 0; load_data = 0; wr_data = 0;
    for (int p = 0; p < 3; p++) raddr[p] = 0;
    for (int i = 0; i < NREG; i++) ref_regs[i] = '0;
    for (int i = 0; i < 5; i++) begin fv[i] = 0; fa[i] = 0; fd[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // Drive a cycle.
      load_valid = ($urandom % 3) == 0;
      load_addr  = AW'($urandom % NREG);
      load_data  = {$urandom, $urandom};
      wr_en      = !fv[4] && (($urandom % 2) == 0);
      wr_addr    = AW'($urandom % NREG);
      wr_data    = {$urandom, $urandom};
      for (int p = 0; p < 3; p++) begin
        raddr[p] = (t % 4 == 0 && fv[t % 5]) ? fa[t % 5] : AW'($urandom % NREG);
      end
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] != expect_read(raddr[p])) begin
          failures++;
          $display("FAIL t=%0d port %0d addr %0d", t, p, raddr[p]);
        end
        if (rbypass[p]) bypasses++;
      end
      @(posedge clk);
      // Reference update.
      if (fv[4]) ref_regs[fa[4]] = fd[4];
      else if (wr_en) ref_regs[wr_addr] = wr_data;
      for (int i = 4; i > 0; i--) begin fv[i] = fv[i-1]; fa[i] = fa[i-1]; fd[i] = fd[i-1]; end
      fv[0] = load_valid; fa[0] = load_addr; fd[0] = load_data;
      @(negedge clk);
    end
    checks++;
    if (bypasses == 0) begin failures++; $display("FAIL no bypass seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
