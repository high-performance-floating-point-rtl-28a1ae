// Floating-point register file with load wrap registers.
//
// 25 entries of 64 bits: 16 architected registers, 4 work registers and
// 5 wrap registers. Three operands are read per cycle and one register is
// written (3R1W). Loads do not write the array directly: load data enters the
// first wrap register and moves one wrap register further each cycle, in step
// with the five-stage pipeline, and is written into its target register when
// it leaves the last one. While it travels, a read of its target register is
// served from the youngest wrap register holding it, so a dependent
// instruction never waits for the load to retire. The bypass is kept local to
// the register file instead of running across the dataflow.
//
// Register addresses 0..15 are architected, 16..19 work registers. The
// single write port is shared: a load leaving the wrap chain and a result
// write must not coincide (checked by an assertion); the pipeline that feeds
// this file issues one operation per cycle, so they never do. Reads are
// combinational; writes take effect at the next rising edge. Reset clears all
// registers. The shared write port and the bypass priority are this design's
// choices.
module fpr_file #(
  parameter int unsigned NREG  = 20,   // architected + work registers
  parameter int unsigned NWRAP = 5,    // wrap registers
  parameter int unsigned XLEN  = 64,
  parameter int unsigned NRD   = 3,    // read ports
  parameter int unsigned AW    = $clog2(NREG)
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW-1:0]       raddr [NRD],
  output logic [XLEN-1:0]     rdata [NRD],
  output logic [NRD-1:0]      rbypass,     // read was served by a wrap register
  input  logic                load_valid,  // load data enters the wrap chain
  input  logic [AW-1:0]       load_addr,
  input  logic [XLEN-1:0]     load_data,
  input  logic                wr_en,       // result write
  input  logic [AW-1:0]       wr_addr,
  input  logic [XLEN-1:0]     wr_data
);

  typedef struct packed {
    logic            valid;
    logic [AW-1:0]   addr;
    logic [XLEN-1:0] data;
  } wrap_t;

  logic [XLEN-1:0] regs [NREG];
  wrap_t           wrap [NWRAP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
      for (int i = 0; i < NWRAP; i++) wrap[i] <= '0;
    end else begin
      wrap[0] <= '{valid: load_valid, addr: load_addr, data: load_data};
      for (int i = 1; i < NWRAP; i++) wrap[i] <= wrap[i-1];
      if (wrap[NWRAP-1].valid)
        regs[wrap[NWRAP-1].addr] <= wrap[NWRAP-1].data;
      else if (wr_en)
        regs[wr_addr] <= wr_data;
    end
  end

  // Reads: youngest matching wrap register first, then the array.
  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rdata[p]   = regs[raddr[p]];
      rbypass[p] = 1'b0;
      for (int i = NWRAP - 1; i >= 0; i--) begin
        if (wrap[i].valid && wrap[i].addr == raddr[p]) begin
          rdata[p]   = wrap[i].data;
          rbypass[p] = 1'b1;
        end
      end
    end
  end

  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(wrap[NWRAP-1].valid && wr_en));

endmodule
