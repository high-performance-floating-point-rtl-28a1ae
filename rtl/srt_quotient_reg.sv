// Quotient register of the radix-4 SRT divider.
//
// Two 116-bit registers, QPOS and QNEG, collect the quotient digits without
// any carry propagation: the magnitude (0..3, two bits) of a positive digit is
// written into QPOS, that of a negative digit into QNEG, at the two-bit slot
// the pointer selects. The quotient is QPOS - QNEG; the subtraction is done
// later by the main adder of the floating-point dataflow.
//
// The pointer counts bit positions from the most significant end: pointer p
// writes bits W-1-p and W-2-p. clear empties both registers (one cycle,
// before the first digit). A write takes effect at the next rising clock edge.
//
// QPOS/QNEG and the pointer follow the original design; storing 2-bit
// digit magnitudes is this design's choice.
module srt_quotient_reg
  import fpu_pkg::*;
#(
  parameter int unsigned W = DIV_W,
  parameter int unsigned PW = $clog2(W)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,    // empty both registers
  input  logic          we,       // write digit q at pointer ptr
  input  logic [PW-1:0] ptr,      // even bit position from the MSB
  input  qdigit_t       q,
  output logic [W-1:0]  qpos,
  output logic [W-1:0]  qneg
);

  logic [1:0] mag;
  assign mag = {q.two, q.one};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qpos <= '0;
      qneg <= '0;
    end else if (clear) begin
      qpos <= '0;
      qneg <= '0;
    end else if (we && (32'(ptr) + 1 < W)) begin
      if (q.neg) qneg[W-2-32'(ptr) +: 2] <= mag;
      else       qpos[W-2-32'(ptr) +: 2] <= mag;
    end
  end

endmodule
