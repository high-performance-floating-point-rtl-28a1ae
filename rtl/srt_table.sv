// Radix-4 SRT quotient digit selection table.
//
// Picks the next quotient digit q in {-3..+3} from the five most significant
// bits of the shifted partial remainder 4*P (two's complement, format
// xxxx.x, range -8.0 .. +7.5) and the two divisor bits right after the
// implied one (divisor intervals 1.00, 1.01, 1.10, 1.11).
//
// The cell contents are the printed divide table of the design, a P-D plot
// with a maximally redundant digit set. The table is asymmetric because the
// estimate comes from the sum part of a redundant remainder and can only be
// too small, never too large. Cells the table marks "don't care" can not be
// reached while the recurrence stays bounded; this design fills them with
// +3 (positive rows) and -3 (negative rows), which keeps the digit valid
// even for estimates up to one unit of the last place further off.
//
// Purely combinational. The digit sign equals the sign of the remainder
// estimate, so the divisor multiples are subtracted for a positive remainder
// and added for a negative one.
//
// The cell values are those of the original design's lookup table; filling
// its don't-care cells with +-3 is this design's choice.
module srt_table
  import fpu_pkg::*;
(
  input  logic [4:0] p_est,   // 4*P_i, bits xxxx.x
  input  logic [1:0] d_est,   // divisor bits after the implied one
  output qdigit_t    q        // selected digit
);

  // Signed digit per column, columns 1.00 / 1.01 / 1.10 / 1.11.
  typedef logic signed [2:0] sdig_t;
  sdig_t row [4];
  sdig_t qs;

  always_comb begin
    unique case (p_est)
      5'b01111, 5'b01110: row = '{3'sd3, 3'sd3, 3'sd3, 3'sd3};   // 0111.x (dc,dc,dc,+3)
      5'b01101, 5'b01100: row = '{3'sd3, 3'sd3, 3'sd3, 3'sd3};   // 0110.x (dc,dc,+3,+3)
      5'b01011, 5'b01010: row = '{3'sd3, 3'sd3, 3'sd3, 3'sd3};   // 0101.x (dc,+3,+3,+3)
      5'b01001, 5'b01000: row = '{3'sd3, 3'sd3, 3'sd3, 3'sd3};   // 0100.x
      5'b00111, 5'b00110: row = '{3'sd3, 3'sd3, 3'sd2, 3'sd2};   // 0011.x
      5'b00101:           row = '{3'sd3, 3'sd2, 3'sd2, 3'sd2};   // 0010.1
      5'b00100, 5'b00011: row = '{3'sd2, 3'sd2, 3'sd1, 3'sd1};   // 0010.0, 0001.1
      5'b00010, 5'b00001: row = '{3'sd1, 3'sd1, 3'sd1, 3'sd1};   // 0001.0, 0000.1
      5'b00000, 5'b11111,
      5'b11110:           row = '{3'sd0, 3'sd0, 3'sd0, 3'sd0};   // 0000.0, 1111.x
      5'b11101, 5'b11100: row = '{-3'sd1, -3'sd1, -3'sd1, -3'sd1}; // 1110.x
      5'b11011:           row = '{-3'sd2, -3'sd2, -3'sd1, -3'sd1}; // 1101.1
      5'b11010:           row = '{-3'sd2, -3'sd2, -3'sd2, -3'sd2}; // 1101.0
      5'b11001:           row = '{-3'sd3, -3'sd2, -3'sd2, -3'sd2}; // 1100.1
      5'b11000, 5'b10111: row = '{-3'sd3, -3'sd3, -3'sd2, -3'sd2}; // 1100.0, 1011.1
      default:            row = '{-3'sd3, -3'sd3, -3'sd3, -3'sd3}; // 1011.0 .. 1000.0
    endcase
    qs     = row[d_est];
    q.neg  = qs[2];
    q.one  = qs[0];                             // odd magnitudes 1 and 3
    q.two  = (qs == 3'sd2) || (qs == 3'sd3) || (qs == -3'sd2) || (qs == -3'sd3);
  end

endmodule
