// Carry-save reduction tree of 3:2 counters.
//
// Reduces N input vectors to a few vectors of the same sum (modulo 2^W) in
// LEVELS levels of 3:2 counters. At every level the vectors are taken in
// groups of three, each group becomes a sum and a carry vector, and the one
// or two vectors left over pass to the next level unchanged. The number of
// vectors after level l is n(l+1) = n(l) - floor(n(l)/3), so 29 vectors
// become 20, 14, 10, 7 in four levels and 8 become 6, 4, 3, 2. Outputs beyond
// that count are zero. Purely combinational.
//
// The level counts (four levels per cycle) follow the original design; the
// grouping of vectors into counters is this design's choice.
module csa_tree #(
  parameter int unsigned W      = 116,
  parameter int unsigned N      = 29,
  parameter int unsigned LEVELS = 4
)(
  input  logic [W-1:0] din  [N],
  output logic [W-1:0] dout [N]
);

  function automatic int unsigned count_at(int unsigned lvl);
    int unsigned n = N;
    for (int unsigned l = 0; l < lvl; l++) n = n - n / 3;
    return n;
  endfunction

  logic [W-1:0] lv [LEVELS+1][N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) lv[0][i] = din[i];
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < N; i++) lv[l+1][i] = '0;
      for (int unsigned g = 0; g < count_at(l) / 3; g++) begin
        lv[l+1][2*g]   = lv[l][3*g] ^ lv[l][3*g+1] ^ lv[l][3*g+2];
        lv[l+1][2*g+1] = {(lv[l][3*g][W-2:0] & lv[l][3*g+1][W-2:0]) |
                          (lv[l][3*g][W-2:0] & lv[l][3*g+2][W-2:0]) |
                          (lv[l][3*g+1][W-2:0] & lv[l][3*g+2][W-2:0]), 1'b0};
      end
      for (int unsigned r = 0; r < count_at(l) % 3; r++)
        lv[l+1][2*(count_at(l)/3) + r] = lv[l][3*(count_at(l)/3) + r];
    end
    for (int unsigned i = 0; i < N; i++) dout[i] = lv[LEVELS][i];
  end

endmodule
