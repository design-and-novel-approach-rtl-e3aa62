// ternary_encoder: 3**N-line to N-trit ternary encoder (9:2 for N = 2).
//
// The input line that is at the high level (2) is encoded as the N-trit
// number of its position. For N = 2 the lines P, Q, R, S, T, U, V, W, X are
// lines_i[0] .. lines_i[8] and the outputs are a = digits_o[1] and
// b = digits_o[0]: line k gives (a, b) = (k / 3, k % 3), so U (k = 5) gives
// (1, 2) and X (k = 8) gives (2, 2), as in the encoder truth table.
//
// Structure: each line, when high, routes its own constant radix-3 digits to
// the outputs; this matches the switch tree of the encoder, where the branch
// "a = i" and the switch "b = j" below it lead to the pair (i, j).
//
// Interface: lines_i   3**N trits, 2-bit codes 0/1/2 (see ternary_pkg)
//            digits_o  N trits
// Timing: purely combinational, no clock.
// Inputs outside the truth table are handled as this design chooses: only
// the level 2 counts as high (0, 1 and the illegal code 3 do not); if several
// lines are high the lowest-numbered one wins; if none is high the output is
// (0, ..., 0), the same as for line P.
module ternary_encoder
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2,
  localparam int unsigned LINES = pow3(N)
) (
  input  trit_t [LINES-1:0] lines_i,
  output trit_t [N-1:0]     digits_o
);

  always_comb begin
    digits_o = '0;
    // Scan from the highest line down so the lowest high line is kept.
    for (int k = LINES - 1; k >= 0; k--) begin
      if (lines_i[k] == TRIT_HIGH) begin
        for (int unsigned i = 0; i < N; i++) digits_o[i] = trit_of(k, i);
      end
    end
  end

endmodule
