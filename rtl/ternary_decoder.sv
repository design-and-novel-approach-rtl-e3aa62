// ternary_decoder: N-trit to 3**N-line ternary decoder (2:9 for N = 2).
//
// The N ternary input digits select one of 3**N output lines. The selected
// line is driven to the high level (2); every other line is held at the low
// level (0). For N = 2 the inputs are a = digits_i[1] and b = digits_i[0],
// and the lines P, Q, R, S, T, U, V, W, X are lines_o[0] .. lines_o[8], so
// line 3*a + b is the one that goes high, as in the decoder truth table.
//
// Structure: each output line is the end of a chain of series switches, one
// per input digit, closed when that digit equals the line's own digit in
// radix 3 (for N = 2: the switch "a = i" feeding the three switches
// "b = 0/1/2"). Here each switch is an equality compare and the chain is an
// AND. That chain is the switch diagram of the decoder; the generalisation to
// any N (3:27, 4:81) follows the same pattern.
//
// Interface: digits_i  N trits, 2-bit codes 0/1/2 (see ternary_pkg)
//            lines_o   3**N trits, exactly one at 2 for legal inputs
// Timing: purely combinational, no clock. An input digit carrying the
// illegal code 3 closes no switch, so all lines stay low; that case is not
// covered by the truth table and its handling is this design's choice.
module ternary_decoder
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2,
  localparam int unsigned LINES = pow3(N)
) (
  input  trit_t [N-1:0]     digits_i,
  output trit_t [LINES-1:0] lines_o
);

  always_comb begin
    for (int unsigned k = 0; k < LINES; k++) begin
      logic closed;
      closed = 1'b1;
      for (int unsigned i = 0; i < N; i++) begin
        if (digits_i[i] != trit_of(k, i)) closed = 1'b0;
      end
      lines_o[k] = closed ? TRIT_HIGH : TRIT_LOW;
    end
  end

endmodule
