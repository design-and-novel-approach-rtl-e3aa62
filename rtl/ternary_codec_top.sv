// ternary_codec_top: the ternary decoder and the ternary encoder side by side.
//
// The two circuits are independent combinational blocks: a decoder that turns
// an N-trit number into 3**N one-hot ternary lines (2:9 for N = 2), and an
// encoder that turns 3**N lines with one line high back into an N-trit number
// (9:2 for N = 2). Each keeps its own ports here; nothing connects them
// inside, so a user may chain them (decoder lines into encoder lines) or use
// either alone.
//
// Interface: dec_digits_i -> dec_lines_o  (decoder)
//            enc_lines_i  -> enc_digits_o (encoder)
// All values are trits carried as 2-bit codes 0/1/2 (see ternary_pkg).
// Timing: purely combinational, no clock or reset.
module ternary_codec_top
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2,
  localparam int unsigned LINES = pow3(N)
) (
  input  trit_t [N-1:0]     dec_digits_i,
  output trit_t [LINES-1:0] dec_lines_o,
  input  trit_t [LINES-1:0] enc_lines_i,
  output trit_t [N-1:0]     enc_digits_o
);

  ternary_decoder #(.N(N)) u_decoder (
    .digits_i (dec_digits_i),
    .lines_o  (dec_lines_o)
  );

  ternary_encoder #(.N(N)) u_encoder (
    .lines_i  (enc_lines_i),
    .digits_o (enc_digits_o)
  );

endmodule
