// tb_ternary_codec_top: end-to-end test of the decoder/encoder top level,
// with every parameter at its default (N = 2: 2:9 decoder, 9:2 encoder).
//
// Each step drives a two-trit number into the decoder, checks that exactly
// the matching line (3*a + b) of the nine is high, feeds the decoder's lines
// into the encoder's inputs and checks that the same number comes back. It
// also checks the decoder's response to an illegal digit code (all lines low)
// and the encoder's choice when two lines are high (lowest wins). Each
// mechanism is counted, and one that never happened counts as a failure.
// A clock drives only the watchdog.
module tb_ternary_codec_top;
  import ternary_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  trit_t [1:0] dec_digits;
  trit_t [8:0] dec_lines;
  trit_t [8:0] enc_lines;
  trit_t [1:0] enc_digits;

  ternary_codec_top dut (
    .dec_digits_i (dec_digits),
    .dec_lines_o  (dec_lines),
    .enc_lines_i  (enc_lines),
    .enc_digits_o (enc_digits)
  );

  int line_seen [9];
  int n_roundtrip = 0;
  int n_illegal = 0;
  int n_priority = 0;

  initial begin
    int a, b, v;
    for (int k = 0; k < 9; k++) line_seen[k] = 0;

    // Round trip over random numbers, then every number once more.
    for (int t = 0; t < 209; t++) begin
      v = (t < 200) ? int'($urandom_range(8, 0)) : t - 200;
      a = v / 3;
      b = v % 3;
      dec_digits = {trit_t'(a), trit_t'(b)};
      #1;
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (dec_lines[k] != ((k == v) ? 2'd2 : 2'd0)) begin
          failures++;
          $display("FAIL decode (%0d,%0d): line %0d = %0d", a, b, k, dec_lines[k]);
        end
        if (dec_lines[k] == 2'd2) line_seen[k]++;
      end
      enc_lines = dec_lines;
      #1;
      checks++;
      if (enc_digits != dec_digits) begin
        failures++;
        $display("FAIL round trip (%0d,%0d) -> (%0d,%0d)", a, b, enc_digits[1], enc_digits[0]);
      end else begin
        n_roundtrip++;
      end
    end

    // Illegal digit code on the decoder.
    for (int t = 0; t < 7; t++) begin
      a = (t < 4) ? 3 : t - 4;
      b = (t < 4) ? t : 3;
      dec_digits = {trit_t'(a), trit_t'(b)};
      #1;
      checks++;
      if (dec_lines != '0) begin
        failures++;
        $display("FAIL illegal (%0d,%0d): lines %h", a, b, dec_lines);
      end else begin
        n_illegal++;
      end
    end

    // Two high lines on the encoder.
    for (int t = 0; t < 50; t++) begin
      int i, j;
      i = $urandom_range(7, 0);
      j = $urandom_range(8, i + 1);
      enc_lines = '0;
      enc_lines[i] = 2'd2;
      enc_lines[j] = 2'd2;
      #1;
      checks++;
      if (enc_digits != {trit_t'(i / 3), trit_t'(i % 3)}) begin
        failures++;
        $display("FAIL priority lines %0d,%0d -> (%0d,%0d)", i, j, enc_digits[1], enc_digits[0]);
      end else begin
        n_priority++;
      end
    end

    for (int k = 0; k < 9; k++) begin
      checks++;
      if (line_seen[k] == 0) begin
        failures++;
        $display("FAIL decoder line %0d never selected", k);
      end
    end
    checks += 3;
    if (n_roundtrip == 0) begin failures++; $display("FAIL no round trip"); end
    if (n_illegal == 0)   begin failures++; $display("FAIL no illegal input"); end
    if (n_priority == 0)  begin failures++; $display("FAIL no priority case"); end
    $display("round trips=%0d illegal inputs=%0d priority cases=%0d",
             n_roundtrip, n_illegal, n_priority);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
