// tb_ternary_decoder: self-checking test of the ternary decoder.
//
// The 2:9 decoder (default N = 2) is checked against the nine rows of its
// truth table, written out literally below as the expected P..X levels, and
// against illegal digit codes (3), which must leave all lines low. Two more
// instances, N = 3 (3:27) and N = 4 (4:81), are checked exhaustively: the
// test builds each input number's radix-3 digits itself and expects exactly
// line v high. A free-running clock drives only the watchdog.
module tb_ternary_decoder;
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

  trit_t [1:0]  d2;
  trit_t [8:0]  l2;
  trit_t [2:0]  d3;
  trit_t [26:0] l3;
  trit_t [3:0]  d4;
  trit_t [80:0] l4;

  ternary_decoder            dut2 (.digits_i(d2), .lines_o(l2));
  ternary_decoder #(.N(3))   dut3 (.digits_i(d3), .lines_o(l3));
  ternary_decoder #(.N(4))   dut4 (.digits_i(d4), .lines_o(l4));

  // Truth table rows: a, b, then P Q R S T U V W X (one string per row).
  string rows [9] = '{
    "00200000000", "01020000000", "02002000000",
    "10000200000", "11000020000", "12000002000",
    "20000000200", "21000000020", "22000000002"
  };

  function automatic int digit(string s, int i);
    return int'(s[i]) - int'("0");
  endfunction

  initial begin
    // Truth table of the 2:9 decoder.
    for (int r = 0; r < 9; r++) begin
      d2[1] = trit_t'(digit(rows[r], 0));
      d2[0] = trit_t'(digit(rows[r], 1));
      #1;
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (l2[k] != trit_t'(digit(rows[r], 2 + k))) begin
          failures++;
          $display("FAIL 2:9 a=%0d b=%0d line %0d = %0d, expected %0d",
                   d2[1], d2[0], k, l2[k], digit(rows[r], 2 + k));
        end
      end
    end

    // Illegal code 3 on either digit: no line may go high.
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        if (a != 3 && b != 3) continue;
        d2[1] = trit_t'(a);
        d2[0] = trit_t'(b);
        #1;
        checks++;
        if (l2 != '0) begin
          failures++;
          $display("FAIL 2:9 illegal a=%0d b=%0d lines=%h", a, b, l2);
        end
      end
    end

    // 3:27, exhaustive.
    for (int v = 0; v < 27; v++) begin
      d3[0] = trit_t'(v % 3);
      d3[1] = trit_t'((v / 3) % 3);
      d3[2] = trit_t'(v / 9);
      #1;
      for (int k = 0; k < 27; k++) begin
        checks++;
        if (l3[k] != ((k == v) ? 2'd2 : 2'd0)) begin
          failures++;
          $display("FAIL 3:27 v=%0d line %0d = %0d", v, k, l3[k]);
        end
      end
    end

    // 4:81, exhaustive.
    for (int v = 0; v < 81; v++) begin
      d4[0] = trit_t'(v % 3);
      d4[1] = trit_t'((v / 3) % 3);
      d4[2] = trit_t'((v / 9) % 3);
      d4[3] = trit_t'(v / 27);
      #1;
      for (int k = 0; k < 81; k++) begin
        checks++;
        if (l4[k] != ((k == v) ? 2'd2 : 2'd0)) begin
          failures++;
          $display("FAIL 4:81 v=%0d line %0d = %0d", v, k, l4[k]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
