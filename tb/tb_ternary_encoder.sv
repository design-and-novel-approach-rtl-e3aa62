// tb_ternary_encoder: self-checking test of the ternary encoder.
//
// The 9:2 encoder (default N = 2) is checked against the nine rows of its
// truth table, written out literally as P..X levels and the expected (a, b).
// It is then checked on inputs outside the table, against this design's
// stated rules: only level 2 counts as high, the lowest high line wins, and
// no high line gives (0, 0). Random line patterns are compared with a
// reference computed here. Instances with N = 3 (27:3) and N = 4 (81:4) are
// checked exhaustively with one high line. A clock drives only the watchdog.
module tb_ternary_encoder;
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

  trit_t [8:0]  l2;
  trit_t [1:0]  d2;
  trit_t [26:0] l3;
  trit_t [2:0]  d3;
  trit_t [80:0] l4;
  trit_t [3:0]  d4;

  ternary_encoder            dut2 (.lines_i(l2), .digits_o(d2));
  ternary_encoder #(.N(3))   dut3 (.lines_i(l3), .digits_o(d3));
  ternary_encoder #(.N(4))   dut4 (.lines_i(l4), .digits_o(d4));

  // Truth table rows: P Q R S T U V W X, then a, b.
  string rows [9] = '{
    "20000000000", "02000000001", "00200000002",
    "00020000010", "00002000011", "00000200012",
    "00000020020", "00000002021", "00000000222"
  };

  function automatic int digit(string s, int i);
    return int'(s[i]) - int'("0");
  endfunction

  task automatic check2(input int ea, input int eb, input string what);
    checks++;
    if (d2[1] != trit_t'(ea) || d2[0] != trit_t'(eb)) begin
      failures++;
      $display("FAIL 9:2 %s lines=%h got (%0d,%0d) expected (%0d,%0d)",
               what, l2, d2[1], d2[0], ea, eb);
    end
  endtask

  initial begin
    int first;

    // Truth table of the 9:2 encoder.
    for (int r = 0; r < 9; r++) begin
      for (int k = 0; k < 9; k++) l2[k] = trit_t'(digit(rows[r], k));
      #1;
      check2(digit(rows[r], 9), digit(rows[r], 10), "table");
    end

    // No line high.
    l2 = '0;
    #1;
    check2(0, 0, "none high");

    // The middle level and the illegal code are not "high".
    for (int k = 0; k < 9; k++) begin
      l2 = '0;
      l2[k] = 2'd1;
      #1;
      check2(0, 0, "middle level");
      l2[k] = 2'd3;
      #1;
      check2(0, 0, "illegal code");
    end

    // Two high lines: the lower-numbered one is encoded.
    for (int i = 0; i < 9; i++) begin
      for (int j = i + 1; j < 9; j++) begin
        l2 = '0;
        l2[i] = 2'd2;
        l2[j] = 2'd2;
        #1;
        check2(i / 3, i % 3, "two high");
      end
    end

    // Random levels on all lines.
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 9; k++) l2[k] = trit_t'($urandom_range(3, 0));
      first = -1;
      for (int k = 8; k >= 0; k--) if (l2[k] == 2'd2) first = k;
      #1;
      if (first < 0) check2(0, 0, "random");
      else           check2(first / 3, first % 3, "random");
    end

    // 27:3, one high line, exhaustive.
    for (int v = 0; v < 27; v++) begin
      l3 = '0;
      l3[v] = 2'd2;
      #1;
      checks++;
      if (d3[0] != trit_t'(v % 3) || d3[1] != trit_t'((v / 3) % 3) ||
          d3[2] != trit_t'(v / 9)) begin
        failures++;
        $display("FAIL 27:3 line %0d got %h", v, d3);
      end
    end

    // 81:4, one high line, exhaustive.
    for (int v = 0; v < 81; v++) begin
      l4 = '0;
      l4[v] = 2'd2;
      #1;
      checks++;
      if (d4[0] != trit_t'(v % 3) || d4[1] != trit_t'((v / 3) % 3) ||
          d4[2] != trit_t'((v / 9) % 3) || d4[3] != trit_t'(v / 27)) begin
        failures++;
        $display("FAIL 81:4 line %0d got %h", v, d4);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
