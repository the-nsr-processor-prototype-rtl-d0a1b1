// tb_nsr_busmon: checks every hexadecimal digit in every digit position
// against a list of lit segments written out by hand (letters a..g).
module tb_nsr_busmon;
  logic [15:0] bus;
  logic [3:0][6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  nsr_busmon dut (.*);

  function automatic logic [6:0] from_letters(input string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

  initial begin
    for (int pos = 0; pos < 4; pos++)
      for (int d = 0; d < 16; d++) begin
        bus = 16'h0000 | (16'(d) << (4 * pos));
        #1;
        checks++;
        if (seg[pos] != from_letters(lit[d])) begin
          failures++;
          $display("FAIL: digit %0d value %h got %b", pos, d, seg[pos]);
        end
      end
    bus = 16'h1A2F; #1;
    checks++;
    if (seg[3] != from_letters("bc") || seg[2] != from_letters("abcefg") ||
        seg[1] != from_letters("abdeg") || seg[0] != from_letters("aefg")) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
