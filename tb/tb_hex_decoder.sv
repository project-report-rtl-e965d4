// tb_hex_decoder: checks all 16 digits of hex_decoder against the lit
// segments of each glyph, written as segment letters a..g.
module tb_hex_decoder;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex_decoder dut (.digit, .seg);

  // Segments lit for each digit (a = bit 0 ... g = bit 6).
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                      "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] expected(int d);
    logic [6:0] on = '0;
    for (int i = 0; i < lit[d].len(); i++) on[lit[d][i] - "a"] = 1'b1;
    return ~on;  // active low
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== expected(d)) begin
        failures++;
        $display("digit %h: seg %b, expected %b", d, seg, expected(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
