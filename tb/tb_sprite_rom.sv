// tb_sprite_rom: reads pixels of each of the five 32x32 note images
// (address = image*1024 + column*32 + row) and checks the centre colour,
// the white rim, the transparent corners and the one-cycle read latency.
module tb_sprite_rom;
  logic clk = 0, en = 0;
  logic [12:0] addr = '0;
  logic [31:0] data;
  int checks = 0, failures = 0;

  sprite_rom dut (.*);
  always #5 clk = !clk;

  // Fill colours of the five notes as 8-bit R, G, B.
  logic [23:0] fill [5] = '{24'h00c800, 24'hdc0000, 24'hf0dc00, 24'h0050f0, 24'hfa8200};

  function automatic logic [31:0] word_of(logic [23:0] rgb);
    // transparent flag at bit 30, then 10-bit B, G, R with the 8-bit
    // value in the upper bits of each field
    return {2'b00, rgb[7:0], 2'b00, rgb[15:8], 2'b00, rgb[23:16], 2'b00};
  endfunction

  task automatic rd(int s, int x, int y, logic [31:0] expect_w, string what);
    @(negedge clk); en = 1; addr = 13'(s * 1024 + x * 32 + y);
    @(negedge clk); en = 0; addr = 13'($urandom);
    checks++;
    if (data !== expect_w) begin
      failures++;
      $display("image %0d (%0d,%0d) %s: %h expected %h", s, x, y, what, data, expect_w);
    end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) begin
      rd(s, 16, 16, word_of(fill[s]), "centre");
      rd(s, 10, 20, word_of(fill[s]), "inside");
      rd(s, 16, 1, word_of(24'hffffff), "top rim");
      rd(s, 30, 15, word_of(24'hffffff), "right rim");
      rd(s, 0, 0, 32'h4000_0000, "corner");
      rd(s, 31, 31, 32'h4000_0000, "corner");
      rd(s, 31, 0, 32'h4000_0000, "corner");
      rd(s, 0, 31, 32'h4000_0000, "corner");
    end
    // symmetric images: pixel (x,y) equals (31-x,y) and (x,31-y)
    for (int i = 0; i < 50; i++) begin
      automatic int s = $urandom % 5, x = $urandom % 32, y = $urandom % 32;
      logic [31:0] w;
      @(negedge clk); en = 1; addr = 13'(s * 1024 + x * 32 + y);
      @(negedge clk); addr = 13'(s * 1024 + (31 - x) * 32 + (31 - y)); w = data;
      @(negedge clk); en = 0;
      checks++;
      if (data !== w) begin failures++; $display("image %0d not symmetric at %0d,%0d", s, x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
