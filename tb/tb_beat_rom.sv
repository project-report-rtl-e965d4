// tb_beat_rom: reads known song entries and the zero-filled tail of the
// beat ROM. Checks the one-cycle read latency and that the output holds
// while the enable is low.
module tb_beat_rom;
  logic clk = 0, en = 0;
  logic [9:0] address = '0;
  logic [15:0] data;
  int checks = 0, failures = 0;

  beat_rom dut (.*);
  always #5 clk = !clk;

  // The first three and last two times of the song (in 10 ms ticks).
  int          a [7] = '{0, 1, 2, 463, 464, 465, 1023};
  logic [15:0] v [7] = '{16'h00b4, 16'h00c8, 16'h00f0, 16'h4cad, 16'h4cd7, 16'h0000, 16'h0000};

  initial begin
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); en = 1; address = 10'(a[i]);
      @(negedge clk); en = 0; address = 10'($urandom);
      checks++;
      if (data !== v[i]) begin failures++; $display("address %0d: %h expected %h", a[i], data, v[i]); end
      // enable low: the output holds
      @(negedge clk);
      checks++;
      if (data !== v[i]) begin failures++; $display("output changed with enable low"); end
    end
    // times rise through the song
    begin
      automatic logic [15:0] prev = '0;
      automatic int rises = 0;
      for (int i = 0; i < 465; i++) begin
        @(negedge clk); en = 1; address = 10'(i);
        @(negedge clk); en = 0;
        if (data > prev) rises++;
        prev = data;
      end
      checks++;
      // the song has a few repeated times but is mostly increasing
      if (rises < 440) begin failures++; $display("only %0d increasing entries", rises); end
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
