// tb_beat_controller: reads the song through the Avalon slave port
// (chipselect with read), checks known entries, the zero-filled tail, the
// one-cycle latency, that the data holds between reads, and that writes
// do not change the ROM.
module tb_beat_controller;
  logic clk = 0, en = 0;
  logic wr_en = 0;
  logic [9:0] address = '0;
  logic [15:0] data;
  int checks = 0, failures = 0;

  logic reset_n = 1, chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = 16'hffff;
  logic [15:0] readdata;
  assign data = readdata;
  beat_controller dut (.clk, .reset_n, .chipselect, .read, .write, .address, .writedata, .readdata);
  always_comb begin chipselect = en || wr_en; read = en; write = wr_en; end
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
    // a write to the ROM is ignored
    @(negedge clk); wr_en = 1; address = 10'd0;
    @(negedge clk); wr_en = 0; en = 1;
    @(negedge clk); en = 0;
    checks++;
    if (data !== 16'h00b4) begin failures++; $display("write changed the ROM"); end
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
