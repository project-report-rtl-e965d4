// tb_avalon_decoder: checks the chip select for addresses in and around
// each slave window, that read data comes back one cycle after a read from
// the slave that was selected, that flash data passes through on the
// flash's own valid strobe, and that unmapped reads return zero.
module tb_avalon_decoder;
  logic clk = 0, reset_n = 0, read = 0, readdatavalid, flash_readdatavalid = 0;
  logic [22:0] address = '0;
  logic [15:0] readdata, rd_beat, rd_vga, rd_input, rd_score, rd_timer, rd_flash;
  logic [7:0] rd_music;
  logic [6:0] chipselect;
  int checks = 0, failures = 0;

  avalon_decoder dut (.*);
  always #5 clk = !clk;

  // each slave returns a fixed tag
  assign rd_beat = 16'hbea7, rd_vga = 16'h0fa1, rd_input = 16'h1234, rd_score = 16'h5c0e;
  assign rd_music = 8'h3a, rd_timer = 16'h7133, rd_flash = 16'hf1a5;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  // expected one-hot select (bit order: beat, vga, input, score, music,
  // timer, flash) and read value for a byte address
  function automatic void expected(int a, output logic [6:0] cs, output logic [15:0] v);
    cs = '0; v = '0;
    if (a >= 'h400000)                    begin cs[6] = 1; v = 16'hf1a5; end
    else if (a < 'h800)                   begin cs[0] = 1; v = 16'hbea7; end
    else if (a >= 'h1000 && a < 'h1020)   begin cs[1] = 1; v = 16'h0fa1; end
    else if (a >= 'h1100 && a < 'h1110)   begin cs[2] = 1; v = 16'h1234; end
    else if (a >= 'h1200 && a < 'h1210)   begin cs[3] = 1; v = 16'h5c0e; end
    else if (a >= 'h1300 && a < 'h1310)   begin cs[4] = 1; v = 16'h003a; end
    else if (a >= 'h1400 && a < 'h1410)   begin cs[5] = 1; v = 16'h7133; end
  endfunction

  task automatic try(int a);
    logic [6:0] cs;
    logic [15:0] v;
    expected(a, cs, v);
    @(negedge clk); address = 23'(a); read = 1;
    #1;
    checks++;
    if (chipselect !== cs) fail($sformatf("address %h: select %b expected %b", a, chipselect, cs));
    checks++;
    if (readdatavalid !== 0) fail("valid in the read cycle");
    @(negedge clk); read = 0;
    if (cs[6]) begin
      // flash: nothing until the flash says so, then its data
      checks++;
      if (readdatavalid !== 0) fail("valid before flash data");
      repeat ($urandom % 4) @(negedge clk);
      flash_readdatavalid = 1;
      #1;
      @(negedge clk); flash_readdatavalid = 0;
      checks++;
      if (readdata !== v) fail("flash data not passed");
    end else begin
      checks++;
      if (readdatavalid !== 1 || readdata !== v)
        fail($sformatf("address %h: valid %b data %h expected %h", a, readdatavalid, readdata, v));
    end
    @(negedge clk);
    checks++;
    if (readdatavalid !== 0) fail("valid longer than one cycle");
  endtask

  // flash valid is sampled at the cycle it is high
  always @(posedge clk) if (flash_readdatavalid) begin
    checks++;
    if (readdatavalid !== 1 || readdata !== 16'hf1a5) fail("flash valid not forwarded");
  end

  initial begin
    static int edges [] = '{'h0, 'h7fe, 'h800, 'hffe, 'h1000, 'h101e, 'h1020, 'h10fe, 'h1100, 'h110e,
                     'h1110, 'h1200, 'h120e, 'h1210, 'h1300, 'h1302, 'h130e, 'h1310, 'h1400,
                     'h140e, 'h1410, 'h2000, 'h3ffffe, 'h400000, 'h5a5a5a, 'h7ffffe};
    repeat (3) @(negedge clk);
    reset_n = 1;
    foreach (edges[i]) try(edges[i]);
    for (int i = 0; i < 200; i++) try(int'($urandom % 'h800000) & ~1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
