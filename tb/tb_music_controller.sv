// tb_music_controller: acts as the processor serving the music interrupt
// with 8-bit samples and as the codec receiving the serial words. Checks
// the interrupt rate, that a write clears the interrupt, that writes
// while no sample is asked for are ignored, the 16-bit word sent for
// each sample (sample in the upper byte), the read-back and the master
// clock (a quarter of the system clock).
module tb_music_controller;
  localparam int DIV = 200;               // LRCK half period = 201 codec ce
  localparam int HALF = 4 * (DIV + 1);    // in system clock cycles
  logic clk = 0, reset_n = 0, chipselect = 0, read = 0, write = 0;
  logic [1:0] address = '0;
  logic [7:0] writedata = '0, readdata;
  logic irq, aud_adclrck, aud_adcdat = 0, aud_daclrck, aud_dacdat, aud_bclk, aud_xck;
  int checks = 0, failures = 0;

  music_controller #(.LRCK_DIV(DIV)) dut (.*);
  always #5 clk = !clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic bus_write(logic [7:0] d);
    @(negedge clk); chipselect = 1; write = 1; writedata = d;
    @(negedge clk); chipselect = 0; write = 0;
  endtask

  // codec side
  logic bclk_q = 0, lrck_q = 0, xck_q = 0;
  logic [15:0] word = '0;
  int nbits = 0, cyc = 0, last_xck = 0;
  logic [15:0] words [$];
  always @(posedge clk) begin
    cyc++;
    bclk_q <= aud_bclk; lrck_q <= aud_daclrck; xck_q <= aud_xck;
    if (aud_bclk && !bclk_q && nbits < 16) begin word = {word[14:0], aud_dacdat}; nbits++; end
    if (aud_daclrck != lrck_q) begin words.push_back(word); nbits = 0; end
    if (reset_n && aud_xck && !xck_q) begin
      if (last_xck != 0) begin
        checks++;
        if (cyc - last_xck != 4) fail("XCK period is not 4 cycles");
      end
      last_xck = cyc;
    end
  end

  initial begin
    logic [7:0] sent [$];
    int t_prev, t_now;
    t_prev = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    for (int n = 0; n < 12; n++) begin
      @(posedge irq);
      t_now = cyc;
      if (n > 1) begin
        checks++;
        if (t_now - t_prev != 2 * HALF) fail($sformatf("irq interval %0d", t_now - t_prev));
      end
      t_prev = t_now;
      if (n == 2) words.delete();   // from here on the sent words are tracked
      repeat ($urandom % 300) @(negedge clk);
      checks++;
      if (irq !== 1) fail("irq dropped before service");
      begin
        automatic logic [7:0] s = 8'($urandom);
        bus_write(s);
        if (n >= 2) sent.push_back(s);
      end
      checks++;
      if (irq !== 0) fail("write did not clear irq");
      // a write while nothing is requested is ignored
      bus_write(8'hee);
      @(negedge clk); chipselect = 1; read = 1; address = 2'd0;
      @(negedge clk); chipselect = 0; read = 0;
      if (n >= 2) begin
        checks++;
        if (readdata !== sent[$]) fail($sformatf("read %h expected %h", readdata, sent[$]));
      end
    end
    wait (words.size() >= 2 * sent.size() + 1);
    // words[0] is the low half that was under way when tracking began
    foreach (sent[i]) begin
      checks++;
      if (words[2*i+1] !== {sent[i], 8'h00} || words[2*i+2] !== {sent[i], 8'h00})
        fail($sformatf("sample %0d: words %h %h, sent %h", i, words[2*i+1], words[2*i+2], sent[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
