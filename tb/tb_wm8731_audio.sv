// tb_wm8731_audio: runs the serialiser with a clock enable every second
// cycle and a short LRCK divider. It rebuilds each 16-bit word from DACDAT
// on the rising BCLK edges and checks the built-in sine test words against
// values of the table in the source, then normal samples, the LRCK period
// and the one-cycle sample request after each falling LRCK edge.
module tb_wm8731_audio;
  localparam int DIV = 200;                 // LRCK half period = 201 ce
  logic clk = 0, reset_n = 0, ce = 0, test_mode = 1;
  logic [15:0] sample = '0;
  logic sample_request, aud_adclrck, aud_daclrck, aud_dacdat, aud_bclk;
  int checks = 0, failures = 0;

  wm8731_audio #(.LRCK_DIV(DIV)) dut (.*);
  always #5 clk = !clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  always @(posedge clk) ce <= reset_n ? !ce : 1'b0;

  // Receiver model
  logic bclk_q = 0, lrck_q = 0, req_q = 0;
  logic [15:0] word = '0;
  int nbits = 0, half = -1, last_toggle = 0, cyc = 0, req_count = 0;
  logic [15:0] words [$];
  logic [15:0] sent [$];

  always @(posedge clk) begin
    cyc++;
    bclk_q <= aud_bclk;
    lrck_q <= aud_daclrck;
    req_q  <= sample_request;
    if (reset_n) begin
      if (aud_bclk && !bclk_q && nbits < 16) begin
        word  = {word[14:0], aud_dacdat};
        nbits++;
      end
      if (aud_daclrck != lrck_q) begin
        if (half >= 0) begin
          checks++;
          if (nbits != 16) fail($sformatf("half %0d had %0d bits", half, nbits));
          words.push_back(word);
          checks++;
          if (cyc - last_toggle != 2 * (DIV + 1))
            fail($sformatf("LRCK half period %0d cycles", cyc - last_toggle));
        end
        half++;
        last_toggle = cyc;
        nbits = 0;
      end
      if (sample_request) begin
        req_count++;
        checks++;
        if (req_q) fail("request longer than one cycle");
        checks++;
        if (aud_daclrck !== 0 || cyc - last_toggle > 4) fail("request not right after falling LRCK");
      end
      if (aud_adclrck !== aud_daclrck) fail("ADC and DAC LRCK differ");
    end
  end

  // Words of the 48-entry table checked by index.
  int idx [6] = '{0, 1, 4, 12, 25, 47};
  logic [15:0] val [6] = '{16'h0000, 16'h10b4, 16'h3fff, 16'h7fff, 16'hef4b, 16'hef4b};

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    wait (words.size() >= 100);
    // both halves of LRCK period n carry table entry n
    for (int i = 0; i < 6; i++) begin
      checks += 2;
      if (words[2*idx[i]] !== val[i] || words[2*idx[i]+1] !== val[i])
        fail($sformatf("sine %0d: %h %h expected %h", idx[i], words[2*idx[i]], words[2*idx[i]+1], val[i]));
    end
    checks++;
    if (words[96] !== 16'h0000) fail("sine table does not wrap after 48 entries");
    checks++;
    if (req_count < 45 || req_count > 52) fail($sformatf("%0d requests in 50 LRCK periods", req_count));

    // normal mode: a new sample each request; every word sent is one set
    test_mode = 0;
    repeat (4) @(posedge sample_request);
    words.delete();
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      sample = 16'($urandom);
      sent.push_back(sample);
      @(posedge sample_request);
    end
    wait (words.size() >= 21);
    for (int i = 0; i < 10; i++) begin
      // words[0] is the low half already under way when the list was
      // emptied; a sample set after a request goes out in the two halves
      // that follow it
      checks++;
      if (words[2*i+1] !== sent[i] || words[2*i+2] !== sent[i])
        fail($sformatf("sample %0d: %h %h expected %h", i, words[2*i+1], words[2*i+2], sent[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
