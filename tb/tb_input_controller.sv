// tb_input_controller: presses the five active-low buttons with small
// debounce and wait settings and checks the interrupt, the one-hot key
// code, the clear-by-write and the dead time after a clear.
module tb_input_controller;
  localparam int DEB = 2;       // a debounce sample every 3 cycles
  localparam int WAIT = 200;    // dead time after the interrupt is cleared
  logic clk = 0, reset_n = 0, chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = '0, readdata;
  logic irq;
  logic [4:0] switches = '1;
  int checks = 0, failures = 0;

  input_controller #(.DEBOUNCE_DELAY(DEB), .WAIT_CYCLES(WAIT)) dut (.*);
  always #5 clk = !clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic clear_irq;
    @(negedge clk); chipselect = 1; write = 1;
    @(negedge clk); chipselect = 0; write = 0;
  endtask

  // Press key k with some bounce, wait up to `limit` cycles for the irq.
  task automatic press(int k, output int latency);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); switches[k] = i[0];
    end
    @(negedge clk); switches[k] = 0;
    latency = 0;
    while (!irq && latency < 100) begin @(negedge clk); latency++; end
  endtask

  task automatic release_all;
    @(negedge clk); switches = '1;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    reset_n = 1;
    repeat (40) @(negedge clk);
    checks++; if (irq !== 0) fail("irq set after reset");

    // a one-cycle glitch on a key must not raise an interrupt
    @(negedge clk); switches[1] = 0; @(negedge clk); switches[1] = 1;
    repeat (60) @(negedge clk);
    checks++; if (irq !== 0) fail("glitch raised irq");

    for (int k = 0; k < 5; k++) begin
      press(k, lat);
      checks++; if (irq !== 1) fail($sformatf("key %0d: no irq", k));
      // 8 equal samples three cycles apart plus sync and pulse stages
      checks++; if (lat < 18 || lat > 40) fail($sformatf("key %0d latency %0d", k, lat));
      checks++; if (readdata !== 16'(1 << k)) fail($sformatf("key %0d read %h", k, readdata));
      // irq holds until the processor writes
      repeat (30) @(negedge clk);
      checks++; if (irq !== 1) fail("irq dropped before clear");
      release_all();
      clear_irq();
      checks++; if (irq !== 0) fail("irq not cleared");
      // a press during the dead time is not reported
      press((k + 1) % 5, lat);
      checks++; if (irq !== 0) fail("press during dead time raised irq");
      release_all();
      repeat (WAIT) @(negedge clk);
    end

    // after the dead time a new press is reported again
    press(4, lat);
    checks++; if (irq !== 1 || readdata !== 16'h0010) fail("press after dead time");
    // two keys at once: the lowest wins
    release_all(); clear_irq(); repeat (WAIT + 10) @(negedge clk);
    @(negedge clk); switches[3] = 0; switches[2] = 0;
    lat = 0; while (!irq && lat < 100) begin @(negedge clk); lat++; end
    checks++; if (irq !== 1 || readdata !== 16'h0004) fail($sformatf("two keys read %h", readdata));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
