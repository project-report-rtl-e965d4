// tb_interval_timer: runs the timer with a 100-cycle period and checks
// continuous mode (interrupt spacing, status bits, clear by a status
// write), one-shot mode, stop, the interrupt enable and the register
// read-back.
module tb_interval_timer;
  localparam int LOAD = 99;
  logic clk = 0, reset_n = 0, chipselect = 0, read = 0, write = 0;
  logic [2:0] address = '0;
  logic [15:0] writedata = '0, readdata;
  logic irq;
  int checks = 0, failures = 0, cyc = 0;

  interval_timer #(.LOAD_VALUE(LOAD)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic wr(int a, logic [15:0] d);
    @(negedge clk); chipselect = 1; write = 1; address = 3'(a); writedata = d;
    @(negedge clk); chipselect = 0; write = 0;
  endtask

  task automatic rd(int a, output logic [15:0] d);
    @(negedge clk); chipselect = 1; read = 1; address = 3'(a);
    @(negedge clk); chipselect = 0; read = 0;
    d = readdata;
  endtask

  // wait for irq with a limit; returns the cycle it was seen
  task automatic wait_irq(int limit, output int t, output bit seen);
    int n = 0;
    while (!irq && n < limit) begin @(negedge clk); n++; end
    seen = irq;
    t = cyc;
  endtask

  initial begin
    logic [15:0] d;
    int t0, t1;
    bit seen;
    repeat (3) @(negedge clk);
    reset_n = 1;
    repeat (300) @(negedge clk);
    checks++; if (irq !== 0) fail("irq before start");
    rd(0, d); checks++; if (d !== 16'h0000) fail($sformatf("status after reset %h", d));

    // continuous, interrupt enabled, start
    wr(1, 16'h0007);
    rd(1, d); checks++; if (d !== 16'h0007) fail($sformatf("control read %h", d));
    wait_irq(200, t0, seen);
    checks++; if (!seen) fail("no first timeout");
    rd(0, d); checks++; if (d !== 16'h0003) fail($sformatf("status while running %h", d));
    wr(0, 16'h0000);
    checks++; if (irq !== 0) fail("status write did not clear irq");
    for (int i = 0; i < 5; i++) begin
      wait_irq(200, t1, seen);
      checks++;
      if (!seen || t1 - t0 != LOAD + 1) fail($sformatf("period %0d cycles", t1 - t0));
      t0 = t1;
      repeat ($urandom % 40) @(negedge clk);
      wr(0, 16'h0000);
    end

    // interrupt disabled: timeout flag sets but irq stays low
    wr(1, 16'h0002);
    repeat (150) @(negedge clk);
    checks++; if (irq !== 0) fail("irq while disabled");
    rd(0, d); checks++; if (d[0] !== 1'b1) fail("timeout flag not set while disabled");
    wr(0, 0);

    // stop
    wr(1, 16'h0009);
    rd(0, d); checks++; if (d[1] !== 1'b0) fail("still running after stop");
    repeat (300) @(negedge clk);
    checks++; if (irq !== 0) fail("irq after stop");

    // one-shot: one timeout, then the timer stops
    wr(1, 16'h0005);
    wait_irq(200, t1, seen);
    checks++; if (!seen) fail("one-shot gave no timeout");
    wr(0, 0);
    repeat (300) @(negedge clk);
    checks++; if (irq !== 0) fail("one-shot timed out twice");
    rd(0, d); checks++; if (d[1] !== 1'b0) fail("one-shot still running");

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
