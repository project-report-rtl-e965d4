// tb_debouncer: bouncing press and release of one button, a glitch on a
// steady level, and the settling time (8 samples, one sample every
// DELAY+1 cycles, after a two-flop synchroniser).
module tb_debouncer;
  localparam int DELAY = 4;            // a sample every 5 cycles
  logic clk = 0, reset_n = 0, x = 1, dbx;
  int checks = 0, failures = 0;

  debouncer #(.DELAY(DELAY)) dut (.*);
  always #5 clk = !clk;

  task automatic expect_level(logic v, string what);
    checks++;
    if (dbx !== v) begin failures++; $display("%s: dbx=%b expected %b at %0t", what, dbx, v, $time); end
  endtask

  // Bounce: toggle every cycle, then settle at level v and count cycles
  // until the output follows.
  task automatic bounce_then(logic v);
    int n;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk); x = !x;
      expect_level(!v, "during bounce");
    end
    @(negedge clk); x = v;
    n = 0;
    while (dbx !== v && n < 200) begin @(negedge clk); n++; end
    checks++;
    // between 7 and 8 full sample periods plus synchroniser and output register
    if (n < 7 * (DELAY + 1) || n > 8 * (DELAY + 1) + 4) begin
      failures++; $display("settling took %0d cycles", n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    repeat (20) @(negedge clk);
    expect_level(1, "idle after reset");
    bounce_then(0);
    // a one-cycle glitch while pressed is ignored
    repeat (50) @(negedge clk);
    x = 1; @(negedge clk); x = 0;
    repeat (100) begin @(negedge clk); expect_level(0, "glitch while pressed"); end
    bounce_then(1);
    repeat (100) begin @(negedge clk); expect_level(1, "released"); end
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
