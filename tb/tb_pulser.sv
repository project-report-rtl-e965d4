// tb_pulser: drives random levels (each held at least two cycles) and
// checks that each rise gives exactly one pulse, one cycle later.
module tb_pulser;
  logic clk = 0, reset_n = 0, key_in = 0, key_out;
  int checks = 0, failures = 0, pulses = 0, rises = 0;
  logic prev1 = 0, prev2 = 0;

  pulser dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (2) @(negedge clk);
    reset_n = 1;
    for (int run = 0; run < 200; run++) begin
      automatic int len = 2 + ($urandom % 6);
      key_in = !key_in;
      repeat (len) begin
        @(posedge clk);
        prev2 = prev1; prev1 = key_in;
        #1;
        checks++;
        if (key_out !== (prev1 && !prev2)) begin
          failures++;
          $display("t=%0t key_out=%b expected %b", $time, key_out, prev1 && !prev2);
        end
        if (key_out) pulses++;
        if (prev1 && !prev2) rises++;
        @(negedge clk);
      end
    end
    checks++;
    if (pulses != rises || pulses == 0) failures++;
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
