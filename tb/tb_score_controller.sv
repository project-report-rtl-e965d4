// tb_score_controller: writes scores over the Avalon port and checks the
// four seven-segment outputs and the read-back.
module tb_score_controller;
  logic clk = 0, reset_n = 0, chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = '0, readdata;
  logic [3:0][6:0] hex;
  int checks = 0, failures = 0;

  score_controller dut (.*);
  always #5 clk = !clk;

  // Active-low patterns of the 16 digits, segment a = bit 0.
  localparam logic [6:0] SEG [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12,
      7'h02, 7'h78, 7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};

  task automatic check(logic [15:0] v);
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (hex[d] !== SEG[v[4*d +: 4]]) begin
        failures++;
        $display("value %h digit %0d: %b expected %b", v, d, hex[d], SEG[v[4*d +: 4]]);
      end
    end
  endtask

  task automatic wr(logic [15:0] v, logic cs);
    @(negedge clk);
    chipselect = cs; write = 1; writedata = v;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    check(16'h0000);
    wr(16'hdead, 1); check(16'hdead);
    wr(16'hbeef, 1); check(16'hbeef);
    wr(16'h1234, 0); check(16'hbeef);   // no chipselect: ignored
    for (int i = 0; i < 20; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      wr(v, 1); check(v);
      @(negedge clk); chipselect = 1; read = 1;
      @(negedge clk); chipselect = 0; read = 0;
      checks++;
      if (readdata !== v) begin failures++; $display("readback %h expected %h", readdata, v); end
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
