// score_controller: Avalon slave that shows a 16-bit score on four
// seven-segment displays.
//
// One 16-bit register, written by the processor (chipselect & write), is
// split into four nibbles; each drives a hex_decoder.  hex[0] shows bits
// [3:0] (rightmost display), hex[3] bits [15:12].  The register clears on
// the synchronous active-low reset.  A read returns the register one cycle
// after the read strobe (read latency 1); the original component left
// readdata unused, so the read-back is this design's addition.
module score_controller (
  input  logic             clk,
  input  logic             reset_n,
  input  logic             chipselect,
  input  logic             read,
  input  logic             write,
  input  logic [15:0]      writedata,
  output logic [15:0]      readdata,
  output logic [3:0][6:0]  hex
);
  logic [15:0] score_q;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      score_q  <= '0;
      readdata <= '0;
    end else begin
      if (chipselect && write) score_q <= writedata;
      if (chipselect && read)  readdata <= score_q;
    end
  end

  for (genvar d = 0; d < 4; d++) begin : g_digit
    hex_decoder u_dec (.digit(score_q[4*d +: 4]), .seg(hex[d]));
  end
endmodule
