// debouncer: filters contact bounce from one push button.
//
// The raw input passes two flip-flops (synchroniser), then is sampled once
// every DELAY+1 clock cycles into an 8-bit history.  The output goes to 1
// after eight consecutive 1 samples and to 0 after eight consecutive 0
// samples; otherwise it holds.  With DELAY = 50000 at 50 MHz a sample is
// taken every 1 ms, so a level must be stable for 7-8 ms before it shows.
// The sampling scheme and DELAY follow the original design; the reset value
// (the idle level, IDLE_LEVEL, into history and output) is this design's.
module debouncer #(
  parameter int unsigned DELAY      = 50000,
  parameter logic        IDLE_LEVEL = 1'b1
) (
  input  logic clk,
  input  logic reset_n,
  input  logic x,
  output logic dbx
);
  localparam int unsigned CW = $clog2(DELAY + 1);

  logic          sync1, sync2;
  logic [7:0]    history;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      sync1   <= IDLE_LEVEL;
      sync2   <= IDLE_LEVEL;
      history <= {8{IDLE_LEVEL}};
      cnt     <= '0;
      dbx     <= IDLE_LEVEL;
    end else begin
      sync1 <= x;
      sync2 <= sync1;
      if (cnt == CW'(DELAY)) begin
        cnt     <= '0;
        history <= {history[6:0], sync2};
      end else begin
        cnt <= cnt + 1'b1;
      end
      if (history == 8'hFF)      dbx <= 1'b1;
      else if (history == 8'h00) dbx <= 1'b0;
    end
  end
endmodule
