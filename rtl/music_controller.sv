// music_controller: Avalon slave that feeds 8-bit song samples to the codec.
//
// The codec interface (wm8731_audio) asks for a sample at every falling
// LRCK edge.  A two-state machine turns that into an interrupt:
//   IDLE    - irq low; a sample request moves to WAITING
//   WAITING - irq high until the processor writes the next sample, which
//             is latched and the machine returns to IDLE.
// Writes in IDLE are ignored.  The latched 8-bit sample is sent as the
// upper byte of a 16-bit word (lower byte 0).  AUD_XCK, the codec master
// clock, is the system clock divided by 4 (12.5 MHz from 50 MHz), and the
// codec interface advances on the matching clock-enable cycle.  A read
// returns the latched sample one cycle later.
// State machine, padding and clock division follow the original design;
// the read-back and the clock enable are this design's.
module music_controller #(
  parameter int unsigned LRCK_DIV = 780
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       chipselect,
  input  logic       read,
  input  logic       write,
  input  logic [1:0] address,
  input  logic [7:0] writedata,
  output logic [7:0] readdata,
  output logic       irq,
  output logic       aud_adclrck,
  input  logic       aud_adcdat,   // ADC path unused: the game only plays
  output logic       aud_daclrck,
  output logic       aud_dacdat,
  output logic       aud_bclk,
  output logic       aud_xck
);
  typedef enum logic {IDLE, WAITING} state_e;
  state_e state;

  logic [1:0] xck_div;
  logic       codec_ce, sample_request, we;
  logic [7:0] sample_q;

  assign we = chipselect && write;

  always_ff @(posedge clk) begin
    if (!reset_n) xck_div <= '0;
    else          xck_div <= xck_div + 1'b1;
  end
  assign aud_xck  = xck_div[1];
  assign codec_ce = (xck_div == 2'b01);  // the edge where aud_xck rises

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      state    <= IDLE;
      sample_q <= '0;
      readdata <= '0;
    end else begin
      unique case (state)
        IDLE:    if (sample_request) state <= WAITING;
        WAITING: if (we) begin
                   sample_q <= writedata;
                   state    <= IDLE;
                 end
        default: state <= IDLE;
      endcase
      if (chipselect && read) readdata <= sample_q;
    end
  end

  assign irq = (state == WAITING);

  wm8731_audio #(.LRCK_DIV(LRCK_DIV)) u_codec (
    .clk, .reset_n, .ce(codec_ce), .test_mode(1'b0),
    .sample({sample_q, 8'h00}), .sample_request,
    .aud_adclrck, .aud_daclrck, .aud_dacdat, .aud_bclk
  );

  // address selects nothing: the component has a single register.
endmodule
