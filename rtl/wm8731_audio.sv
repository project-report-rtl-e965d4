// wm8731_audio: serialises 16-bit samples to the WM8731 audio codec DAC.
//
// The codec runs as slave in left-justified mode; this block makes its
// clocks.  Everything advances only on cycles where ce is high (the codec
// clock domain, one quarter of the system clock in this design):
//   - LRCK toggles every LRCK_DIV+1 ce-cycles (781), so one LRCK period is
//     1562 ce-cycles: 8.0 kHz at a 12.5 MHz codec clock.
//   - BCLK has a period of 12 ce-cycles: it rises at count 5 and falls at
//     count 11 of a 0..11 counter that restarts at each LRCK edge.
//   - At each LRCK edge a 16-bit shift register loads the sample (or, in
//     test mode, the next value of a 48-entry sine table), and shifts left
//     on each BCLK fall; DACDAT is its MSB.  Both channels play the same
//     word.
//   - sample_request pulses for one system-clock cycle after each falling
//     LRCK edge: the next sample is wanted.
// Divider values, BCLK phase and the sine test mode follow the original
// design.  The clock enable (instead of a divided clock), the one-cycle
// request pulse and the sine table computed from sin() are this design's.
module wm8731_audio #(
  parameter int unsigned LRCK_DIV = 780   // LRCK half period - 1, in ce-cycles
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        ce,
  input  logic        test_mode,
  input  logic [15:0] sample,
  output logic        sample_request,
  output logic        aud_adclrck,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_bclk
);
  localparam int unsigned SINE_LEN = 48;
  localparam int unsigned LW = $clog2(LRCK_DIV + 1);

  typedef logic [15:0] sine_t [SINE_LEN];

  function automatic sine_t make_sine();
    sine_t t;
    for (int i = 0; i < SINE_LEN; i++)
      t[i] = 16'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * i / SINE_LEN))));
    return t;
  endfunction

  localparam sine_t SINE = make_sine();

  logic [LW-1:0] lrck_div;
  logic [3:0]    bclk_div;
  logic          lrck, lrck_lat, bclk;
  logic [15:0]   shift;
  logic [5:0]    sin_idx;
  logic          set_lrck, set_bclk, clr_bclk;

  assign set_lrck = (lrck_div == LW'(LRCK_DIV));
  assign set_bclk = (bclk_div == 4'd5);
  assign clr_bclk = (bclk_div == 4'd11);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      lrck_div <= '0;
      bclk_div <= '0;
      lrck     <= 1'b0;
      lrck_lat <= 1'b0;
      bclk     <= 1'b0;
      shift    <= '0;
      sin_idx  <= '0;
    end else if (ce) begin
      lrck_div <= set_lrck ? '0 : lrck_div + 1'b1;
      bclk_div <= (set_lrck || clr_bclk) ? 4'd0 : bclk_div + 1'b1;
      if (set_lrck) lrck <= !lrck;
      lrck_lat <= lrck;

      if (set_lrck || clr_bclk) bclk <= 1'b0;
      else if (set_bclk)        bclk <= 1'b1;

      if (set_lrck)      shift <= test_mode ? SINE[sin_idx] : sample;
      else if (clr_bclk) shift <= {shift[14:0], 1'b0};

      if (lrck_lat && !lrck)
        sin_idx <= (sin_idx == 6'(SINE_LEN - 1)) ? '0 : sin_idx + 1'b1;
    end
  end

  // One system-clock-cycle request after each falling LRCK edge.
  always_ff @(posedge clk) begin
    if (!reset_n)  sample_request <= 1'b0;
    else if (ce)   sample_request <= lrck_lat && !lrck;
    else           sample_request <= 1'b0;
  end

  assign aud_adclrck = lrck;
  assign aud_daclrck = lrck;
  assign aud_dacdat  = shift[15];
  assign aud_bclk    = bclk;
endmodule
