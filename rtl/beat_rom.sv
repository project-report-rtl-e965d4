// beat_rom: the song's beat time stamps, 1024 words of 16 bits.
//
// Each word is the time of one beat in units of 0.01 s from the start of
// the song, in increasing order; unused words are 0.  Read is synchronous:
// with en high, data shows the word at address one clock later, and holds
// while en is low.  The contents come from rtl/beat_rom.hex (465 beats of
// the original song table; where that table could not be recovered the
// sequence simply jumps ahead in time).  Size and read behaviour follow
// the original design.
module beat_rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned AW        = 10,
  parameter              INIT_FILE = "rtl/beat_rom.hex"
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] address,
  output logic [15:0]   data
);
  logic [15:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[address];
  end
endmodule
