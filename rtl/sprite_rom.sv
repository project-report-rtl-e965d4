// sprite_rom: the five 32x32 note sprites, 32-bit pixel words.
//
// Word address = sprite * 1024 + x * 32 + y (column-major within a
// sprite), sprite 0..4.  A word holds 10-bit blue [29:20], green [19:10]
// and red [9:0] channels with the 8-bit colour in the upper 8 bits of each,
// and bit 30 set for a transparent pixel (then RGB = 0).  Read is
// synchronous: data follows addr one clock later when en is high.
// Address layout and word format follow the original design.  The images
// themselves are this design's: each sprite is a round button, a filled
// disc of radius 13 in the sprite's colour inside a white ring out to
// radius 15, computed at elaboration; outside the ring is transparent.
// Colours: sprite 0 green, 1 red, 2 yellow, 3 blue, 4 orange.
module sprite_rom (
  input  logic        clk,
  input  logic        en,
  input  logic [12:0] addr,
  output logic [31:0] data
);
  import guitar_pkg::*;

  localparam int unsigned WORDS = NUM_SPRITES * SPRITE_SIZE * SPRITE_SIZE;

  function automatic logic [31:0] pixel(int unsigned s, int x, int y);
    int dx, dy, r2;
    logic [7:0] cr, cg, cb;
    dx = 2 * x - 31;  // distance to the centre, in half pixels
    dy = 2 * y - 31;
    r2 = dx * dx + dy * dy;
    case (s)
      0:       {cr, cg, cb} = {8'd0,   8'd200, 8'd0};
      1:       {cr, cg, cb} = {8'd220, 8'd0,   8'd0};
      2:       {cr, cg, cb} = {8'd240, 8'd220, 8'd0};
      3:       {cr, cg, cb} = {8'd0,   8'd80,  8'd240};
      default: {cr, cg, cb} = {8'd250, 8'd130, 8'd0};
    endcase
    if (r2 > 900)      return 32'h4000_0000;  // outside radius 15
    else if (r2 > 676) return {2'b00, 8'hff, 2'b00, 8'hff, 2'b00, 8'hff, 2'b00};
    else               return {2'b00, cb, 2'b00, cg, 2'b00, cr, 2'b00};
  endfunction

  logic [31:0] rom [WORDS];

  initial begin
    for (int s = 0; s < int'(NUM_SPRITES); s++)
      for (int x = 0; x < 32; x++)
        for (int y = 0; y < 32; y++)
          rom[s * 1024 + x * 32 + y] = pixel(s, x, y);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
