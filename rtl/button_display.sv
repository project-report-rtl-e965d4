// button_display: decides whether one note cell covers the current pixel.
//
// Combinational.  A cell with colour code col in 2..6 draws a 32x32
// sprite centred on string col-2 (x = 156 + 50*(col-2)) and on row y of
// the cell: it covers the pixel when the pixel lies within 16 pixels left
// or above and 15 right or below that centre.  Then enable is 1, sprite is
// the sprite number col-2 and (px, py) the pixel's column and row inside
// the sprite.  Any other colour code (0 = empty cell) draws nothing.
// The interface (enable, sprite number, sprite pixel indexes) follows the
// original design; the centring and the mapping of colour to string are
// this design's reading of it.
module button_display (
  input  logic signed [10:0] xcoord,   // pixel column in the active area
  input  logic signed [10:0] ycoord,   // pixel row in the active area
  input  guitar_pkg::cell_t  note,
  output logic               enable,
  output logic [2:0]         sprite,
  output logic [4:0]         px,
  output logic [4:0]         py
);
  import guitar_pkg::*;

  logic signed [11:0] left, top, dx, dy;
  logic               drawn;

  always_comb begin
    drawn  = (note.col >= COL_FIRST) && (note.col <= COL_LAST);
    sprite = note.col - COL_FIRST;
    left   = 12'(STRING_X0 - 16) + 12'(STRING_PITCH) * $signed({9'b0, sprite});
    top    = $signed({2'b00, note.y}) - 12'sd16;
    dx     = 12'(xcoord) - left;
    dy     = 12'(ycoord) - top;
    enable = drawn && dx >= 0 && dx < 32 && dy >= 0 && dy < 32;
    px     = dx[4:0];
    py     = dy[4:0];
  end
endmodule
