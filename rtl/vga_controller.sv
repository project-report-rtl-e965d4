// vga_controller: Avalon slave that draws the game screen on a 640x480
// VGA monitor.
//
// The processor writes 16 cells of 15 bits (word addresses 0..15, see
// guitar_pkg::cell_t).  Cell 0 holds the number of score balls (0..5);
// cells 1..15 hold falling notes: colour code and vertical position.
// For every pixel the 15 note cells are tested in parallel by
// button_display units; the lowest-numbered cell that covers the pixel
// wins and addresses the sprite ROM.  The pixel colour is, in order of
// priority: an opaque sprite pixel, a score ball, the hit bar, a string
// (white vertical lines at x = 156 + 50k), black.
//
// Timing: the pixel clock is clk/2 (25 MHz from 50 MHz), run as a clock
// enable.  Counters advance on enable cycles; the next cycle the sprite
// ROM and the per-pixel tests are registered; on the following enable
// cycle colour, sync and blank are registered together, so all outputs
// show pixel n one pixel clock after the counters reached n.  VGA_CLK
// rises midway through each output pixel.  HSYNC/VSYNC are active low,
// 800x525 total (96/48/640/16 and 2/33/480/10).
// Avalon reads return {1'b0, cell} one clock after the read strobe.
// The cell layout, the 16-cell RAM, sprite lookup, strings, bar and VGA
// timing follow the original design; the drawing order, the ball
// geometry and colours and the blanking output are this design's.
module vga_controller (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [3:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);
  import guitar_pkg::*;

  cell_t cells [NUM_CELLS];

  // ---------------------------------------------------------- Avalon side
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      for (int i = 0; i < int'(NUM_CELLS); i++) cells[i] <= '0;
      readdata <= '0;
    end else if (chipselect) begin
      if (read)       readdata <= {1'b0, cells[address]};
      else if (write) cells[address] <= writedata[14:0];
    end
  end

  // ---------------------------------------------------------- counters
  logic       pix_ce;
  logic [9:0] hcount, vcount;
  logic       end_of_line, end_of_field;

  always_ff @(posedge clk) begin
    if (!reset_n) pix_ce <= 1'b0;
    else          pix_ce <= !pix_ce;
  end

  assign end_of_line  = (hcount == 10'(H_TOTAL - 1));
  assign end_of_field = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      hcount <= end_of_line ? '0 : hcount + 1'b1;
      if (end_of_line) vcount <= end_of_field ? '0 : vcount + 1'b1;
    end
  end

  logic signed [10:0] xcoord, ycoord;
  assign xcoord = $signed({1'b0, hcount}) - 11'sd144;  // H_SYNC + H_BACK
  assign ycoord = $signed({1'b0, vcount}) - 11'sd35;   // V_SYNC + V_BACK

  // ---------------------------------------------------------- note cells
  logic [NUM_CELLS-1:1] hit;
  logic [2:0]           hit_sprite [NUM_CELLS];
  logic [4:0]           hit_px [NUM_CELLS], hit_py [NUM_CELLS];

  assign hit_sprite[0] = '0;
  assign hit_px[0]     = '0;
  assign hit_py[0]     = '0;

  for (genvar i = 1; i < NUM_CELLS; i++) begin : g_cell
    button_display u_btn (
      .xcoord, .ycoord, .note(cells[i]),
      .enable(hit[i]), .sprite(hit_sprite[i]), .px(hit_px[i]), .py(hit_py[i])
    );
  end

  logic        any_hit;
  logic [12:0] rom_addr;

  always_comb begin
    any_hit  = 1'b0;
    rom_addr = '0;
    for (int i = NUM_CELLS - 1; i >= 1; i--)
      if (hit[i]) begin
        any_hit  = 1'b1;
        rom_addr = {hit_sprite[i], hit_px[i], hit_py[i]};
      end
  end

  // ---------------------------------------------------------- background
  logic on_string, on_bar, on_ball;

  always_comb begin
    on_string = 1'b0;
    for (int k = 0; k < 5; k++)
      if (xcoord == 11'(STRING_X0 + STRING_PITCH * k)) on_string = 1'b1;
    on_bar = (xcoord > 11'(BAR_X_MIN)) && (xcoord < 11'(BAR_X_MAX)) &&
             (ycoord > 11'(BAR_Y_MIN)) && (ycoord < 11'(BAR_Y_MAX));
    on_ball = 1'b0;
    for (int k = 0; k < NUM_BALLS; k++) begin
      int dx, dy;
      dx = int'(xcoord) - BALL_X[k];
      dy = int'(ycoord) - BALL_Y;
      if (k < int'(cells[0]) && dx * dx + dy * dy <= BALL_R[k] * BALL_R[k])
        on_ball = 1'b1;
    end
  end

  // ---------------------------------------------------------- stage 1
  sprite_px_t rom_px;
  logic       s_hit, s_string, s_bar, s_ball;

  sprite_rom u_sprites (.clk, .en(1'b1), .addr(rom_addr), .data(rom_px));

  always_ff @(posedge clk) begin
    s_hit    <= any_hit;
    s_string <= on_string;
    s_bar    <= on_bar;
    s_ball   <= on_ball;
  end

  // ---------------------------------------------------------- stage 2
  logic active;
  rgb_t colour;

  assign active = (xcoord >= 0) && (xcoord < 11'(H_ACTIVE)) &&
                  (ycoord >= 0) && (ycoord < 11'(V_ACTIVE));

  always_comb begin
    if (s_hit && !rom_px.transparent) colour = '{r: rom_px.r, g: rom_px.g, b: rom_px.b};
    else if (s_ball)                  colour = BALL_RGB;
    else if (s_bar)                   colour = BAR_RGB;
    else if (s_string)                colour = WHITE_RGB;
    else                              colour = BLACK_RGB;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      {vga_r, vga_g, vga_b} <= '0;
    end else if (pix_ce) begin
      vga_hs      <= !(hcount < 10'(H_SYNC));
      vga_vs      <= !(vcount < 10'(V_SYNC));
      vga_blank_n <= active;
      {vga_r, vga_g, vga_b} <= active ? colour : BLACK_RGB;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) vga_clk <= 1'b0;
    else          vga_clk <= !pix_ce;  // falls as a pixel starts, rises mid-pixel
  end

  assign vga_sync_n = 1'b0;  // no sync-on-green
endmodule
