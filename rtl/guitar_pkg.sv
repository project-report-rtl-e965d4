// guitar_pkg: constants and types shared by the guitar game peripherals.
//
// Holds the 640x480 VGA timing, the layout of one note cell as the
// processor writes it into the display controller, the 32-bit sprite pixel
// word, the screen geometry of the five strings, the hit bar and the score
// balls, and the one-hot key codes of the input controller.  The VGA timing,
// the cell layout, the pixel word, the string positions and the bar
// rectangle follow the original design; the score ball geometry and the
// sprite colours are this design's own choices.
package guitar_pkg;

  // ---------------------------------------------------------------- VGA
  localparam int unsigned H_TOTAL  = 800;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BACK   = 48;
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FRONT  = 16;
  localparam int unsigned V_TOTAL  = 525;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BACK   = 33;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FRONT  = 10;

  // ---------------------------------------------------------------- cells
  localparam int unsigned NUM_CELLS   = 16;  // cell 0 holds the ball count
  localparam int unsigned SPRITE_SIZE = 32;
  localparam int unsigned NUM_SPRITES = 5;

  // One display cell, 15 bits, as written by the processor.
  typedef struct packed {
    logic       wrong;    // [14] correct/wrong flag (stored, not drawn)
    logic       display;  // [13] display flag (stored, not drawn)
    logic [9:0] y;        // [12:3] vertical position of the note centre
    logic [2:0] col;      // [2:0]  colour / string, 2..6 drawn, 0 = empty
  } cell_t;

  // First and last colour code that is drawn; colour c sits on string c-2.
  localparam logic [2:0] COL_FIRST = 3'd2;
  localparam logic [2:0] COL_LAST  = 3'd6;

  // ---------------------------------------------------------------- pixels
  // Sprite ROM word: 10-bit channels, 8-bit colour in the upper 8 bits.
  typedef struct packed {
    logic       rsvd;
    logic       transparent;  // [30]
    logic [9:0] b;            // [29:20]
    logic [9:0] g;            // [19:10]
    logic [9:0] r;            // [9:0]
  } sprite_px_t;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb_t;

  // ---------------------------------------------------------------- screen
  localparam int STRING_X0    = 156;  // x of the first string
  localparam int STRING_PITCH = 50;   // distance between strings
  localparam int BAR_X_MIN    = 140;  // hit bar, exclusive bounds
  localparam int BAR_X_MAX    = 370;
  localparam int BAR_Y_MIN    = 380;
  localparam int BAR_Y_MAX    = 400;
  localparam rgb_t BAR_RGB    = '{r: 10'h000, g: 10'h0ff, b: 10'h0ff};
  localparam rgb_t WHITE_RGB  = '{r: 10'h3ff, g: 10'h3ff, b: 10'h3ff};
  localparam rgb_t BLACK_RGB  = '{r: 10'h000, g: 10'h000, b: 10'h000};
  localparam rgb_t BALL_RGB   = '{r: 10'h280, g: 10'h100, b: 10'h3fc};

  // Score balls in the upper right corner, biggest first.
  localparam int NUM_BALLS = 5;
  localparam int BALL_Y    = 40;
  localparam int BALL_X [NUM_BALLS] = '{500, 540, 572, 596, 612};
  localparam int BALL_R [NUM_BALLS] = '{20, 16, 12, 8, 4};

  // ---------------------------------------------------------------- keys
  localparam int unsigned NUM_KEYS = 5;

  // ---------------------------------------------------------------- bus
  // Slaves on the Avalon bus and their byte address windows.
  localparam int unsigned NUM_SLAVES = 7;
  localparam int unsigned SLV_BEAT  = 0;  // 0x000000 - 0x0007FF
  localparam int unsigned SLV_VGA   = 1;  // 0x001000 - 0x00101F
  localparam int unsigned SLV_INPUT = 2;  // 0x001100 - 0x00110F
  localparam int unsigned SLV_SCORE = 3;  // 0x001200 - 0x00120F
  localparam int unsigned SLV_MUSIC = 4;  // 0x001300 - 0x00130F
  localparam int unsigned SLV_TIMER = 5;  // 0x001400 - 0x00140F
  localparam int unsigned SLV_FLASH = 6;  // 0x400000 - 0x7FFFFF
  localparam int unsigned BUS_AW    = 23; // byte address width

endpackage
