// tb_song_workload: plays the whole song's note schedule through the
// system. The testbench acts as the game software on a shortened timer
// tick (200 clocks instead of 10 ms; all else at default sizes). On each
// tick it clears the timer, moves every note on screen 2 pixels down,
// frees notes that have left the screen, and compares the tick count with
// the next beat time read from the beat ROM. When the time is reached,
// it places a new note at the top in a free VGA cell (colour = beat
// number mod 5). The run covers all 465 beats (196.7 s of song time) and
// checks that the beat times never decrease, that a free cell is always
// there (at most 15 notes on screen), and that the last beat is 196.71 s.
// It then stops the timer and checks on the VGA outputs that the centre
// pixel of every note still on screen has that note's colour.
module tb_song_workload;
  localparam int TICK = 200;             // clocks per timer tick
  logic clk = 0, rst_n = 0;
  logic [22:0] avm_address = '0;
  logic avm_read = 0, avm_write = 0;
  logic [15:0] avm_writedata = '0, avm_readdata;
  logic avm_readdatavalid, irq_input, irq_music, irq_timer;
  logic fl_read, fl_write, fl_rst_n;
  logic [21:0] fl_address;
  logic [15:0] fl_writedata;
  logic [15:0] fl_readdata = '0;
  logic fl_readdatavalid = 0;
  logic [4:0] gpio_keys = '1;
  logic [3:0][6:0] hex;
  logic aud_adclrck, aud_adcdat = 0, aud_daclrck, aud_dacdat, aud_bclk, aud_xck;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;

  guitar_top #(.TIMER_LOAD(TICK - 1), .POR_BITS(4)) dut (.*);
  always #10 clk = !clk;

  int checks = 0, failures = 0, errors_shown = 0;
  task automatic fail(string msg);
    failures++;
    if (errors_shown++ < 20) $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic bus_write(int a, logic [15:0] d);
    @(negedge clk); avm_address = 23'(a); avm_write = 1; avm_writedata = d;
    @(negedge clk); avm_write = 0;
  endtask

  task automatic bus_read(int a, output logic [15:0] d);
    int n = 0;
    @(negedge clk); avm_address = 23'(a); avm_read = 1;
    @(negedge clk); avm_read = 0;
    while (!avm_readdatavalid && n < 20) begin @(negedge clk); n++; end
    d = avm_readdata;
  endtask

  // software view of the 15 note cells
  int note_col [1:15];   // 0: free
  int note_y   [1:15];

  // note colours as drawn (10-bit R, G, B) for colour codes 2..6
  logic [29:0] fill [5] = '{{10'h000, 10'h320, 10'h000}, {10'h370, 10'h000, 10'h000},
                            {10'h3c0, 10'h370, 10'h000}, {10'h000, 10'h140, 10'h3c0},
                            {10'h3e8, 10'h208, 10'h000}};

  // ------------------------------------------------------------ monitor
  bit frozen = 0, frame_done = 0;
  int frame_state = 0, pixel_checks = 0;
  logic hs_q = 1, vs_q = 1;
  int p = 0, line = 0;
  always @(posedge vga_clk) if (fl_rst_n) begin
    if (!vga_hs && hs_q) begin p = 0; line++; end
    if (!vga_vs && vs_q) begin
      line = 0;
      if (frame_state == 1) begin frame_state = 2; frame_done = 1; end
      if (frame_state == 0 && frozen) frame_state = 1;
    end
    if (frame_state == 1)
      for (int c = 1; c <= 15; c++)
        if (note_col[c] != 0 && note_y[c] < 480 && p - 144 == 156 + 50 * (note_col[c] - 2) && line - 35 == note_y[c]) begin
          checks++;
          pixel_checks++;
          if ({vga_r, vga_g, vga_b} !== fill[note_col[c] - 2])
            fail($sformatf("note in cell %0d at y=%0d shows %h", c, note_y[c], {vga_r, vga_g, vga_b}));
        end
    hs_q = vga_hs;
    vs_q = vga_vs;
    p++;
  end

  initial begin
    logic [15:0] d, beat_time, prev_time;
    int tick, beat, on_screen, max_on_screen, free_cell, last_beat_tick, visible;
    for (int c = 1; c <= 15; c++) begin note_col[c] = 0; note_y[c] = 0; end
    tick = 0; beat = 0; max_on_screen = 0; prev_time = 0; last_beat_tick = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (fl_rst_n);
    bus_read(0, beat_time);
    bus_write('h1402, 16'h0007);
    while (beat < 465) begin
      @(negedge clk);
      if (!irq_timer) continue;
      bus_write('h1400, 16'h0000);
      tick++;
      // move the notes down, free those that have left the screen
      on_screen = 0;
      for (int c = 1; c <= 15; c++) if (note_col[c] != 0) begin
        note_y[c] += 2;
        if (note_y[c] > 480 + 16) begin
          note_col[c] = 0;
          bus_write('h1000 + 2 * c, 16'h0000);
        end else begin
          bus_write('h1000 + 2 * c, 16'((1 << 13) | (note_y[c] << 3) | note_col[c]));
          on_screen++;
        end
      end
      // new notes whose time has come
      while (beat < 465 && tick >= int'(beat_time)) begin
        free_cell = 0;
        for (int c = 15; c >= 1; c--) if (note_col[c] == 0) free_cell = c;
        checks++;
        if (free_cell == 0) fail($sformatf("no free cell for beat %0d", beat));
        else begin
          note_col[free_cell] = 2 + beat % 5;
          note_y[free_cell] = 0;
          bus_write('h1000 + 2 * free_cell, 16'((1 << 13) | note_col[free_cell]));
          on_screen++;
        end
        last_beat_tick = tick;
        beat++;
        prev_time = beat_time;
        bus_read(2 * beat, beat_time);
        if (beat < 465) begin
          checks++;
          if (beat_time < prev_time) fail($sformatf("beat %0d time %0d before %0d", beat, beat_time, prev_time));
        end
      end
      if (on_screen > max_on_screen) max_on_screen = on_screen;
    end
    checks++;
    if (last_beat_tick != 19671) fail($sformatf("last beat at tick %0d", last_beat_tick));
    checks++;
    if (beat_time !== 16'h0000) fail("beat table does not end with zero");
    // freeze the screen and look at it
    bus_write('h1402, 16'h0008);
    visible = 0;
    for (int c = 1; c <= 15; c++) if (note_col[c] != 0 && note_y[c] < 480) visible++;
    frozen = 1;
    wait (frame_done);
    checks++;
    if (pixel_checks != visible) fail($sformatf("%0d of %0d notes seen on screen", pixel_checks, visible));
    $display("song: %0d beats over %0d ticks, at most %0d notes on screen at once (15 cells), %0d checked on screen",
             beat, tick, max_on_screen, pixel_checks);
    checks++;
    if (max_on_screen > 15 || max_on_screen == 0) fail("notes on screen out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
