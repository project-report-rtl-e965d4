// tb_guitar_top: end-to-end test of the whole game hardware at its default
// sizes (50 MHz clock: 0.1 s input dead time, 10 ms timer, 8 kHz sample
// requests). The testbench plays the processor, the flash chip, the
// guitar buttons, the audio codec and the monitor:
//   * the processor polls the three interrupts and serves them the way
//     the game software does: a music request is served by reading a
//     song byte from flash and writing it to the music controller; a
//     timer tick is cleared, a beat time is read from the beat ROM, a note
//     and the score-ball count are written to the VGA cells and the score
//     to the seven-segment displays; a key interrupt is read and cleared;
//   * the flash answers reads two cycles later with a word made from its
//     address;
//   * the buttons get a glitch, a bouncing press, a press inside the dead
//     time that follows a served key, and a press after it;
//   * the codec side rebuilds each serial word, the monitor side checks a
//     few pixels of a frame drawn after the cells were written.
// Each mechanism is counted; one that never happens is a failure.
module tb_guitar_top;
  logic clk = 0, rst_n = 0;
  logic [22:0] avm_address = '0;
  logic avm_read = 0, avm_write = 0;
  logic [15:0] avm_writedata = '0, avm_readdata;
  logic avm_readdatavalid, irq_input, irq_music, irq_timer;
  logic fl_read, fl_write, fl_rst_n;
  logic [21:0] fl_address;
  logic [15:0] fl_writedata, fl_readdata;
  logic fl_readdatavalid;
  logic [4:0] gpio_keys = '1;
  logic [3:0][6:0] hex;
  logic aud_adclrck, aud_adcdat = 0, aud_daclrck, aud_dacdat, aud_bclk, aud_xck;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;

  guitar_top dut (.*);
  always #10 clk = !clk;   // 50 MHz

  int checks = 0, failures = 0, errors_shown = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic fail(string msg);
    failures++;
    if (errors_shown++ < 30) $display("FAIL at cycle %0d: %s", cyc, msg);
  endtask

  // ------------------------------------------------------------ counters
  int n_power_on = 0, n_glitch_rejected = 0, n_key_irq = 0, n_key_code = 0;
  int n_dead_time = 0, n_music_req = 0, n_audio_word = 0, n_timer_tick = 0;
  int n_timer_period = 0, n_beat_read = 0, n_flash_read = 0, n_hex = 0;
  int n_sprite_px = 0, n_ball_px = 0, n_bar_px = 0, n_string_px = 0, n_black_px = 0;
  int n_cell_read = 0;

  // ------------------------------------------------------------ flash
  function automatic logic [15:0] flash_word(logic [21:0] a);
    return 16'(a * 37 + 11);
  endfunction
  logic [2:0] fl_pipe = '0;
  logic [21:0] fl_addr_q [3];
  always @(posedge clk) begin
    fl_pipe <= {fl_pipe[1:0], fl_read};
    fl_addr_q[0] <= fl_address;
    fl_addr_q[1] <= fl_addr_q[0];
    fl_addr_q[2] <= fl_addr_q[1];
  end
  assign fl_readdatavalid = fl_pipe[2];
  assign fl_readdata = fl_pipe[2] ? flash_word(fl_addr_q[2]) : 16'h0000;

  // ------------------------------------------------------------ bus
  task automatic bus_write(int a, logic [15:0] d);
    @(negedge clk); avm_address = 23'(a); avm_write = 1; avm_writedata = d;
    @(negedge clk); avm_write = 0;
  endtask

  task automatic bus_read(int a, output logic [15:0] d);
    int n = 0;
    @(negedge clk); avm_address = 23'(a); avm_read = 1;
    @(negedge clk); avm_read = 0;
    while (!avm_readdatavalid && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (!avm_readdatavalid) fail($sformatf("no read data from %h", a));
    d = avm_readdata;
  endtask

  // ------------------------------------------------------------ displays
  localparam logic [6:0] SEG [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12,
      7'h02, 7'h78, 7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};

  // ------------------------------------------------------------ codec
  logic [7:0] last_samples [2] = '{8'h00, 8'h00};
  int samples_sent = 0;
  logic bclk_q = 0, lrck_q = 0;
  logic [15:0] word = '0;
  int nbits = 0;
  always @(posedge clk) begin
    bclk_q <= aud_bclk;
    lrck_q <= aud_daclrck;
    if (aud_bclk && !bclk_q && nbits < 16) begin word = {word[14:0], aud_dacdat}; nbits++; end
    if (aud_daclrck != lrck_q) begin
      if (samples_sent >= 2) begin
        checks++;
        if (nbits != 16 || word[7:0] !== 8'h00 ||
            (word[15:8] !== last_samples[0] && word[15:8] !== last_samples[1]))
          fail($sformatf("codec word %h, samples %h %h", word, last_samples[0], last_samples[1]));
        else n_audio_word++;
      end
      nbits = 0;
    end
  end

  // ------------------------------------------------------------ monitor
  // Pixels are counted from the falling sync edges; active video starts
  // 144 pixels into a line and 35 lines into a frame.
  bit cells_ready = 0, frame_checked = 0;
  int frame_state = 0;  // 0 waiting, 1 checking the frame after cells_ready
  logic hs_q = 1, vs_q = 1;
  int p = 0, line = 0;
  localparam int NOTE_COL = 3, NOTE_Y = 240;   // red note on the second string
  always @(posedge vga_clk) if (fl_rst_n) begin
    if (!vga_hs && hs_q) begin p = 0; line++; end
    if (!vga_vs && vs_q) begin
      line = 0;
      if (frame_state == 1) begin frame_state = 2; frame_checked = 1; end
      if (frame_state == 0 && cells_ready) frame_state = 1;
    end
    if (frame_state == 1) begin
      automatic int x = p - 144, y = line - 35;
      automatic logic [29:0] got = {vga_r, vga_g, vga_b};
      if (x == 206 && y == NOTE_Y) begin
        checks++;
        if (got !== {10'h370, 10'h000, 10'h000}) fail($sformatf("note centre %h", got)); else n_sprite_px++;
      end
      if (x == 540 && y == 40) begin     // second score ball (two are shown)
        checks++;
        if (got !== {10'h280, 10'h100, 10'h3fc}) fail($sformatf("ball %h", got)); else n_ball_px++;
      end
      if (x == 572 && y == 40) begin     // third ball: not shown
        checks++;
        if (got !== '0) fail($sformatf("hidden ball %h", got)); else n_black_px++;
      end
      if (x == 300 && y == 390) begin
        checks++;
        if (got !== {10'h000, 10'h0ff, 10'h0ff}) fail($sformatf("bar %h", got)); else n_bar_px++;
      end
      if (x == 356 && y == 200) begin
        checks++;
        if (got !== '1) fail($sformatf("string %h", got)); else n_string_px++;
      end
    end
    hs_q = vga_hs;
    vs_q = vga_vs;
    p++;
  end

  // ------------------------------------------------------------ buttons
  int served = 0;   // key interrupts the processor has served
  int expected_key = -1;
  longint served_at = 0;

  task automatic bouncy_press(int k, int hold_cycles);
    for (int i = 0; i < 8; i++) begin
      gpio_keys[k] = i[0];
      repeat (1000 + $urandom % 3000) @(negedge clk);
    end
    gpio_keys[k] = 0;
    repeat (hold_cycles) @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      gpio_keys[k] = !i[0];
      repeat (1000 + $urandom % 3000) @(negedge clk);
    end
    gpio_keys[k] = 1;
  endtask

  bit keys_done = 0;
  initial begin
    wait (fl_rst_n);
    repeat (100_000) @(negedge clk);
    // glitch: 20 us low, far shorter than 8 debounce samples
    gpio_keys[1] = 0; repeat (1000) @(negedge clk); gpio_keys[1] = 1;
    repeat (900_000) @(negedge clk);
    checks++;
    if (irq_input) fail("glitch raised a key interrupt"); else n_glitch_rejected++;
    // a real press of key 2
    expected_key = 2;
    bouncy_press(2, 600_000);
    wait (served == 1);
    // a press inside the 0.1 s dead time is ignored
    repeat (200_000) @(negedge clk);
    expected_key = -1;
    bouncy_press(0, 500_000);
    repeat (100_000) @(negedge clk);
    checks++;
    if (irq_input) fail("key press in the dead time was reported"); else n_dead_time++;
    // once the dead time is over a press is reported again
    wait (cyc > served_at + 5_100_000);
    expected_key = 4;
    bouncy_press(4, 600_000);
    wait (served == 2);
    keys_done = 1;
  end

  // ------------------------------------------------------------ processor
  logic [15:0] beat_times [3] = '{16'h00b4, 16'h00c8, 16'h00f0};

  initial begin
    logic [15:0] d;
    longint last_tick = 0;
    int beat_idx = 0, score = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // power-on reset holds the system for 2^16 cycles
    repeat (60_000) @(negedge clk);
    checks++;
    if (fl_rst_n) fail("reset released too early");
    wait (fl_rst_n);
    checks++;
    if (cyc < 65_536 || cyc > 65_600) fail($sformatf("reset released at cycle %0d", cyc)); else n_power_on++;
    // start the 10 ms timer: continuous with interrupt
    bus_write('h1402, 16'h0007);
    forever begin
      @(negedge clk);
      if (irq_music) begin
        logic [21:0] fa;
        n_music_req++;
        fa = 22'(2 * samples_sent);
        bus_read('h400000 + int'(fa), d);
        checks++;
        if (d !== flash_word(fa)) fail($sformatf("flash read %h expected %h", d, flash_word(fa)));
        else n_flash_read++;
        bus_write('h1300, {8'h00, d[7:0]});
        last_samples[1] = last_samples[0];
        last_samples[0] = d[7:0];
        samples_sent++;
        checks++;
        if (irq_music) fail("music interrupt not cleared");
      end else if (irq_timer) begin
        if (last_tick != 0) begin
          checks++;
          // the processor may see the tick a few cycles late
          if (cyc - last_tick < 499_990 || cyc - last_tick > 500_060)
            fail($sformatf("timer period %0d", cyc - last_tick));
          else n_timer_period++;
        end
        last_tick = cyc;
        n_timer_tick++;
        bus_write('h1400, 16'h0000);
        checks++;
        if (irq_timer) fail("timer interrupt not cleared");
        if (beat_idx < 3) begin
          bus_read(2 * beat_idx, d);
          checks++;
          if (d !== beat_times[beat_idx]) fail($sformatf("beat %0d = %h", beat_idx, d)); else n_beat_read++;
          beat_idx++;
        end
        score = score * 7 + 3;
        bus_write('h1200, 16'(score));
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (hex[k] !== SEG[4'(16'(score) >> (4 * k))]) fail($sformatf("hex %0d", k)); else n_hex++;
        end
        if (!cells_ready) begin
          bus_write('h1000, 16'd2);                                           // two balls
          bus_write('h1002, 16'((1 << 13) | (NOTE_Y << 3) | NOTE_COL));       // one note
          bus_read('h1002, d);
          checks++;
          if (d !== 16'((1 << 13) | (NOTE_Y << 3) | NOTE_COL)) fail("cell read-back"); else n_cell_read++;
          cells_ready = 1;
        end
      end else if (irq_input) begin
        bus_read('h1100, d);
        n_key_irq++;
        checks++;
        if (expected_key < 0 || d !== 16'(1 << expected_key)) fail($sformatf("key code %h", d));
        else n_key_code++;
        bus_write('h1100, 16'h0000);
        served_at = cyc;
        served++;
      end
      if (keys_done && frame_checked && n_timer_period >= 3) break;
    end

    // every mechanism must have happened
    check_count("power-on reset release", n_power_on);
    check_count("key glitch rejected by the debouncer", n_glitch_rejected);
    check_count("key interrupt", n_key_irq);
    check_count("key code read", n_key_code);
    check_count("press ignored in dead time", n_dead_time);
    check_count("music sample request", n_music_req);
    check_count("flash read through the bridge", n_flash_read);
    check_count("audio word sent to the codec", n_audio_word);
    check_count("timer tick", n_timer_tick);
    check_count("timer period", n_timer_period);
    check_count("beat read", n_beat_read);
    check_count("score on displays", n_hex);
    check_count("cell read-back", n_cell_read);
    check_count("note sprite pixel", n_sprite_px);
    check_count("score ball pixel", n_ball_px);
    check_count("hidden ball", n_black_px);
    check_count("hit bar pixel", n_bar_px);
    check_count("string pixel", n_string_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) fail($sformatf("%s never happened", what));
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog: keys_done=%0d frame_checked=%0d ticks=%0d", keys_done, frame_checked, n_timer_tick);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
