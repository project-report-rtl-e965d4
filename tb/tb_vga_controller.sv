// tb_vga_controller: loads note cells and a ball count over the Avalon
// port, reads them back, then watches the VGA outputs the way a monitor
// would. Pixels are taken on rising vga_clk edges and placed from the
// falling edges of hsync and vsync. For two frames it checks the 640x480
// timing (800 pixels x 525 lines, 96-pixel hsync, 2-line vsync, active
// area from pixel 144 and line 35), the blanking, every background pixel
// (strings, hit bar, score balls, black) and the centre, rim and corner of
// every note.
module tb_vga_controller;
  logic clk = 0, reset_n = 0, chipselect = 0, read = 0, write = 0;
  logic [3:0] address = '0;
  logic [15:0] writedata = '0, readdata;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0, errors_shown = 0;

  vga_controller dut (.*);
  always #5 clk = !clk;

  task automatic fail(string msg);
    failures++;
    if (errors_shown++ < 20) $display("FAIL at %0t: %s", $time, msg);
  endtask

  task automatic bus_write(int a, logic [15:0] d);
    @(negedge clk); chipselect = 1; write = 1; address = 4'(a); writedata = d;
    @(negedge clk); chipselect = 0; write = 0;
  endtask

  // note in a cell: string column (2..6), y centre, display and wrong bits
  function automatic logic [15:0] note(int col, int y);
    return 16'((1 << 13) | (y << 3) | col);
  endfunction

  localparam int BALLS = 3;
  int ncol [4] = '{2, 4, 6, 3};
  int ny   [4] = '{200, 390, 60, 470};
  logic [29:0] fill [5] = '{{10'h000, 10'h320, 10'h000}, {10'h370, 10'h000, 10'h000},
                            {10'h3c0, 10'h370, 10'h000}, {10'h000, 10'h140, 10'h3c0},
                            {10'h3e8, 10'h208, 10'h000}};

  function automatic logic [29:0] background(int x, int y);
    int bx [5] = '{500, 540, 572, 596, 612};
    int br [5] = '{20, 16, 12, 8, 4};
    for (int k = 0; k < BALLS; k++)
      if ((x - bx[k]) * (x - bx[k]) + (y - 40) * (y - 40) <= br[k] * br[k])
        return {10'h280, 10'h100, 10'h3fc};
    if (x > 140 && x < 370 && y > 380 && y < 400) return {10'h000, 10'h0ff, 10'h0ff};
    for (int k = 0; k < 5; k++) if (x == 156 + 50 * k) return '1;
    return '0;
  endfunction

  // -1: not in a note box; else index of the note that covers (x, y)
  function automatic int note_at(int x, int y);
    for (int i = 0; i < 4; i++) begin
      int cx = 156 + 50 * (ncol[i] - 2);
      if (x >= cx - 16 && x < cx + 16 && y >= ny[i] - 16 && y < ny[i] + 16) return i;
    end
    return -1;
  endfunction

  // monitor side
  logic hs_q = 1, vs_q = 1;
  int p = -100000, line = -100000, frames = 0, line_len = 0, hs_low = 0, vs_low_lines = 0;
  int note_pixels = 0;

  always @(posedge vga_clk) if (reset_n && frames < 3) begin
    if (!vga_hs && hs_q) begin
      if (frames > 0 && line >= 0) begin
        checks++;
        if (p != 800) fail($sformatf("line of %0d pixels", p));
      end
      p = 0;
      line++;
      if (!vga_vs) vs_low_lines++;
    end
    if (!vga_vs && vs_q) begin
      if (frames > 0) begin
        checks++;
        if (line != 525) fail($sformatf("frame of %0d lines", line));
        checks++;
        if (vs_low_lines != 2 + 1) fail($sformatf("vsync low for %0d lines", vs_low_lines - 1));
      end
      vs_low_lines = 1;
      line = 0;
      frames++;
    end
    if (p == 96 && frames > 0) begin
      checks++;
      if (hs_low != 96) fail($sformatf("hsync low for %0d pixels", hs_low));
    end
    if (!vga_hs) hs_low = (!vga_hs && hs_q) ? 1 : hs_low + 1;
    if (frames > 0 && line >= 0) begin
      automatic int x = p - 144, y = line - 35;
      automatic bit act = x >= 0 && x < 640 && y >= 0 && y < 480;
      checks++;
      if (vga_blank_n !== act) fail($sformatf("blank_n=%b at pixel %0d line %0d", vga_blank_n, p, line));
      if (act) begin
        automatic int n = note_at(x, y);
        automatic logic [29:0] got = {vga_r, vga_g, vga_b};
        if (n < 0) begin
          checks++;
          if (got !== background(x, y)) fail($sformatf("(%0d,%0d) colour %h expected %h", x, y, got, background(x, y)));
        end else begin
          automatic int cx = 156 + 50 * (ncol[n] - 2);
          note_pixels++;
          if (x == cx && y == ny[n]) begin
            checks++;
            if (got !== fill[ncol[n] - 2]) fail($sformatf("note %0d centre %h", n, got));
          end
          if (x == cx && y == ny[n] - 15) begin
            checks++;
            if (got !== {3{10'h3fc}}) fail($sformatf("note %0d rim %h", n, got));
          end
          if ((x == cx - 16 || x == cx + 15) && (y == ny[n] - 16 || y == ny[n] + 15)) begin
            checks++;
            if (got !== background(x, y)) fail($sformatf("note %0d corner (%0d,%0d) %h", n, x, y, got));
          end
        end
      end else begin
        checks++;
        if ({vga_r, vga_g, vga_b} !== '0) fail("colour outside the active area");
      end
    end
    checks++;
    if (vga_sync_n !== 0) fail("sync_n not low");
    hs_q = vga_hs;
    vs_q = vga_vs;
    p++;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    bus_write(0, 16'(BALLS));
    for (int i = 0; i < 4; i++) bus_write(i + 1, note(ncol[i], ny[i]));
    bus_write(9, note(0, 100));                 // column 0: not drawn
    bus_write(10, 16'hffff);                    // column 7: not drawn
    bus_write(11, 16'h4000 | note(7, 300));
    // read back (bit 15 is not stored)
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); chipselect = 1; read = 1; address = 4'(i + 1);
      @(negedge clk); chipselect = 0; read = 0;
      checks++;
      if (readdata !== note(ncol[i], ny[i])) fail($sformatf("cell %0d read %h", i + 1, readdata));
    end
    @(negedge clk); chipselect = 1; read = 1; address = 4'd10;
    @(negedge clk); chipselect = 0; read = 0;
    checks++;
    if (readdata !== 16'h7fff) fail($sformatf("cell 10 read %h", readdata));
    wait (frames == 3);
    checks++;
    if (note_pixels != 2 * (3 * 32 * 32 + 26 * 32))  // note 3 runs 6 rows past the bottom
      fail($sformatf("%0d pixels in note boxes", note_pixels));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
