// tb_button_display: places notes on each string and checks which screen
// pixels the placement logic claims, and the image number and offsets it
// gives. A note on string k (column k+2) is a 32x32 box centred on
// x = 156 + 50k and on the note's y.
module tb_button_display;
  import guitar_pkg::*;
  logic signed [10:0] xcoord, ycoord;
  cell_t note;
  logic enable;
  logic [2:0] sprite;
  logic [4:0] px, py;
  int checks = 0, failures = 0;

  button_display dut (.*);

  task automatic probe(int x, int y);
    int k = int'(note.col) - 2;
    int cx = 156 + 50 * k, cy = int'(note.y);
    bit hit = (note.col >= 2) && (note.col <= 6) &&
                 x >= cx - 16 && x < cx + 16 && y >= cy - 16 && y < cy + 16;
    xcoord = 11'(x); ycoord = 11'(y);
    #1;
    checks++;
    if (enable !== hit) begin
      failures++;
      $display("col %0d y %0d pixel (%0d,%0d): enable %b expected %b", note.col, note.y, x, y, enable, hit);
    end else if (hit && (sprite !== 3'(k) || px !== 5'(x - cx + 16) || py !== 5'(y - cy + 16))) begin
      failures++;
      $display("pixel (%0d,%0d): image %0d at (%0d,%0d)", x, y, sprite, px, py);
    end
  endtask

  initial begin
    for (int col = 0; col < 8; col++) begin
      note = '0;
      note.col = 3'(col);
      note.y = 10'(100 + 37 * col);
      note.display = 1'b1;
      // box edges and its neighbours
      for (int d = -18; d <= 18; d++) begin
        probe(156 + 50 * (col - 2) + d, int'(note.y));
        probe(156 + 50 * (col - 2), int'(note.y) + d);
        probe(156 + 50 * (col - 2) + d, int'(note.y) - 16);
        probe(156 + 50 * (col - 2) + 15, int'(note.y) + d);
      end
      for (int i = 0; i < 200; i++) probe($urandom % 640, $urandom % 480);
    end
    // a note partly above the screen top
    note = '0; note.col = 3'd4; note.y = 10'd5;
    for (int y = 0; y < 30; y++) probe(256, y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
