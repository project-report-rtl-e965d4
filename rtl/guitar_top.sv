// guitar_top: the FPGA side of the guitar game on a DE2-class board.
//
// The processor (outside this module) reaches six on-chip peripherals and
// the song flash over one Avalon bus (avalon_decoder):
//   beat_controller   beat time stamps of the song (polled)
//   vga_controller    note cells and score balls, drawn on the monitor
//   input_controller  five guitar buttons -> irq_input
//   score_controller  16-bit score on HEX3..HEX0
//   music_controller  8-bit samples to the audio codec -> irq_music
//   interval_timer    0.01 s time base -> irq_timer
// The flash window is passed out unchanged (fl_*) to the flash tristate
// bridge, and the three interrupt lines go out to the processor.
// Reset: a power-on counter holds the system in reset for 2^POR_BITS - 1
// clocks after configuration or after rst_n is released; fl_rst_n mirrors
// the internal reset.  All logic runs on the one 50 MHz clock.
// Which blocks exist, how they connect and the power-on reset follow the
// original design; the address map (see guitar_pkg) and the external rst_n
// are this design's.
module guitar_top #(
  parameter int unsigned DEBOUNCE_DELAY = 50000,
  parameter int unsigned INPUT_WAIT     = 5_000_000,
  parameter int unsigned TIMER_LOAD     = 499_999,
  parameter int unsigned LRCK_DIV       = 780,
  parameter int unsigned POR_BITS       = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor data master
  input  logic [22:0] avm_address,
  input  logic        avm_read,
  input  logic        avm_write,
  input  logic [15:0] avm_writedata,
  output logic [15:0] avm_readdata,
  output logic        avm_readdatavalid,
  output logic        irq_input,
  output logic        irq_music,
  output logic        irq_timer,
  // flash tristate bridge
  output logic        fl_read,
  output logic        fl_write,
  output logic [21:0] fl_address,
  output logic [15:0] fl_writedata,
  input  logic [15:0] fl_readdata,
  input  logic        fl_readdatavalid,
  output logic        fl_rst_n,
  // guitar buttons (GPIO, active low)
  input  logic [4:0]  gpio_keys,
  // seven-segment displays, active low
  output logic [3:0][6:0] hex,
  // audio codec
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_bclk,
  output logic        aud_xck,
  // VGA DAC
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

  // ---------------------------------------------------------- reset
  logic [POR_BITS-1:0] por_count;
  logic                reset_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      por_count <= '0;
      reset_n   <= 1'b0;
    end else if (por_count == '1) begin
      reset_n   <= 1'b1;
    end else begin
      por_count <= por_count + 1'b1;
      reset_n   <= 1'b0;
    end
  end
  assign fl_rst_n = reset_n;

  // ---------------------------------------------------------- bus
  logic [NUM_SLAVES-1:0] cs;
  logic [15:0] rd_beat, rd_vga, rd_input, rd_score, rd_timer;
  logic [7:0]  rd_music;

  avalon_decoder u_bus (
    .clk, .reset_n,
    .address(avm_address), .read(avm_read),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid),
    .chipselect(cs),
    .rd_beat, .rd_vga, .rd_input, .rd_score, .rd_music, .rd_timer,
    .rd_flash(fl_readdata), .flash_readdatavalid(fl_readdatavalid)
  );

  assign fl_read      = cs[SLV_FLASH] && avm_read;
  assign fl_write     = cs[SLV_FLASH] && avm_write;
  assign fl_address   = avm_address[21:0];
  assign fl_writedata = avm_writedata;

  // ---------------------------------------------------------- slaves
  beat_controller u_beat (
    .clk, .reset_n, .chipselect(cs[SLV_BEAT]), .read(avm_read),
    .write(avm_write), .address(avm_address[10:1]),
    .writedata(avm_writedata), .readdata(rd_beat)
  );

  vga_controller u_vga (
    .clk, .reset_n, .chipselect(cs[SLV_VGA]), .read(avm_read),
    .write(avm_write), .address(avm_address[4:1]),
    .writedata(avm_writedata), .readdata(rd_vga),
    .vga_clk, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n,
    .vga_r, .vga_g, .vga_b
  );

  input_controller #(
    .DEBOUNCE_DELAY(DEBOUNCE_DELAY), .WAIT_CYCLES(INPUT_WAIT)
  ) u_input (
    .clk, .reset_n, .chipselect(cs[SLV_INPUT]), .read(avm_read),
    .write(avm_write), .writedata(avm_writedata), .readdata(rd_input),
    .irq(irq_input), .switches(gpio_keys)
  );

  score_controller u_score (
    .clk, .reset_n, .chipselect(cs[SLV_SCORE]), .read(avm_read),
    .write(avm_write), .writedata(avm_writedata), .readdata(rd_score),
    .hex
  );

  music_controller #(.LRCK_DIV(LRCK_DIV)) u_music (
    .clk, .reset_n, .chipselect(cs[SLV_MUSIC]), .read(avm_read),
    .write(avm_write), .address(avm_address[1:0]),
    .writedata(avm_writedata[7:0]), .readdata(rd_music), .irq(irq_music),
    .aud_adclrck, .aud_adcdat, .aud_daclrck, .aud_dacdat, .aud_bclk, .aud_xck
  );

  interval_timer #(.LOAD_VALUE(TIMER_LOAD)) u_timer (
    .clk, .reset_n, .chipselect(cs[SLV_TIMER]), .read(avm_read),
    .write(avm_write), .address(avm_address[3:1]),
    .writedata(avm_writedata), .readdata(rd_timer), .irq(irq_timer)
  );
endmodule
