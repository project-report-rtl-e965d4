// avalon_decoder: the Avalon bus between the processor and its slaves.
//
// One master (the processor's data port: byte address and read; write and
// writedata go to the slaves directly) reaches seven slaves.  The address decoder raises
// exactly one chipselect (see guitar_pkg for the windows); each slave gets
// the shared read/write strobes and picks its word address from the bus
// address.  Read data returns through a multiplexer: the on-chip slaves
// answer one clock after the read (the decoder remembers which slave was
// read and raises readdatavalid then); the flash bridge answers with its
// own readdatavalid, whenever the flash is done.  A read of an unmapped
// address returns 0 one clock later.  The processor must not issue a new
// read before readdatavalid of the previous one.
// That a bus joins the processor with these slaves follows the original
// design; the address map and the read timing are this design's.
module avalon_decoder (
  input  logic        clk,
  input  logic        reset_n,
  // master
  input  logic [guitar_pkg::BUS_AW-1:0] address,
  input  logic        read,
  output logic [15:0] readdata,
  output logic        readdatavalid,
  // slaves
  output logic [guitar_pkg::NUM_SLAVES-1:0] chipselect,
  input  logic [15:0] rd_beat,
  input  logic [15:0] rd_vga,
  input  logic [15:0] rd_input,
  input  logic [15:0] rd_score,
  input  logic [7:0]  rd_music,
  input  logic [15:0] rd_timer,
  input  logic [15:0] rd_flash,
  input  logic        flash_readdatavalid
);
  import guitar_pkg::*;

  always_comb begin
    chipselect = '0;
    if (address[22])                          chipselect[SLV_FLASH] = 1'b1;
    else if (address[21:11] == '0)            chipselect[SLV_BEAT]  = 1'b1;
    else if (address[21:5]  == 17'h00080)     chipselect[SLV_VGA]   = 1'b1;
    else if (address[21:4]  == 18'h00110)     chipselect[SLV_INPUT] = 1'b1;
    else if (address[21:4]  == 18'h00120)     chipselect[SLV_SCORE] = 1'b1;
    else if (address[21:4]  == 18'h00130)     chipselect[SLV_MUSIC] = 1'b1;
    else if (address[21:4]  == 18'h00140)     chipselect[SLV_TIMER] = 1'b1;
  end

  logic [NUM_SLAVES-1:0] rd_sel;
  logic                  rd_pending;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      rd_sel     <= '0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= read && !chipselect[SLV_FLASH];
      if (read) rd_sel <= chipselect;
    end
  end

  always_comb begin
    readdata      = '0;
    readdatavalid = rd_pending;
    if (flash_readdatavalid) begin
      readdata      = rd_flash;
      readdatavalid = 1'b1;
    end else if (rd_pending) begin
      case (1'b1)
        rd_sel[SLV_BEAT]:  readdata = rd_beat;
        rd_sel[SLV_VGA]:   readdata = rd_vga;
        rd_sel[SLV_INPUT]: readdata = rd_input;
        rd_sel[SLV_SCORE]: readdata = rd_score;
        rd_sel[SLV_MUSIC]: readdata = {8'h00, rd_music};
        rd_sel[SLV_TIMER]: readdata = rd_timer;
        default:           readdata = '0;
      endcase
    end
  end
endmodule
