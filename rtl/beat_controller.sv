// beat_controller: Avalon slave that lets the processor read the beat ROM.
//
// A read of word address n (chipselect & read) returns beat n of the song,
// in 0.01 s units, one clock later (read latency 1).  Writes are ignored:
// the beat table is fixed.  The controller never raises an interrupt; the
// processor polls it.  This follows the original design.
module beat_controller (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [9:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata
);
  // reset_n, write and writedata are part of the Avalon port but unused:
  // the block is a read-only memory with no state of its own.
  beat_rom u_rom (
    .clk, .en(chipselect && read), .address, .data(readdata)
  );
endmodule
