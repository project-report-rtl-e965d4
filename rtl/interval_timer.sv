// interval_timer: fixed-period interval timer with an Avalon register
// port, the system's 100 Hz time base.
//
// A down counter loads LOAD_VALUE and counts to 0 once per clock while
// running; on reaching 0 it reloads, so one period is LOAD_VALUE+1 cycles
// (500,000 cycles = 0.01 s at 50 MHz).  In continuous mode it keeps
// running; otherwise it stops after one period.  Each time the counter
// reaches 0 the timeout flag TO is set; it stays set until the processor
// writes the status register.  irq = TO & ITO.
// Registers (16-bit, word address):
//   0 status : [0] TO, [1] RUN (read); any write clears TO
//   1 control: [0] ITO, [1] CONT, [2] START, [3] STOP (START and STOP act
//              when written and read back as written)
//   2, 3     : period registers of a programmable timer; the period here is
//              fixed, so writes are ignored and reads return 0
// Reads return data one clock after the read strobe.  The timer starts
// stopped after reset.  Register map and flag behaviour follow the timer
// the original design used; the fixed period is its 0.01 s.
module interval_timer #(
  parameter int unsigned LOAD_VALUE = 499_999
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [2:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  output logic        irq
);
  localparam int unsigned CW = $clog2(LOAD_VALUE + 1);

  logic [CW-1:0] counter;
  logic [3:0]    control;
  logic          running, timeout, at_zero, at_zero_q;
  logic          control_wr, status_wr, start, stop;

  assign control_wr = chipselect && write && (address == 3'd1);
  assign status_wr  = chipselect && write && (address == 3'd0);
  assign start      = control_wr && writedata[2];
  assign stop       = control_wr && writedata[3];
  assign at_zero    = (counter == '0);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      counter   <= CW'(LOAD_VALUE);
      control   <= '0;
      running   <= 1'b0;
      timeout   <= 1'b0;
      at_zero_q <= 1'b0;
    end else begin
      if (control_wr) control <= writedata[3:0];

      if (start) begin
        counter <= CW'(LOAD_VALUE);
        running <= 1'b1;
      end else if (stop) begin
        running <= 1'b0;
      end else if (running) begin
        if (at_zero) begin
          counter <= CW'(LOAD_VALUE);
          if (!control[1]) running <= 1'b0;
        end else begin
          counter <= counter - 1'b1;
        end
      end

      // TO rises on the first cycle the counter sits at 0.
      at_zero_q <= at_zero;
      if (status_wr)                  timeout <= 1'b0;
      else if (at_zero && !at_zero_q) timeout <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) readdata <= '0;
    else if (chipselect && read) begin
      unique case (address)
        3'd0:    readdata <= {14'b0, running, timeout};
        3'd1:    readdata <= {12'b0, control};
        default: readdata <= '0;
      endcase
    end
  end

  assign irq = timeout && control[0];
endmodule
