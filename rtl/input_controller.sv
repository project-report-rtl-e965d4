// input_controller: Avalon slave that turns the five guitar buttons into
// processor interrupts.
//
// Each button line (active low: a pressed button pulls its GPIO to 0) goes
// through its own debouncer and, inverted, through a pulser, so a press
// becomes one single-cycle pulse.  A pulse stores the one-hot code of the
// button (key 1 = 0x0001 ... key 5 = 0x0010, the lowest number winning if
// several pulse together) in a register the processor reads.
//
// A three-state machine handles the interrupt:
//   IDLE    - waits for any pulse, irq low
//   PRESSED - irq high until the processor writes any value (the clear)
//   DELAY   - irq low; a counter waits WAIT_CYCLES (0.1 s at 50 MHz), then
//             back to IDLE.  Presses during PRESSED and DELAY still update
//             the button register but raise no interrupt.
// readdata is the button register, valid in the same cycle (latency 0).
// Structure, encoding, state machine and the 0.1 s delay follow the
// original design; the active-low reset is synchronous.
module input_controller #(
  parameter int unsigned DEBOUNCE_DELAY = 50000,
  parameter int unsigned WAIT_CYCLES    = 5_000_000
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  output logic        irq,
  input  logic [guitar_pkg::NUM_KEYS-1:0] switches
);
  import guitar_pkg::*;

  localparam int unsigned CW = $clog2(WAIT_CYCLES + 2);

  typedef enum logic [1:0] {IDLE, PRESSED, DELAY} state_e;
  state_e state, next_state;

  logic [NUM_KEYS-1:0] debounced, pulses;
  logic [15:0]         last_pressed;
  logic [CW-1:0]       counter;
  logic                any_pulse, count_reached, clear;

  for (genvar k = 0; k < NUM_KEYS; k++) begin : g_key
    debouncer #(.DELAY(DEBOUNCE_DELAY), .IDLE_LEVEL(1'b1)) u_deb (
      .clk, .reset_n, .x(switches[k]), .dbx(debounced[k])
    );
    pulser u_pulse (
      .clk, .reset_n, .key_in(!debounced[k]), .key_out(pulses[k])
    );
  end

  assign any_pulse     = |pulses;
  assign clear         = chipselect && write;
  assign count_reached = (counter > CW'(WAIT_CYCLES));

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      last_pressed <= '0;
    end else begin
      for (int k = NUM_KEYS - 1; k >= 0; k--)
        if (pulses[k]) last_pressed <= 16'(1) << k;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      state   <= IDLE;
      counter <= '0;
    end else begin
      state <= next_state;
      if (state == PRESSED)    counter <= '0;
      else if (!count_reached) counter <= counter + 1'b1;
    end
  end

  always_comb begin
    next_state = state;
    unique case (state)
      IDLE:    if (any_pulse)     next_state = PRESSED;
      PRESSED: if (clear)         next_state = DELAY;
      DELAY:   if (count_reached) next_state = IDLE;
      default:                    next_state = IDLE;
    endcase
  end

  assign irq      = (state == PRESSED);
  assign readdata = last_pressed;  // writedata is ignored: only the strobe counts

endmodule
