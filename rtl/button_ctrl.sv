// button_ctrl: turns the two pushbuttons into counter step requests.
//
// up_n and down_n are active-low buttons (pressed = 0, pulled up when
// released) that change asynchronously to the clock. Each passes through a
// two-flop synchronizer. Then:
//   - only up held:   up pulses for one clock once every CLK_HZ/UP_HZ clocks
//   - only down held: down pulses for one clock once every CLK_HZ/DOWN_HZ clocks
//   - both held:      up and down are both high on every clock (counter clear)
//   - none held:      both low.
// Each rate divider is held at zero while its button is not (solely) held,
// so the first pulse comes one full period after the press, and holding a
// button for k periods gives exactly k pulses. Latency from a pin change to
// the outputs is two clocks (the synchronizer).
//
// The 1 kHz and 100 Hz step rates, the 50 MHz clock, the active-low buttons
// and "both buttons reset" come from the lab specification; the synchronizer,
// the restart-on-press dividers are this design's
// choices.
module button_ctrl #(
  parameter int unsigned CLK_HZ  = lab5_pkg::CLK_HZ,
  parameter int unsigned UP_HZ   = lab5_pkg::UP_HZ,
  parameter int unsigned DOWN_HZ = lab5_pkg::DOWN_HZ
) (
  input  logic clock,
  input  logic up_n,
  input  logic down_n,
  output logic up,
  output logic down
);

  localparam int unsigned UP_DIV   = CLK_HZ / UP_HZ;
  localparam int unsigned DOWN_DIV = CLK_HZ / DOWN_HZ;

  // Two-flop synchronizers.
  logic [1:0] up_sync;
  logic [1:0] down_sync;

  always_ff @(posedge clock) begin
    up_sync   <= {up_sync[0], up_n};
    down_sync <= {down_sync[0], down_n};
  end

  logic up_held;
  logic down_held;
  logic both_held;
  logic up_tick;
  logic down_tick;

  assign up_held   = ~up_sync[1];
  assign down_held = ~down_sync[1];
  assign both_held = up_held & down_held;

  rate_div #(.DIV(UP_DIV)) u_up_div (
    .clock  (clock),
    .enable (up_held & ~down_held),
    .tick   (up_tick)
  );

  rate_div #(.DIV(DOWN_DIV)) u_down_div (
    .clock  (clock),
    .enable (down_held & ~up_held),
    .tick   (down_tick)
  );

  assign up   = both_held | up_tick;
  assign down = both_held | down_tick;

  // Never a lone step in both directions at once.
  assert property (@(posedge clock) (up & down) |-> both_held);

endmodule
