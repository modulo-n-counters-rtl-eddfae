// lab5: four-digit modulo-n up/down counter test circuit.
//
// Two pushbuttons drive a four-digit modulo-n counter whose value is shown on
// a multiplexed four-digit seven-segment LED display:
//   - holding up_n steps the count up at UP_HZ (1 kHz),
//   - holding down_n steps it down at DOWN_HZ (100 Hz),
//   - holding both clears all four digits.
// The path is button_ctrl (synchronizer and step-rate dividers) ->
// modncount4 (four cascaded modncount digits) -> display_mux (digit scan,
// seven-segment decode). The counter value reaches the display one clock
// after it changes, plus up to one scan period before that digit is next lit.
//
// Ports are the CPLD pins of the lab: clock (50 MHz), up_n and down_n
// (active low, weak pull-ups on the pins), en[3:0] digit enables (en[3] the
// most significant digit), segments a..g and the decimal point dp, which is
// never lit. The carry and borrow out of the most significant digit have
// nowhere to go on the board and are left unused (hence two unused-signal
// lint warnings). The structure and rates follow the lab; the display polarity and
// scan rate are this design's choices (see display_mux).
module lab5
  import lab5_pkg::*;
#(
  parameter int unsigned N              = 7,
  parameter int unsigned CLK_RATE       = CLK_HZ,
  parameter int unsigned UP_RATE        = UP_HZ,
  parameter int unsigned DOWN_RATE      = DOWN_HZ,
  parameter int unsigned SCAN_DIV       = CLK_HZ / SCAN_HZ,
  parameter bit          EN_ACTIVE_LOW  = 1'b1,
  parameter bit          SEG_ACTIVE_LOW = 1'b0
) (
  input  logic       clock,
  input  logic       up_n,
  input  logic       down_n,
  output logic [3:0] en,
  output logic       a,
  output logic       b,
  output logic       c,
  output logic       d,
  output logic       e,
  output logic       f,
  output logic       g,
  output logic       dp
);

  logic   up_in;
  logic   down_in;
  digit_t count [DIGITS];
  logic   carry_out;
  logic   borrow_out;
  seg_t   seg;

  button_ctrl #(
    .CLK_HZ  (CLK_RATE),
    .UP_HZ   (UP_RATE),
    .DOWN_HZ (DOWN_RATE)
  ) u_buttons (
    .clock  (clock),
    .up_n   (up_n),
    .down_n (down_n),
    .up     (up_in),
    .down   (down_in)
  );

  modncount4 #(.N(N)) u_counter (
    .clock   (clock),
    .up_in   (up_in),
    .down_in (down_in),
    .count   (count),
    .carry   (carry_out),    // wrap of the whole counter: not used on the board
    .borrow  (borrow_out)
  );

  display_mux #(
    .SCAN_DIV       (SCAN_DIV),
    .EN_ACTIVE_LOW  (EN_ACTIVE_LOW),
    .SEG_ACTIVE_LOW (SEG_ACTIVE_LOW)
  ) u_display (
    .clock (clock),
    .digit (count),
    .en    (en),
    .seg   (seg)
  );

  assign {a, b, c, d, e, f, g} = seg;
  assign dp = SEG_ACTIVE_LOW;   // decimal point off

endmodule
