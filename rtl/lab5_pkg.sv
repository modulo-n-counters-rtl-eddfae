// lab5_pkg: types and constants shared by the four-digit modulo-n counter
// test circuit.
//
// The board clock is 50 MHz, a held up button steps the count at 1 kHz and a
// held down button at 100 Hz; these three rates and the four-digit width come
// from the lab specification. The digit-scan rate of the multiplexed display
// is not specified and is this design's choice (1 kHz per digit).
package lab5_pkg;

  // Number of digits of the cascaded counter and of the LED display.
  localparam int unsigned DIGITS = 4;

  // Rates of the test circuit, in Hz.
  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned UP_HZ   = 1_000;
  localparam int unsigned DOWN_HZ = 100;
  localparam int unsigned SCAN_HZ = 1_000;   // per digit, design choice

  // One counter digit: the specification fixes the count output at 4 bits.
  typedef logic [3:0] digit_t;

  // The seven segments, named as on the display; 1 lights a segment.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
    logic e;
    logic f;
    logic g;
  } seg_t;

endpackage
