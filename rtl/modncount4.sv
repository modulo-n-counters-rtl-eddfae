// modncount4: four-digit modulo-n up/down counter.
//
// Four modncount digits are cascaded: up_in and down_in drive the least
// significant digit, and each digit's carry and borrow drive the up and down
// inputs of the next more significant digit. All digits share one clock, so
// the whole counter is synchronous; the carry/borrow ripple is combinational
// and settles within the clock period. Asserting up_in and down_in together
// makes every digit see up and down together, clearing all four digits in one
// clock edge.
//
// count[0] is the least significant digit, count[3] the most significant.
// carry and borrow are those of the most significant digit: they show a wrap
// of the whole counter (n^4-1 -> 0 or 0 -> n^4-1) in the cycle it happens.
// The cascade follows the lab's four-digit diagram; bringing out the last
// carry and borrow is this design's choice.
module modncount4
  import lab5_pkg::*;
#(
  parameter int unsigned N = 7
) (
  input  logic   clock,
  input  logic   up_in,
  input  logic   down_in,
  output digit_t count [DIGITS],
  output logic   carry,
  output logic   borrow
);

  // up[i]/down[i] are the requests into digit i; index DIGITS is the output.
  logic [DIGITS:0] up;
  logic [DIGITS:0] down;

  assign up[0]   = up_in;
  assign down[0] = down_in;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    modncount #(.N(N)) u_digit (
      .clock  (clock),
      .up     (up[i]),
      .down   (down[i]),
      .count  (count[i]),
      .carry  (up[i+1]),
      .borrow (down[i+1])
    );
  end

  assign carry  = up[DIGITS];
  assign borrow = down[DIGITS];

endmodule
