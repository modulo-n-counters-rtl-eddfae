// modncount: one digit of a synchronous modulo-n up/down counter.
//
// On each rising clock edge the 4-bit count is
//   - kept when neither up nor down is asserted,
//   - incremented when only up is asserted (n-1 wraps to 0),
//   - decremented when only down is asserted (0 wraps to n-1),
//   - cleared to 0 when up and down are asserted together.
// carry and borrow are combinational:
//   carry  = up and count == n-1 (with down low), or up and down together
//   borrow = down and count == 0 (with up low),   or up and down together
// so that chaining carry -> up and borrow -> down of the next digit builds a
// multi-digit counter that steps and clears in the same clock edge.
// up and down are level requests sampled on the clock, not clocks themselves.
//
// The port names and widths, the next-state rules and the carry/borrow table
// follow the lab specification. Design choices: N is a parameter (default 7,
// the specification's worked example); there is no reset pin, so the count
// powers up at an arbitrary value until up and down clear it together; a count
// outside 0..N-1 (possible only after power-up) is treated as
// the top of the range, so the next increment returns it to 0.
module modncount
  import lab5_pkg::digit_t;
#(
  parameter int unsigned N = 7   // modulus, 2..16
) (
  input  logic   clock,
  input  logic   up,
  input  logic   down,
  output digit_t count,
  output logic   carry,
  output logic   borrow
);

  localparam digit_t TOP = digit_t'(N - 1);

  digit_t count_q;
  logic   at_top;
  logic   at_zero;

  assign at_top  = (count_q >= TOP);
  assign at_zero = (count_q == '0);

  always_ff @(posedge clock) begin
    unique case ({up, down})
      2'b10:   count_q <= at_top  ? '0  : count_q + 4'd1;
      2'b01:   count_q <= at_zero ? TOP : count_q - 4'd1;
      2'b11:   count_q <= '0;
      default: count_q <= count_q;
    endcase
  end

  assign count  = count_q;
  assign carry  = up   & (down | at_top);
  assign borrow = down & (up   | at_zero);

  // The modulus must fit the 4-bit count and leave at least two states.
  if (N < 2 || N > 16) begin : g_bad_n
    $error("modncount: N must be in 2..16");
  end

endmodule
