// display_mux: drives a multiplexed four-digit seven-segment display.
//
// The four digits share the segment lines a..g; en[3:0] selects which digit
// is lit. A scan counter moves to the next digit every SCAN_DIV clocks, in
// the order 0, 1, 2, 3, 0, ..., so each digit is lit for a quarter of the
// time. en[i] selects digit[i]; digit[0] is the least significant. While
// en[i] is active the segment outputs carry the decoded pattern of
// digit[i], registered so that en and seg change on the same clock edge.
//
// EN_ACTIVE_LOW and SEG_ACTIVE_LOW set the output polarity for the display
// wiring at hand. The multiplexing itself, the en[3:0] and a..g signals come
// from the lab; the scan rate, the scan order and the default polarities
// (active-high segments, active-low digit enables) are this design's choices.
module display_mux
  import lab5_pkg::*;
#(
  parameter int unsigned SCAN_DIV       = CLK_HZ / SCAN_HZ,  // clocks per digit
  parameter bit          EN_ACTIVE_LOW  = 1'b1,
  parameter bit          SEG_ACTIVE_LOW = 1'b0
) (
  input  logic          clock,
  input  digit_t        digit [DIGITS],
  output logic [DIGITS-1:0] en,
  output seg_t          seg
);

  localparam int unsigned SW = $clog2(DIGITS);

  logic          tick;
  logic [SW-1:0] sel;
  logic [DIGITS-1:0] en_q;
  seg_t          seg_q;
  seg_t          pattern;

  rate_div #(.DIV(SCAN_DIV)) u_scan (
    .clock  (clock),
    .enable (1'b1),
    .tick   (tick)
  );

  always_ff @(posedge clock) begin
    if (tick) sel <= sel + 1'b1;
  end

  seg7_decode u_dec (
    .digit (digit[sel]),
    .seg   (pattern)
  );

  // Output register: one digit enabled, its pattern on the segment lines.
  always_ff @(posedge clock) begin
    en_q  <= (DIGITS)'(1) << sel;
    seg_q <= pattern;
  end

  assign en  = EN_ACTIVE_LOW  ? ~en_q  : en_q;
  assign seg = SEG_ACTIVE_LOW ? ~seg_q : seg_q;

endmodule
