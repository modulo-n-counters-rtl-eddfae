// tb_display_mux: self-checking testbench for the multiplexed display driver.
//
// Two drivers with a short scan period (SCAN_DIV = 4) see the same four
// digits: one with the default polarity (digit enables active low, segments
// active high) and one with both inverted. Every clock the testbench checks
// that exactly one digit is enabled, that the segments show the reference
// pattern of that digit's value, that each digit stays lit for exactly
// SCAN_DIV clocks and that the digits are visited in the order 0, 1, 2, 3.
// The two drivers have no reset, so each is tracked on its own.
// The digit values change every 50 clocks; the one clock after a change, when
// the registered outputs still show the old value, is not checked.
module tb_display_mux;
  import lab5_pkg::*;
  import seg7_ref_pkg::*;

  localparam int SCAN_DIV = 4;
  localparam int CYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t digit [DIGITS];
  logic [DIGITS-1:0] en_a, en_b;
  seg_t seg_a, seg_b;

  display_mux #(.SCAN_DIV(SCAN_DIV)) dut_a (
    .clock (clk), .digit (digit), .en (en_a), .seg (seg_a)
  );
  display_mux #(.SCAN_DIV(SCAN_DIV), .EN_ACTIVE_LOW(1'b0), .SEG_ACTIVE_LOW(1'b1)) dut_b (
    .clock (clk), .digit (digit), .en (en_b), .seg (seg_b)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int which(input logic [DIGITS-1:0] onehot);
    for (int i = 0; i < DIGITS; i++) if (onehot == (DIGITS)'(1) << i) return i;
    return -1;
  endfunction

  // Per-driver scan tracking; en and seg are taken back to active high.
  int  prev [2];
  int  run [2];
  int  visits [2];

  task automatic check_driver(input int k, input logic [DIGITS-1:0] en_hi,
                              input seg_t seg_hi, input bit fresh);
    int cur;
    cur = which(en_hi);
    check(cur >= 0, $sformatf("driver %0d: enables %b not one-hot", k, en_hi));
    if (cur >= 0 && !fresh)
      check(7'(seg_hi) == pattern(int'(digit[cur])),
            $sformatf("driver %0d: digit %0d = %0d shows %b", k, cur, digit[cur], seg_hi));
    if (cur == prev[k]) run[k]++;
    else begin
      if (prev[k] >= 0) begin
        if (visits[k] > 0)
          check(run[k] == SCAN_DIV, $sformatf("driver %0d: digit %0d lit %0d clocks", k, prev[k], run[k]));
        check(cur == (prev[k] + 1) % DIGITS,
              $sformatf("driver %0d: scan went %0d -> %0d", k, prev[k], cur));
        visits[k]++;
      end
      run[k] = 1;
    end
    prev[k] = cur;
  endtask

  initial begin
    bit fresh;
    for (int i = 0; i < DIGITS; i++) digit[i] = digit_t'($urandom_range(0, 15));
    repeat (3) @(negedge clk);
    prev = '{-1, -1}; run = '{0, 0}; visits = '{0, 0}; fresh = 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      check_driver(0, ~en_a, seg_a, fresh);
      check_driver(1, en_b, ~seg_b, fresh);
      fresh = 1'b0;
      if (t % 50 == 49) begin
        for (int i = 0; i < DIGITS; i++) digit[i] = digit_t'($urandom_range(0, 15));
        fresh = 1'b1;
      end
    end
    check(visits[0] > 100 && visits[1] > 100, "scan did not advance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
