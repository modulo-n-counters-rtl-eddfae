// tb_lab5_full: the four-digit modulo-n counter circuit at full size.
//
// lab5 runs with every parameter at its default: n = 7, a 50 MHz clock, up
// steps at 1 kHz (every 50,000 clocks), down steps at 100 Hz (every 500,000
// clocks) and a 1 kHz digit scan. The testbench presses the active-low
// buttons and reads the scanned LED outputs, as on the board:
//   - both buttons clear the display to 0000;
//   - holding up for 10.5 ms gives 10 steps, and the least significant
//     digit changes exactly every 50,000 clocks (1 kHz);
//   - holding up on until 7^4 + 2 steps have been made wraps the most
//     significant digit past 6 (2.4 s of simulated time);
//   - after clearing again, holding down for 3.5 periods gives 3 steps at
//     exactly 500,000 clocks apart (100 Hz), the first wrapping 0000 to 6666.
// The display must show the reference model's value after every phase.
module tb_lab5_full;
  import seg7_ref_pkg::*;

  localparam int N         = 7;
  localparam int M         = N * N * N * N;
  localparam int CLK_RATE  = 50_000_000;
  localparam int UP_RATE   = 1_000;
  localparam int DOWN_RATE = 100;
  localparam int SCAN_DIV  = 50_000;
  localparam int UP_DIV    = CLK_RATE / UP_RATE;
  localparam int DOWN_DIV  = CLK_RATE / DOWN_RATE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       up_n, down_n;
  logic [3:0] en;
  logic       a, b, c, d, e, f, g, dp;

  lab5 dut (
    .clock (clk), .up_n (up_n), .down_n (down_n), .en (en),
    .a (a), .b (b), .c (c), .d (d), .e (e), .f (f), .g (g), .dp (dp)
  );

  int checks = 0;
  int failures = 0;
  int model = 0;

  // Mechanism counters.
  int n_clear = 0, n_inc = 0, n_dec = 0, n_hold = 0;
  int n_wrap_up = 0, n_wrap_down = 0;
  int n_digit_carry [4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Read the displayed value from the scanned LED outputs (enables are
  // active low, segments active high). Returns -1 if a digit is unreadable.
  task automatic read_display(output int value);
    int digit [4];
    bit seen [4];
    bit dp_lit;
    seen = '{0, 0, 0, 0};
    digit = '{-1, -1, -1, -1};
    dp_lit = 1'b0;
    repeat (4 * SCAN_DIV * 3) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        if (en == ~(4'b1 << i)) begin
          digit[i] = value_of({a, b, c, d, e, f, g});
          seen[i] = 1'b1;
        end
      dp_lit |= dp;
    end
    check(!dp_lit, "decimal point lit");
    value = 0;
    for (int i = 3; i >= 0; i--) begin
      if (!seen[i] || digit[i] < 0 || digit[i] >= N) begin
        value = -1;
        return;
      end
      value = value * N + digit[i];
    end
  endtask

  task automatic expect_display(input string what);
    int shown;
    read_display(shown);
    check(shown == model, $sformatf("%s: display shows %0d, expected %0d", what, shown, model));
  endtask

  // Model of k counter steps in one direction.
  task automatic model_steps(input int k, input bit up);
    for (int s = 0; s < k; s++) begin
      if (up) begin
        n_inc++;
        for (int i = 0, p = 1; i < 3; i++, p *= N)
          if ((model / p) % N == N - 1) n_digit_carry[i + 1]++;
          else break;
        if (model == M - 1) n_wrap_up++;
        model = (model + 1) % M;
      end else begin
        n_dec++;
        if (model == 0) n_wrap_down++;
        model = (model + M - 1) % M;
      end
    end
  endtask

  // Press the buttons (1 = pressed) for 'cycles' clocks, then release.
  task automatic press(input bit up, input bit down, input int cycles);
    @(negedge clk);
    up_n = ~up; down_n = ~down;
    repeat (cycles) @(negedge clk);
    up_n = 1'b1; down_n = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  task automatic clear();
    press(1'b1, 1'b1, 10);
    model = 0;
    n_clear++;
    expect_display("after clearing");
  endtask

  task automatic hold_up(input int k);
    press(1'b1, 1'b0, k * UP_DIV + UP_DIV / 2);
    model_steps(k, 1'b1);
    expect_display($sformatf("after %0d up steps", k));
  endtask

  task automatic hold_down(input int k);
    press(1'b0, 1'b1, k * DOWN_DIV + DOWN_DIV / 2);
    model_steps(k, 1'b0);
    expect_display($sformatf("after %0d down steps", k));
  endtask

  // Clocks between successive changes of the least significant digit.
  longint cycle = 0;
  longint last_change = -1;
  longint gaps [$];
  always @(posedge clk) cycle++;
  always @(dut.u_counter.count[0]) begin
    if (last_change >= 0) gaps.push_back(cycle - last_change);
    last_change = cycle;
  end

  task automatic check_gaps(input longint div, input int expected, input string what);
    check(gaps.size() == expected,
          $sformatf("%s: %0d digit changes timed, expected %0d", what, gaps.size(), expected));
    foreach (gaps[i])
      check(gaps[i] == div, $sformatf("%s: steps %0d clocks apart, expected %0d", what, gaps[i], div));
  endtask

  initial begin
    up_n = 1'b1; down_n = 1'b1;
    repeat (10) @(negedge clk);

    clear();
    last_change = -1; gaps.delete();
    hold_up(10);
    check_gaps(UP_DIV, 9, "up at 1 kHz");
    hold_up(M - 10 + 2);                     // most significant digit wraps
    repeat (1000) @(negedge clk);
    n_hold++;
    expect_display("while idle");
    clear();
    last_change = -1; gaps.delete();
    hold_down(3);                            // 0000 -> 6666 -> 6665 -> 6664
    check_gaps(DOWN_DIV, 2, "down at 100 Hz");

    check(n_clear > 0, "clear never happened");
    check(n_inc > 0 && n_dec > 0, "no increment or no decrement");
    check(n_wrap_up > 0, "counter never wrapped up");
    check(n_wrap_down > 0, "counter never wrapped down");
    for (int i = 1; i < 4; i++)
      check(n_digit_carry[i] > 0, $sformatf("no carry into digit %0d", i));
    $display("mechanisms: clear %0d inc %0d dec %0d hold %0d wrap up %0d wrap down %0d carries %0d/%0d/%0d",
             n_clear, n_inc, n_dec, n_hold, n_wrap_up, n_wrap_down,
             n_digit_carry[1], n_digit_carry[2], n_digit_carry[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
