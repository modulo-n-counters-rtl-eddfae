// tb_lab5: end-to-end testbench of the four-digit modulo-n counter circuit.
//
// The circuit runs with its default modulus (n = 7) and display polarity but
// with scaled rates: a 2000 Hz clock, up steps at 100 Hz (every 20 clocks),
// down steps at 10 Hz (every 200 clocks, the lab's 10:1 ratio) and a digit
// scan of 2 clocks. The testbench only presses the active-low buttons and
// reads the LED outputs: it watches a full scan of en[3:0], decodes a..g of
// each enabled digit and forms the value sum(digit[i] * n^i).
//
// Sequence, as in the lab's demonstration: clear with both buttons; hold up
// long enough for the most significant digit to wrap past n-1; let go and see
// the count hold; clear again; hold down so the count wraps from 0 to
// n^4-1 (all digits n-1); step down further; random presses. After every
// phase the display must show the value of a reference model that counts k
// steps for a button held k full periods. Each mechanism (clear, increment,
// decrement, carry into every digit, whole-counter wrap up and down, hold)
// is counted and must have happened at least once.
module tb_lab5;
  import seg7_ref_pkg::*;

  localparam int N         = 7;
  localparam int M         = N * N * N * N;
  localparam int CLK_RATE  = 2000;
  localparam int UP_RATE   = 100;
  localparam int DOWN_RATE = 10;
  localparam int SCAN_DIV  = 2;
  localparam int UP_DIV    = CLK_RATE / UP_RATE;
  localparam int DOWN_DIV  = CLK_RATE / DOWN_RATE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       up_n, down_n;
  logic [3:0] en;
  logic       a, b, c, d, e, f, g, dp;

  lab5 #(
    .CLK_RATE  (CLK_RATE),
    .UP_RATE   (UP_RATE),
    .DOWN_RATE (DOWN_RATE),
    .SCAN_DIV  (SCAN_DIV)
  ) dut (
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

  initial begin
    int shown;
    up_n = 1'b1; down_n = 1'b1;
    repeat (10) @(negedge clk);

    clear();
    hold_up(5);
    hold_up(M - 5 + 3);                      // most significant digit wraps
    // No button: the count must hold.
    repeat (5 * DOWN_DIV) @(negedge clk);
    n_hold++;
    expect_display("while idle");
    clear();
    hold_down(1);                            // 0 wraps to n^4 - 1
    check(model == M - 1, "model did not wrap down");
    hold_down(N + 2);                        // borrows out of the lowest digit
    clear();

    // Random presses.
    for (int r = 0; r < 12; r++) begin
      case ($urandom_range(0, 3))
        0: hold_up($urandom_range(1, 60));
        1: hold_down($urandom_range(1, 9));
        2: clear();
        default: begin
          repeat ($urandom_range(10, 300)) @(negedge clk);
          n_hold++;
          expect_display("while idle");
        end
      endcase
    end

    check(n_clear > 0, "clear never happened");
    check(n_inc > 0 && n_dec > 0, "no increment or no decrement");
    check(n_hold > 0, "hold never happened");
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
    repeat (200_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
