// tb_button_ctrl: self-checking testbench for the pushbutton controller.
//
// Runs at a scaled clock (CLK_HZ = 5000, so a held up button should step
// every 50 clocks and a held down button every 500, the lab's 1 kHz : 100 Hz
// ratio). Each phase drives the active-low buttons for a number of clocks and
// counts what comes out: the number of up and down pulses, the clock of the
// first pulse after the press and the spacing of the later ones. Expected:
// k pulses for k full periods held, the first DIV+1 clocks after the press
// (two synchronizer clocks, then DIV-1 counts), then exactly one every DIV
// clocks; up and down high together on every clock while both are held, and
// nothing once both are released.
module tb_button_ctrl;

  localparam int CLK_HZ  = 5000;
  localparam int UP_HZ   = 100;
  localparam int DOWN_HZ = 10;
  localparam int UP_DIV   = CLK_HZ / UP_HZ;     // 50
  localparam int DOWN_DIV = CLK_HZ / DOWN_HZ;   // 500

  logic clk = 1'b0;
  logic up_n, down_n;
  logic up, down;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  button_ctrl #(.CLK_HZ(CLK_HZ), .UP_HZ(UP_HZ), .DOWN_HZ(DOWN_HZ)) dut (
    .clock (clk), .up_n (up_n), .down_n (down_n), .up (up), .down (down)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive the buttons for 'cycles' clocks and tally the outputs.
  task automatic hold(input logic un, input logic dn, input int cycles,
                      output int n_up, output int n_down, output int n_both,
                      output int first, output int bad_gap, input int div);
    int last;
    n_up = 0; n_down = 0; n_both = 0; first = -1; bad_gap = 0; last = -1;
    @(negedge clk);
    up_n = un; down_n = dn;
    for (int t = 1; t <= cycles; t++) begin
      @(negedge clk);
      if (up && down) n_both++;
      else if (up || down) begin
        if (up) n_up++;
        if (down) n_down++;
        if (first < 0) first = t;
        else if (t - last != div) bad_gap++;
        last = t;
      end
    end
  endtask

  initial begin
    int nu, nd, nb, first, bad;
    up_n = 1'b1; down_n = 1'b1;
    repeat (5) @(negedge clk);

    // Idle: nothing.
    hold(1'b1, 1'b1, 300, nu, nd, nb, first, bad, 1);
    check(nu == 0 && nd == 0 && nb == 0, "idle produced requests");

    // Up held for 7 periods and a bit: 7 increments, 1 kHz spacing.
    hold(1'b0, 1'b1, 7 * UP_DIV + 1 + UP_DIV / 2, nu, nd, nb, first, bad, UP_DIV);
    check(nu == 7, $sformatf("up held 7 periods gave %0d pulses", nu));
    check(nd == 0 && nb == 0, "up held gave down requests");
    check(first == UP_DIV + 1, $sformatf("first up pulse at %0d, expected %0d", first, UP_DIV + 1));
    check(bad == 0, "up pulses not evenly spaced");

    // Release: no more pulses.
    hold(1'b1, 1'b1, 3 * UP_DIV, nu, nd, nb, first, bad, 1);
    check(nu <= 0 && nd == 0 && nb == 0, "pulses after release");

    // Down held for 3 periods: 3 decrements, 100 Hz spacing.
    hold(1'b1, 1'b0, 3 * DOWN_DIV + 1 + 10, nu, nd, nb, first, bad, DOWN_DIV);
    check(nd == 3, $sformatf("down held 3 periods gave %0d pulses", nd));
    check(nu == 0 && nb == 0, "down held gave up requests");
    check(first == DOWN_DIV + 1, $sformatf("first down pulse at %0d, expected %0d", first, DOWN_DIV + 1));
    check(bad == 0, "down pulses not evenly spaced");

    // Press up as well: both held -> up and down together on every clock
    // (after the two-clock synchronizer), no lone pulse.
    hold(1'b0, 1'b0, 200, nu, nd, nb, first, bad, 1);
    check(nb >= 198, $sformatf("both held: %0d of 200 clocks had up&down", nb));
    check(nu == 0 && nd == 0, "lone pulse while both held");

    // Let go of down only: up steps again, restarting its period.
    hold(1'b0, 1'b1, 2 * UP_DIV + 5, nu, nd, nb, first, bad, UP_DIV);
    check(nb <= 2, "both still reported after releasing down");
    check(nu == 2 && nd == 0, $sformatf("up after both: %0d up, %0d down", nu, nd));

    // Short taps shorter than one period give nothing.
    for (int i = 0; i < 5; i++) begin
      hold(1'b0, 1'b1, UP_DIV / 2, nu, nd, nb, first, bad, UP_DIV);
      check(nu == 0, "short tap stepped the count");
      hold(1'b1, 1'b1, 5, nu, nd, nb, first, bad, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
