// tb_modncount: self-checking testbench for one modulo-n counter digit.
//
// Four digits with n = 5, 6, 7 and 9 (every modulus the lab assigns) plus a
// modulus-16 digit run side by side on the same random stream of up/down
// requests. Each has its own reference model, an integer updated by the
// specification's rules (hold, +1 mod n, -1 mod n, clear on both). Every
// cycle the testbench checks count against the model and, after the inputs
// settle, carry and borrow against the table: carry = up & (count == n-1 |
// down), borrow = down & (count == 0 | up). It also requires each digit to
// have wrapped upward and downward and to have been cleared at least once.
module tb_modncount;
  import lab5_pkg::digit_t;

  localparam int NCFG = 5;
  localparam int unsigned MODS [NCFG] = '{5, 6, 7, 9, 16};
  localparam int CYCLES = 4000;

  logic clk = 1'b0;
  logic up, down;
  always #5 clk = ~clk;

  int checks [NCFG];
  int failures [NCFG];
  int wraps_up [NCFG];
  int wraps_down [NCFG];
  int clears [NCFG];
  bit done = 1'b0;

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    localparam int unsigned N = MODS[k];
    digit_t count;
    logic   carry, borrow;
    int     model;

    modncount #(.N(N)) dut (
      .clock (clk), .up (up), .down (down),
      .count (count), .carry (carry), .borrow (borrow)
    );

    initial begin
      checks[k] = 0; failures[k] = 0;
      wraps_up[k] = 0; wraps_down[k] = 0; clears[k] = 0;
      model = -1;                              // unknown until the first clear
      forever begin
        @(negedge clk);
        #2;                                    // inputs set at negedge+1
        if (model >= 0) begin
          logic exp_carry, exp_borrow;
          checks[k]++;
          if (int'(count) != model) begin
            failures[k]++;
            $display("n=%0d: count %0d, expected %0d", N, count, model);
          end
          exp_carry  = up   && (down || model == int'(N) - 1);
          exp_borrow = down && (up   || model == 0);
          checks[k]++;
          if (carry !== exp_carry || borrow !== exp_borrow) begin
            failures[k]++;
            $display("n=%0d count=%0d up=%b down=%b: carry/borrow %b%b, expected %b%b",
                     N, model, up, down, carry, borrow, exp_carry, exp_borrow);
          end
        end
        // Next value after the coming rising edge.
        case ({up, down})
          2'b11: begin model = 0; clears[k]++; end
          2'b10: if (model >= 0) begin
                   if (model == int'(N) - 1) begin model = 0; wraps_up[k]++; end
                   else model = model + 1;
                 end
          2'b01: if (model >= 0) begin
                   if (model == 0) begin model = int'(N) - 1; wraps_down[k]++; end
                   else model = model - 1;
                 end
          default: ;
        endcase
      end
    end
  end

  // Stimulus: runs of up or down requests with gaps, and occasional clears.
  initial begin
    int mode;
    up = 1'b1; down = 1'b1;                    // clear first
    @(negedge clk); #1;
    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk); #1;
      mode = $urandom_range(0, 99);
      if (i % 400 < 200) begin                 // up-heavy phase
        up   = mode < 70;
        down = mode >= 70 && mode < 80;
      end else begin                           // down-heavy phase
        up   = mode < 10;
        down = mode >= 10 && mode < 80;
      end
      if (mode == 99) begin up = 1'b1; down = 1'b1; end
    end
    @(negedge clk); #3;
    done = 1'b1;
  end

  initial begin
    int tc, tf;
    wait (done);
    tc = 0; tf = 0;
    for (int k = 0; k < NCFG; k++) begin
      tc += checks[k] + 1;
      tf += failures[k];
      if (wraps_up[k] == 0 || wraps_down[k] == 0 || clears[k] < 2) begin
        tf++;
        $display("n=%0d: coverage missing (wraps up %0d, down %0d, clears %0d)",
                 MODS[k], wraps_up[k], wraps_down[k], clears[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (CYCLES * 2 + 100) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
