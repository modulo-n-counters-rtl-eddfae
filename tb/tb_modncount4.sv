// tb_modncount4: self-checking testbench for the four-digit modulo-n counter.
//
// Two counters, n = 7 (the default) and n = 5, get the same requests: a long
// run of increments that carries through every digit and wraps the whole
// counter, a long run of decrements that borrows through every digit and
// wraps it back, then random requests with clears. The reference model is an
// integer modulo n^4; every cycle each digit is checked against the base-n
// digits of the model, and the carry/borrow out of the most significant digit
// against the wrap condition of the whole counter.
module tb_modncount4;
  import lab5_pkg::*;

  localparam int NCFG = 2;
  localparam int unsigned MODS [NCFG] = '{7, 5};
  localparam int RUN = 2500;                 // > 7^4 = 2401
  localparam int RANDOM = 2000;
  localparam int CYCLES = 2 * RUN + RANDOM;

  logic clk = 1'b0;
  logic up, down;
  always #5 clk = ~clk;

  int checks [NCFG];
  int failures [NCFG];
  int top_carries [NCFG];
  int top_borrows [NCFG];
  bit done = 1'b0;

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    localparam int unsigned N = MODS[k];
    localparam int M = N * N * N * N;
    digit_t count [DIGITS];
    logic   carry, borrow;
    int     model;

    modncount4 #(.N(N)) dut (
      .clock (clk), .up_in (up), .down_in (down),
      .count (count), .carry (carry), .borrow (borrow)
    );

    initial begin
      checks[k] = 0; failures[k] = 0; top_carries[k] = 0; top_borrows[k] = 0;
      model = -1;
      forever begin
        @(negedge clk);
        #2;
        if (model >= 0) begin
          logic exp_carry, exp_borrow;
          int v;
          v = model;
          for (int i = 0; i < DIGITS; i++) begin
            checks[k]++;
            if (int'(count[i]) != v % int'(N)) begin
              failures[k]++;
              $display("n=%0d value %0d: digit %0d is %0d, expected %0d",
                       N, model, i, count[i], v % int'(N));
            end
            v = v / int'(N);
          end
          exp_carry  = up   && (down || model == M - 1);
          exp_borrow = down && (up   || model == 0);
          checks[k]++;
          if (carry !== exp_carry || borrow !== exp_borrow) begin
            failures[k]++;
            $display("n=%0d value %0d up=%b down=%b: carry/borrow %b%b, expected %b%b",
                     N, model, up, down, carry, borrow, exp_carry, exp_borrow);
          end
          if (exp_carry && !down) top_carries[k]++;
          if (exp_borrow && !up)  top_borrows[k]++;
        end
        case ({up, down})
          2'b11: model = 0;
          2'b10: if (model >= 0) model = (model + 1) % M;
          2'b01: if (model >= 0) model = (model + M - 1) % M;
          default: ;
        endcase
      end
    end
  end

  initial begin
    int mode;
    up = 1'b1; down = 1'b1;                  // clear
    @(negedge clk); #1;
    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk); #1;
      mode = $urandom_range(0, 99);
      if (i < RUN) begin                     // count up, with idle cycles
        up = mode < 99; down = 1'b0;
        if (i > RUN - 50) up = 1'b1;
      end else if (i < 2 * RUN) begin        // count down
        up = 1'b0; down = 1'b1;
      end else begin
        up   = mode < 45;
        down = mode >= 45 && mode < 90;
        if (mode == 99) begin up = 1'b1; down = 1'b1; end
      end
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
      if (top_carries[k] == 0 || top_borrows[k] == 0) begin
        tf++;
        $display("n=%0d: the whole counter never wrapped (up %0d, down %0d)",
                 MODS[k], top_carries[k], top_borrows[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
