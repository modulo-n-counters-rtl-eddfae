// tb_seg7_decode: exhaustive self-checking testbench for the seven-segment
// decoder. All sixteen digit values are applied and the segment outputs
// compared with reference patterns written as lists of lit segments; the
// sixteen patterns must also all differ, so every value is readable.
module tb_seg7_decode;
  import lab5_pkg::*;
  import seg7_ref_pkg::*;

  digit_t digit;
  seg_t   seg;
  int     checks = 0;
  int     failures = 0;

  seg7_decode dut (.digit (digit), .seg (seg));

  initial begin
    logic [6:0] seen [16];
    for (int v = 0; v < 16; v++) begin
      digit = digit_t'(v);
      #1;
      checks++;
      seen[v] = seg;
      if (7'(seg) !== pattern(v)) begin
        failures++;
        $display("digit %0d: segments %b, expected %b (%s)", v, seg, pattern(v), lit(v));
      end
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if (seen[i] == seen[j]) begin
          failures++;
          $display("digits %0d and %0d look the same", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
