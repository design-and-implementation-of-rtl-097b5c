// tb_vedic_mul_2x2: exhaustive self-checking test of the 2x2 Vedic
// multiplier. All 16 operand pairs are applied and the 4-bit product is
// compared with the integer product a*b. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_vedic_mul_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0;
  int failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (q !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
