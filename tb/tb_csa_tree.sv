// tb_csa_tree: self-checking test of the four-operand carry-save adder tree
// at its default width (48 bits, the width used at the 32-bit multiplier
// level). Corner cases (zeros, all ones, single bits, carries that ripple the
// full width) and random operands are applied; the sum is compared with the
// plain modular sum of the four operands. A watchdog ends a run that hangs.
module tb_csa_tree;
  localparam int unsigned W = 48;
  logic [W-1:0] x0, x1, x2, x3, sum;
  int checks = 0;
  int failures = 0;

  csa_tree dut (.x0(x0), .x1(x1), .x2(x2), .x3(x3), .sum(sum));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom(), $urandom()});
  endfunction

  task automatic apply(input logic [W-1:0] v0, v1, v2, v3);
    logic [W-1:0] expect_sum;
    x0 = v0; x1 = v1; x2 = v2; x3 = v3;
    expect_sum = v0 + v1 + v2 + v3;
    #1;
    checks++;
    if (sum !== expect_sum) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h+%h+%h+%h: got %h expected %h", v0, v1, v2, v3, sum, expect_sum);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply('1, W'(1), '0, '0);
    apply(W'(1), W'(1), W'(1), W'(1));
    for (int i = 0; i < W; i++) apply(W'(1) << i, W'(1) << i, W'(1) << i, W'(1) << i);
    for (int i = 0; i < 20000; i++) apply(rnd(), rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
