// tb_mac_unit: end-to-end self-checking test of the 32-bit MAC unit at its
// default sizes (32-bit operands, 64-bit accumulator).
//
// Operands are driven on the falling clock edge. The testbench keeps its own
// running sum of a*b modulo 2^64 and checks after every rising edge that acc
// equals it, which also checks the one-edge latency; it also checks that acc
// does not move between edges. The run covers:
//   - reset at start and in mid-stream (acc returns to zero),
//   - a 16-term dot product (one complete multiply-accumulate operation),
//   - the decimal example 31 x 44 = 1364,
//   - operand corners (zero, all ones, single bits),
//   - a long random stream in which the 64-bit sum wraps around.
// Each mechanism (reset, accumulate, wrap-around) is counted and must occur
// at least once. A watchdog ends a run that hangs.
module tb_mac_unit;
  import mac_pkg::*;

  logic clock;
  logic reset;
  logic [MAC_N-1:0] a, b;
  logic [MAC_ACC_W-1:0] acc;
  logic [MAC_ACC_W-1:0] model;
  int checks = 0;
  int failures = 0;
  int n_reset = 0;
  int n_accumulate = 0;
  int n_wrap = 0;

  mac_unit dut (.clock(clock), .reset(reset), .a(a), .b(b), .acc(acc));

  initial clock = 1'b0;
  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [MAC_ACC_W-1:0] got,
                           input logic [MAC_ACC_W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: acc %h expected %h", what, got, exp_v);
    end
  endtask

  // one clock cycle: present operands at the falling edge, check after the rising edge
  task automatic cycle(input logic rst, input logic [MAC_N-1:0] x, input logic [MAC_N-1:0] y);
    logic [MAC_ACC_W-1:0] prod;
    logic [MAC_ACC_W-1:0] held;
    @(negedge clock);
    reset = rst;
    a = x;
    b = y;
    held = model;
    prod = MAC_ACC_W'(x) * MAC_ACC_W'(y);
    if (rst) begin
      model = '0;
      n_reset++;
    end else begin
      if (model + prod < model) n_wrap++;
      model = model + prod;
      n_accumulate++;
    end
    #1;
    expect_eq("hold before edge", acc, held);
    @(posedge clock);
    #1;
    expect_eq("after edge", acc, model);
  endtask

  initial begin
    logic [MAC_N-1:0] va [16];
    logic [MAC_N-1:0] vb [16];
    logic [MAC_ACC_W-1:0] dot;

    reset = 1'b1;
    a = '0;
    b = '0;
    model = '0;
    @(negedge clock);
    @(posedge clock);
    #1;
    model = '0;  // register state now known
    n_reset++;

    // decimal example from the Vedic method
    cycle(1'b1, '0, '0);
    cycle(1'b0, 32'd31, 32'd44);
    expect_eq("31x44", acc, 64'd1364);

    // one complete operation: 16-term dot product from a cleared accumulator
    dot = '0;
    for (int i = 0; i < 16; i++) begin
      va[i] = $urandom();
      vb[i] = $urandom();
      dot += MAC_ACC_W'(va[i]) * MAC_ACC_W'(vb[i]);
    end
    cycle(1'b1, '1, '1);  // operands during reset must be ignored
    for (int i = 0; i < 16; i++) cycle(1'b0, va[i], vb[i]);
    expect_eq("dot product", acc, dot);

    // operand corners
    cycle(1'b1, '0, '0);
    cycle(1'b0, '0, '1);
    cycle(1'b0, '1, '0);
    cycle(1'b0, '1, '1);
    cycle(1'b0, '1, 32'd1);
    for (int i = 0; i < MAC_N; i++) cycle(1'b0, 32'h1 << i, 32'h8000_0000 >> i);

    // long random stream with a reset in the middle; the sum wraps many times
    for (int i = 0; i < 3000; i++) cycle(1'b0, $urandom(), $urandom());
    cycle(1'b1, $urandom(), $urandom());
    for (int i = 0; i < 3000; i++) cycle(1'b0, $urandom(), $urandom());

    $display("mechanisms: reset %0d accumulate %0d wrap %0d", n_reset, n_accumulate, n_wrap);
    if (n_reset == 0)      begin failures++; $display("FAIL reset never exercised");      end
    if (n_accumulate == 0) begin failures++; $display("FAIL accumulate never exercised"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL wrap-around never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
