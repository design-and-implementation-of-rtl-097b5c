// tb_accumulator: self-checking test of the 64-bit accumulator register.
// Random addends are presented on the falling clock edge; after every rising
// edge the register must hold the testbench's running sum (modulo 2^64),
// which also checks the one-edge latency. Reset is applied at the start and
// again in mid-stream, and large addends force wrap-around past 2^64; each of
// these must happen at least once. A watchdog ends a run that hangs.
module tb_accumulator;
  localparam int unsigned W = 64;
  logic clock;
  logic reset;
  logic [W-1:0] q;
  logic [W-1:0] acc;
  logic [W-1:0] model;
  int checks = 0;
  int failures = 0;
  int n_reset = 0;
  int n_wrap = 0;
  int cycles = 0;

  accumulator dut (.clock(clock), .reset(reset), .q(q), .acc(acc));

  initial clock = 1'b0;
  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: drive at the falling edge, check after the rising edge
  task automatic step(input logic rst, input logic [W-1:0] addend);
    @(negedge clock);
    reset = rst;
    q = addend;
    if (rst) begin
      model = '0;
      n_reset++;
    end else begin
      if (model + addend < model) n_wrap++;
      model = model + addend;
    end
    @(posedge clock);
    #1;
    cycles++;
    checks++;
    if (acc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: acc %h expected %h", cycles, acc, model);
    end
  endtask

  initial begin
    reset = 1'b1;
    q = '0;
    model = '0;
    step(1'b1, 64'h1234);
    step(1'b1, '1);
    for (int i = 0; i < 500; i++) step(1'b0, W'({$urandom(), $urandom()}));
    step(1'b1, 64'h55);
    for (int i = 0; i < 10; i++) step(1'b0, W'(i));
    for (int i = 0; i < 10; i++) step(1'b0, '1);  // each wraps
    step(1'b0, '0);
    if (n_reset < 2 || n_wrap < 1) begin
      failures++;
      $display("FAIL coverage: resets %0d wraps %0d", n_reset, n_wrap);
    end
    $display("resets %0d wraps %0d", n_reset, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
