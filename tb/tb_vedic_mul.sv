// tb_vedic_mul: self-checking test of the Vedic multiplier at each operand
// width the multiplier is built for: 4 and 8 bits exhaustively, 16 bits and
// the default 32 bits with corner and random operands. Every product is
// compared with the integer product computed by the testbench. The
// multiplier is combinational, so each result is checked one time step after
// its operands change. A watchdog ends a run that hangs.
module tb_vedic_mul;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  q4;
  logic [7:0]  a8, b8;   logic [15:0] q8;
  logic [15:0] a16, b16; logic [31:0] q16;
  logic [31:0] a32, b32; logic [63:0] q32;

  vedic_mul #(.N(4))  dut4  (.a(a4),  .b(b4),  .q(q4));
  vedic_mul #(.N(8))  dut8  (.a(a8),  .b(b8),  .q(q8));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .q(q16));
  vedic_mul           dut32 (.a(a32), .b(b32), .q(q32));  // default N = 32

  task automatic check(input string tag, input longint unsigned got, input longint unsigned exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, exp_v);
    end
  endtask

  task automatic apply32(input logic [31:0] x, input logic [31:0] y);
    a32 = x; b32 = y;
    #1;
    check("32", 64'(q32), longint'(x) * longint'(y));
  endtask

  task automatic apply16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    check("16", 64'(q16), longint'(x) * longint'(y));
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a32 = '0; b32 = '0; a8 = '0; b8 = '0;
    // 4 bits, exhaustive
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        check("4", 64'(q4), longint'(i * j));
      end
    // 8 bits, exhaustive
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        check("8", 64'(q8), longint'(i * j));
      end
    // 16 bits, corners and random
    apply16('1, '1);
    apply16('1, 16'd1);
    apply16(16'h8000, 16'h8000);
    for (int i = 0; i < 20000; i++) apply16(16'($urandom()), 16'($urandom()));
    // 32 bits, corners and random
    apply32('0, '0);
    apply32('1, '1);
    apply32('1, 32'd1);
    apply32(32'h8000_0000, 32'h8000_0000);
    apply32(32'hFFFF_0000, 32'h0000_FFFF);
    apply32(32'd31, 32'd44);
    for (int i = 0; i < 32; i++) apply32(32'h1 << i, '1);
    for (int i = 0; i < 50000; i++) apply32($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
