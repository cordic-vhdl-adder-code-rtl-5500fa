// tb_cca_adder: self-checking test of the carry chain adder.
//
// The default instance (32 bits in 8 blocks of 4) gets corner cases that
// exercise each carry path (a carry generated in one block and propagated
// through all higher ones, a carry in propagated through every block, blocks
// that kill the carry) and random operands. An 8-bit instance with 2-bit
// blocks is checked exhaustively (2^17 cases) and a 16-bit instance with
// 8-bit blocks randomly. Expected values come from integer addition. One
// case per 20 ns clock period.
module tb_cca_adder;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] a32, b32, s32;
  logic        c32, co32;
  cca_adder dut32 (.an(a32), .bn(b32), .ci(c32), .cn(s32), .co(co32));

  logic [7:0] a8, b8, s8;
  logic       c8, co8;
  cca_adder #(.WD(8), .BD(2)) dut8 (.an(a8), .bn(b8), .ci(c8), .cn(s8), .co(co8));

  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  cca_adder #(.WD(16), .BD(8)) dut16 (.an(a16), .bn(b16), .ci(c16), .cn(s16), .co(co16));

  task automatic check32(logic [31:0] a, logic [31:0] b, logic c);
    logic [32:0] exp;
    a32 = a; b32 = b; c32 = c;
    a16 = a[15:0]; b16 = b[31:16]; c16 = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h + %h + %b = %b_%h, expected %b_%h", a, b, c, co32, s32, exp[32], exp[31:0]);
    end
    checks++;
    if ({co16, s16} !== 17'(a[15:0]) + 17'(b[31:16]) + 17'(c)) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h + %h + %b = %b_%h", a[15:0], b[31:16], c, co16, s16);
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; c32 = 1'b0; a8 = '0; b8 = '0; c8 = 1'b0;
    a16 = '0; b16 = '0; c16 = 1'b0;
    @(posedge clk);
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);  // generate in block 0, propagate 1..7
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);  // ci propagated through all blocks
    check32(32'h0F0F_0F0F, 32'h0000_0000, 1'b1);  // ci stopped in block 1
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);  // every block generates
    check32(32'h1234_5678, 32'hEDCB_A988, 1'b0);  // all blocks propagate then generate
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h7FFF_FFF0, 32'h0000_0010, 1'b0);
    for (int k = 0; k < 3000; k++)
      check32($urandom, $urandom, 1'($urandom));
    // random operands made of propagate-heavy blocks
    for (int k = 0; k < 1000; k++) begin
      logic [31:0] a, m;
      a = $urandom;
      m = $urandom;
      check32(a, ~a ^ (m & 32'h1111_1111 & {32{m[0]}}), 1'($urandom));
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      @(posedge clk);
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(c8)) begin
        failures++;
        if (failures < 10) $display("FAIL 8: %h + %h + %b = %b_%h", a8, b8, c8, co8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
