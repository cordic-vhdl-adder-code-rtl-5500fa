// tb_rca_adder: self-checking test of the ripple carry adder.
//
// A 32-bit instance (the default width) gets corner cases (all-ones plus one,
// alternating patterns, largest values with carry in) and random operands; a
// 4-bit instance is checked exhaustively over all 2^9 input combinations.
// Expected values come from the simulator's own integer addition. Operands
// change every 20 ns clock period and outputs are checked one period later,
// since the adder is combinational.
module tb_rca_adder;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] a32, b32, s32;
  logic        c32, co32;
  rca_adder dut32 (.an(a32), .bn(b32), .ci(c32), .cn(s32), .co(co32));

  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  rca_adder #(.WD(4)) dut4 (.an(a4), .bn(b4), .ci(c4), .cn(s4), .co(co4));

  task automatic check32(logic [31:0] a, logic [31:0] b, logic c);
    logic [32:0] exp;
    a32 = a; b32 = b; c32 = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h + %h + %b = %b_%h, expected %b_%h", a, b, c, co32, s32, exp[32], exp[31:0]);
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; c32 = 1'b0; a4 = '0; b4 = '0; c4 = 1'b0;
    @(posedge clk);
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    check32(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int k = 0; k < 2000; k++)
      check32($urandom, $urandom, 1'($urandom));
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = 9'(v);
      @(posedge clk);
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(c4)) begin
        failures++;
        if (failures < 10) $display("FAIL 4: %h + %h + %b = %b_%h", a4, b4, c4, co4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
