// tb_adder_rca: test of the adder top in its ripple carry configuration
// (ARCH_RCA, 32 bits).
//
// Applies the reference sweep (bn = 0x000000FF, an = 0..31, ci = 0), directed
// carry cases and random operands, one per 20 ns clock period, and compares
// {co, cn} with integer addition one period later. Counts that a carry in and
// a carry out each occurred at least once.
module tb_adder_rca;

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

  logic [31:0] an, bn, cn;
  logic        ci, co;

  adder #(.ARCH(cordic_pkg::ARCH_RCA)) dut (.an(an), .bn(bn), .ci(ci), .cn(cn), .co(co));

  int n_ci = 0, n_co = 0;

  task automatic apply(logic [31:0] a, logic [31:0] b, logic c);
    logic [32:0] exp;
    an = a; bn = b; ci = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + 33'(c);
    checks++;
    if ({co, cn} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %h + %h + %b = %b_%h, expected %b_%h", a, b, c, co, cn, exp[32], exp[31:0]);
    end
    if (c) n_ci++;
    if (co) n_co++;
  endtask

  initial begin
    an = '0; bn = 32'h0000_0001; ci = 1'b0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 32; i++) apply(32'(i), 32'h0000_00FF, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    for (int k = 0; k < 2000; k++) apply($urandom, $urandom, 1'($urandom));
    checks += 2;
    if (n_ci == 0) failures++;
    if (n_co == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
