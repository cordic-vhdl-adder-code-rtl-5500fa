// tb_carry_chain: self-checking test of the block carry chain.
//
// With the default 8 blocks, every assignment of a state to each block
// (kill: g=0 p=0, generate: g=1 p=0, propagate: g=0 p=1; 3^8 cases) is
// applied with carry in 0 and 1. The expected carry into block i is found by
// walking down from block i-1 to the nearest block that does not propagate:
// its generate bit is the carry, or ci if every lower block propagates. The
// expected co is the carry into a virtual block 8. One case per 20 ns clock.
module tb_carry_chain;

  localparam int ND = 8;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          ci, co;
  logic [ND-1:0] g, p, qi;
  carry_chain dut (.ci(ci), .g(g), .p(p), .qi(qi), .co(co));

  function automatic logic carry_into(int blk, logic [ND-1:0] gg, logic [ND-1:0] pp, logic c0);
    for (int j = blk - 1; j >= 0; j--)
      if (!pp[j]) return gg[j];
    return c0;
  endfunction

  initial begin
    int code;
    logic [ND-1:0] eq;
    ci = 1'b0; g = '0; p = '0;
    @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      for (int n = 0; n < 6561; n++) begin
        code = n;
        for (int i = 0; i < ND; i++) begin
          g[i] = (code % 3 == 1);
          p[i] = (code % 3 == 2);
          code = code / 3;
        end
        ci = 1'(c);
        @(posedge clk);
        for (int i = 0; i < ND; i++) eq[i] = carry_into(i, g, p, ci);
        checks++;
        if (qi !== eq || co !== carry_into(ND, g, p, ci)) begin
          failures++;
          if (failures < 10)
            $display("FAIL ci=%b g=%b p=%b: qi=%b co=%b expected qi=%b", ci, g, p, qi, co, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
