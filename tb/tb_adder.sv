// tb_adder: end-to-end test of the adder top at its default parameters
// (32 bits, carry chain architecture with 4-bit blocks).
//
// Stimulus, one operation per 20 ns clock period, checked one period later:
//   1. the reference sweep: bn = 0x000000FF held, an stepped 0..31, ci = 0;
//   2. CORDIC fixed-point additions and subtractions (a - b as a + ~b + 1)
//      of values such as pi/4 and 1/K, compared with the real-valued result;
//   3. directed carry cases and random operands.
// Every result is compared with integer addition. The test also watches the
// carry chain inside the adder and counts how often each mechanism occurred:
// a block generating a carry, a carry propagated through a block, a carry
// propagated through all eight blocks, a carry in that reaches the sum, and
// a carry out. A mechanism that never occurred counts as a failure.
module tb_adder;

  import fixpt_pkg::*;

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

  adder dut (.an(an), .bn(bn), .ci(ci), .cn(cn), .co(co));

  int n_gen = 0, n_prop = 0, n_full_chain = 0, n_ci = 0, n_co = 0;

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
    // mechanisms, seen inside the carry chain adder
    if (|(dut.g_cca.u_add.g)) n_gen++;
    if (|(dut.g_cca.u_add.p & dut.g_cca.u_add.qi)) n_prop++;
    if (&(dut.g_cca.u_add.p) && c) n_full_chain++;
    if (c) n_ci++;
    if (co) n_co++;
  endtask

  // fixed-point a + b (sub = 0) or a - b (sub = 1), checked against reals
  task automatic apply_fx(real a, real b, bit sub);
    logic [31:0] fa, fb;
    real r, e;
    fa = to_fixed(a);
    fb = to_fixed(b);
    apply(fa, sub ? ~fb : fb, sub);
    r = to_real(cn);
    e = sub ? a - b : a + b;
    checks++;
    if (r - e > 1.0e-8 || e - r > 1.0e-8) begin
      failures++;
      $display("FAIL fixed-point: %f %s %f = %f, expected %f", a, sub ? "-" : "+", b, r, e);
    end
  endtask

  initial begin
    an = '0; bn = 32'h0000_0001; ci = 1'b0;
    repeat (5) @(posedge clk);

    // 1. reference sweep
    for (int i = 0; i < 32; i++) apply(32'(i), 32'h0000_00FF, 1'b0);

    // 2. fixed-point CORDIC values
    apply_fx(PI / 4.0, 0.5, 1'b0);
    apply_fx(PI / 4.0, 0.4636476090008061, 1'b1);   // atan(1/2)
    apply_fx(1.0 / CORDIC_K, -0.25, 1'b0);
    apply_fx(-1.5, 2.75, 1'b0);
    apply_fx(0.0, PI / 2.0, 1'b1);
    apply_fx(1.0, 1.0, 1'b1);

    // 3. directed carry cases and random operands
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'h1234_5678, 32'hEDCB_A987, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    for (int k = 0; k < 2000; k++) apply($urandom, $urandom, 1'($urandom));

    $display("mechanisms: generate=%0d propagate=%0d full_chain=%0d carry_in=%0d carry_out=%0d",
             n_gen, n_prop, n_full_chain, n_ci, n_co);
    checks += 5;
    if (n_gen == 0) failures++;
    if (n_prop == 0) failures++;
    if (n_full_chain == 0) failures++;
    if (n_ci == 0) failures++;
    if (n_co == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
