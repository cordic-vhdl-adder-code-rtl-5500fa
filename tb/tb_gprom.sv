// tb_gprom: self-checking test of the generate/propagate ROM.
//
// For block widths 4 (the default) and 2, every pair of block slices is
// applied with the enable high and the outputs are compared with the block
// sum worked out by integer addition: g must be set exactly when the sum
// exceeds the largest block value and p exactly when it equals it. With the
// enable low both outputs must be low. One input per 20 ns clock period.
module tb_gprom;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] a4, b4;
  logic       en4, g4, p4;
  gprom dut4 (.an(a4), .bn(b4), .en(en4), .g(g4), .p(p4));

  logic [1:0] a2, b2;
  logic       en2, g2, p2;
  gprom #(.BD(2)) dut2 (.an(a2), .bn(b2), .en(en2), .g(g2), .p(p2));

  initial begin
    int sum;
    logic eg, ep;
    a4 = '0; b4 = '0; en4 = 1'b0; a2 = '0; b2 = '0; en2 = 1'b0;
    @(posedge clk);
    for (int e = 1; e >= 0; e--) begin
      for (int a = 0; a < 16; a++) begin
        for (int b = 0; b < 16; b++) begin
          a4 = 4'(a); b4 = 4'(b); en4 = 1'(e);
          a2 = 2'(a); b2 = 2'(b); en2 = 1'(e);
          @(posedge clk);
          sum = a + b;
          eg = (e == 1) && (sum > 15);
          ep = (e == 1) && (sum == 15);
          checks++;
          if (g4 !== eg || p4 !== ep) begin
            failures++;
            if (failures < 10) $display("FAIL BD=4 en=%0d a=%0d b=%0d: g=%b p=%b", e, a, b, g4, p4);
          end
          sum = (a % 4) + (b % 4);
          eg = (e == 1) && (sum > 3);
          ep = (e == 1) && (sum == 3);
          checks++;
          if (g2 !== eg || p2 !== ep) begin
            failures++;
            if (failures < 10) $display("FAIL BD=2 en=%0d a=%0d b=%0d: g=%b p=%b", e, a % 4, b % 4, g2, p2);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
