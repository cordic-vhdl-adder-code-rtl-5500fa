// rca_adder: WD-bit ripple carry adder.
//
// Computes {co, cn} = an + bn + ci with a chain of WD full adders. Bit i
// produces the sum an[i] ^ bn[i] ^ c and the carry majority(an[i], bn[i], c),
// and that carry feeds bit i+1; the carry leaving bit WD-1 is co. The adder is
// purely combinational: outputs settle after the carry has rippled through
// all WD bits, there is no clock and no reset.
//
// The full-adder equations and the bit-serial carry ripple follow the
// ripple carry architecture of the design. The carry chain adder uses this
// same module, at WD = BD, as its block subadder.
module rca_adder #(
  parameter int unsigned WD = cordic_pkg::ADD_WD  // operand and sum width
) (
  input  logic [WD-1:0] an,  // first operand
  input  logic [WD-1:0] bn,  // second operand
  input  logic          ci,  // carry in
  output logic [WD-1:0] cn,  // sum
  output logic          co   // carry out of bit WD-1
);

  always_comb begin
    logic c;
    c = ci;
    for (int unsigned i = 0; i < WD; i++) begin
      cn[i] = an[i] ^ bn[i] ^ c;
      c     = (an[i] & bn[i]) | (an[i] & c) | (bn[i] & c);
    end
    co = c;
  end

endmodule
