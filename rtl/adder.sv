// adder: top of the CORDIC adder, {co, cn} = an + bn + ci over WD bits.
//
// The same interface is implemented by two architectures, chosen at
// elaboration by ARCH:
//   ARCH_RCA  one WD-bit ripple carry adder (rca_adder);
//   ARCH_CCA  a carry chain adder (cca_adder) of WD/BD ripple blocks of BD
//             bits whose block carries come from a generate/propagate
//             carry chain.
// Both give identical results; they differ only in the path the carry takes.
// BD only matters for ARCH_CCA and must divide WD.
//
// The interface, the defaults WD = 32 and BD = 4 and the two architectures
// follow the design. Selecting the architecture with a parameter, and making
// the carry chain adder the default, is this implementation's choice.
// Combinational: no clock, no reset; outputs follow the inputs after the
// carry path delay.
module adder #(
  parameter int unsigned            WD   = cordic_pkg::ADD_WD,  // operand and sum width
  parameter int unsigned            BD   = cordic_pkg::ADD_BD,  // carry chain block width
  parameter cordic_pkg::adder_arch_e ARCH = cordic_pkg::ARCH_CCA // architecture
) (
  input  logic [WD-1:0] an,  // first operand
  input  logic [WD-1:0] bn,  // second operand
  input  logic          ci,  // carry in
  output logic [WD-1:0] cn,  // sum
  output logic          co   // carry out
);

  if (ARCH == cordic_pkg::ARCH_CCA) begin : g_cca
    cca_adder #(.WD(WD), .BD(BD)) u_add (
      .an (an), .bn (bn), .ci (ci), .cn (cn), .co (co)
    );
  end else begin : g_rca
    rca_adder #(.WD(WD)) u_add (
      .an (an), .bn (bn), .ci (ci), .cn (cn), .co (co)
    );
  end

endmodule
