// cca_adder: WD-bit carry chain adder.
//
// The operands are cut into ND = WD/BD blocks of BD bits, block 0 holding the
// least significant bits. Every block has
//   - a BD-bit ripple carry subadder (rca_adder) that forms the block's sum
//     from its slices of an and bn and its block carry in, and
//   - a gprom that tells from the same slices alone whether the block
//     generates a carry or propagates its carry in.
// The carry_chain turns the ND generate/propagate pairs and ci into the carry
// into every block and the adder's carry out co. Because g and p depend on
// the operands only, all blocks work out g and p at once and the carry then
// crosses each block in one multiplexer; only inside a block does it ripple.
// The sum is the concatenation of the block sums.
//
// The subadders' own carry outs are not used: co and the block carries come
// from the chain. Each equals the chain cell output of its block, so they
// are left unconnected on purpose (lint reports them as unused).
//
// Structure, block slicing, the generate/propagate definitions and the chain
// follow the design; the design's configuration binds the subadder to the
// ripple carry architecture. WD must be a multiple of BD (checked at
// elaboration). Combinational: no clock, no reset.
module cca_adder #(
  parameter int unsigned WD = cordic_pkg::ADD_WD,  // operand and sum width
  parameter int unsigned BD = cordic_pkg::ADD_BD   // block width
) (
  input  logic [WD-1:0] an,  // first operand
  input  logic [WD-1:0] bn,  // second operand
  input  logic          ci,  // carry in
  output logic [WD-1:0] cn,  // sum
  output logic          co   // carry out
);

  localparam int unsigned ND = WD / BD;

  if (WD % BD != 0 || ND == 0) begin : g_bad_params
    $error("cca_adder: WD (%0d) must be a non-zero multiple of BD (%0d)", WD, BD);
  end

  logic [ND-1:0] g, p;     // block generate / propagate
  logic [ND-1:0] qi;       // carry into each block
  logic [ND-1:0] blk_co;   // subadder carry outs (not used, see above)

  for (genvar i = 0; i < ND; i++) begin : g_blk
    rca_adder #(.WD(BD)) u_sub (
      .an (an[i*BD +: BD]),
      .bn (bn[i*BD +: BD]),
      .ci (qi[i]),
      .cn (cn[i*BD +: BD]),
      .co (blk_co[i])
    );

    gprom #(.BD(BD)) u_gp (
      .an (an[i*BD +: BD]),
      .bn (bn[i*BD +: BD]),
      .en (1'b1),
      .g  (g[i]),
      .p  (p[i])
    );
  end

  carry_chain #(.ND(ND)) u_chain (
    .ci (ci),
    .g  (g),
    .p  (p),
    .qi (qi),
    .co (co)
  );

endmodule
