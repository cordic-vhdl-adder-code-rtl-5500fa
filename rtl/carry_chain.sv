// carry_chain: the block carry chain of the carry chain adder.
//
// One cell per block. Cell i receives the carry into block i (qi[i]) and
// delivers the carry out of block i: when the block propagates (p[i]) the
// cell passes qi[i] on, otherwise it outputs the block's generate bit g[i].
// Cell 0 receives the adder's carry in ci, cell i > 0 receives the output of
// cell i-1, and the output of the last cell is the adder's carry out co.
// Each cell is a single 2:1 multiplexer, which is what a dedicated FPGA carry
// chain provides, so a carry crosses a block in one mux delay instead of BD
// full-adder delays.
//
// qi is brought out because each block's subadder needs its own carry in;
// qi[0] is ci itself.
// The cell function and the chaining follow the design. Combinational: no
// clock, no reset.
module carry_chain #(
  parameter int unsigned ND = cordic_pkg::ADD_WD / cordic_pkg::ADD_BD  // number of blocks
) (
  input  logic          ci,  // carry into block 0
  input  logic [ND-1:0] g,   // block generate bits
  input  logic [ND-1:0] p,   // block propagate bits
  output logic [ND-1:0] qi,  // carry into each block
  output logic          co   // carry out of block ND-1
);

  always_comb begin
    logic q;
    q = ci;
    for (int unsigned i = 0; i < ND; i++) begin
      qi[i] = q;
      q     = p[i] ? q : g[i];
    end
    co = q;
  end

endmodule
