// gprom: block generate / propagate logic of the carry chain adder, as a ROM.
//
// For one BD-bit block with slices an and bn, the block generates a carry when
// an + bn > 2^BD - 1 (the block overflows on its own, whatever its carry in)
// and propagates its carry in when an + bn = 2^BD - 1 (all sum bits are one,
// so a carry in ripples straight through). Both bits are read from two
// 2^(2*BD)-entry one-bit tables addressed by {an, bn}, i.e. entry an*2^BD + bn.
// The tables are computed at elaboration by constant functions, so a
// different BD needs no new data; on an FPGA they map onto a LUT.
//
// en is a read enable. When en is low, g and p are both driven low, which
// makes the block neither generate nor propagate. The tables and their
// addressing follow the design; the behaviour with en low is this
// implementation's choice (the carry chain adder ties en high).
//
// Combinational: no clock, no reset.
module gprom #(
  parameter int unsigned BD = cordic_pkg::ADD_BD  // block width
) (
  input  logic [BD-1:0] an,  // block slice of the first operand
  input  logic [BD-1:0] bn,  // block slice of the second operand
  input  logic          en,  // read enable
  output logic          g,   // block carry generate
  output logic          p    // block carry propagate
);

  localparam int unsigned NADDR = 2 ** (2 * BD);
  localparam int unsigned MAXV  = 2 ** BD - 1;

  typedef logic [NADDR-1:0] rom_t;

  // Entry a*2^BD + b is 1 when a + b exceeds the largest BD-bit value.
  function automatic rom_t init_g();
    rom_t r;
    for (int unsigned a = 0; a <= MAXV; a++)
      for (int unsigned b = 0; b <= MAXV; b++)
        r[a * (MAXV + 1) + b] = (a + b > MAXV);
    return r;
  endfunction

  // Entry a*2^BD + b is 1 when a + b equals the largest BD-bit value.
  function automatic rom_t init_p();
    rom_t r;
    for (int unsigned a = 0; a <= MAXV; a++)
      for (int unsigned b = 0; b <= MAXV; b++)
        r[a * (MAXV + 1) + b] = (a + b == MAXV);
    return r;
  endfunction

  localparam rom_t ROM_G = init_g();
  localparam rom_t ROM_P = init_p();

  logic [2*BD-1:0] addr;
  assign addr = {an, bn};

  always_comb begin
    g = 1'b0;
    p = 1'b0;
    if (en) begin
      g = ROM_G[addr];
      p = ROM_P[addr];
    end
  end

endmodule
