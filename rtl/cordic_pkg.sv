// cordic_pkg: types and constants shared by the adder blocks of a CORDIC
// datapath.
//
// The CORDIC datapath keeps its x, y and z values as 32-bit two's complement
// fixed-point numbers: bit 31 is the sign, bits 30..29 are the integer part
// and bits 28..0 are the fraction, so a value v is stored as round(v * 2^29)
// and the representable range is [-4, 4). The adders themselves are plain
// binary adders and do not depend on where the binary point sits; the format
// is here so that testbenches and later CORDIC stages agree on it.
//
// The adder comes in two architectures, selected at elaboration time by the
// adder_arch_e parameter of the top module: a ripple carry adder and a carry
// chain adder built from ripple carry sub-blocks.
package cordic_pkg;

  // Word width of a CORDIC value and position of its binary point.
  localparam int unsigned FX_WIDTH = 32;
  localparam int unsigned FX_FRAC  = 29;

  // Default adder width and carry chain block size.
  localparam int unsigned ADD_WD = 32;
  localparam int unsigned ADD_BD = 4;

  // Adder architecture selection.
  typedef enum logic [0:0] {
    ARCH_RCA = 1'b0,  // ripple carry adder over the full width
    ARCH_CCA = 1'b1   // carry chain adder of BD-bit ripple blocks
  } adder_arch_e;

endpackage
