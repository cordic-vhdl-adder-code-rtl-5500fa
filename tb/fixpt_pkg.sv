// fixpt_pkg: testbench helpers for the CORDIC fixed-point format.
//
// A value v is held as a 32-bit two's complement word round(v * 2^29): sign
// in bit 31, integer part in bits 30..29, fraction in bits 28..0. to_fixed
// and to_real convert between that word and a real, so tests can state
// operands and expected results as ordinary numbers.
package fixpt_pkg;

  localparam real SCALE = real'(64'd1 << cordic_pkg::FX_FRAC);

  localparam real PI     = 3.141592653589793;
  localparam real CORDIC_K = 1.646760258121;  // CORDIC gain after many iterations

  function automatic logic [cordic_pkg::FX_WIDTH-1:0] to_fixed(real x);
    longint v;
    v = longint'(x * SCALE);  // rounds to nearest
    return v[cordic_pkg::FX_WIDTH-1:0];
  endfunction

  function automatic real to_real(logic [cordic_pkg::FX_WIDTH-1:0] s);
    return real'(signed'(s)) / SCALE;
  endfunction

endpackage
