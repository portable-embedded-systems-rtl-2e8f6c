// gf_sqr: combinational squaring in GF(2^163).
//
// Squaring in polynomial basis moves coefficient a_i to x^(2i); the powers of
// x at and above x^163 are folded back with P(x). Every output bit is
// therefore a fixed XOR of two to five input bits (for example
// c10 = a5 + a83 + a85 + a161 + a162), so the unit is a small, irregular XOR
// network with no clock. The network is derived here from the reduction rule
// rather than written as a table; it is the same network.
//
//   a : operand          y : a^2 mod P(x)
module gf_sqr
  import gf2m_pkg::*;
(
  input  elem_t a,
  output elem_t y
);
  always_comb y = sqr(a);
endmodule
