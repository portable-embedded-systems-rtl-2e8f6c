// gf_mulx: multiplication of a field element by the polynomial x, modulo P(x).
//
// The element is shifted left by one position; the coefficient that falls out
// at x^k is folded back by adding the low terms of P(x). With the pentanomial
// x^163 + x^7 + x^6 + x^3 + 1 that costs three XOR gates (bits 3, 6 and 7; bit
// 0 is just the shifted-out coefficient). This is the basic cell of the field
// multiplier and of the inverter. Purely combinational.
//
//   a : operand          y : a * x mod P(x)
module gf_mulx
  import gf2m_pkg::*;
(
  input  elem_t a,
  output elem_t y
);
  always_comb y = mulx(a);
endmodule
