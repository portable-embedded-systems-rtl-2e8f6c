// gf_divx: division of a field element by the polynomial x, modulo P(x).
//
// If the constant coefficient is 1 the element is first made divisible by
// adding P(x) (which undoes a reduction, because P(x) has a constant term),
// then it is shifted right by one position; the x^k term of P(x) lands at
// x^(k-1). If the constant coefficient is 0 only the shift is needed. Used by
// the inverter for its U/x step. Purely combinational.
//
//   a : operand          y : a / x mod P(x)
module gf_divx
  import gf2m_pkg::*;
(
  input  elem_t a,
  output elem_t y
);
  always_comb y = divx(a);
endmodule
