// ec_point_codec: collapsed representation of a curve point.
//
// A point of a prime-order subgroup is sent as one k-bit word instead of two
// coordinates. Every such point is the double of another, so its x satisfies
// T(x) = T(a). The trace of x involves only bits 0 and 157, so bit 0 of x is
// redundant: it is recovered as x0 = T(a) + x157. The freed bit carries
// T(y/x), which tells which of the two y values belongs to the point.
//
//   collapse   : {x, T(y/x)}  -> word = {x[k-1:1], T(y/x)}
//   uncollapse : word         -> x = {word[k-1:1], x0}, T(y/x) = word[0]
//
// Purely combinational: apart from the recovered bit x0 (and the trace
// select) the outputs are rewired inputs. The encoding (bit 0 replaced, recovered from the
// other traced bit) is the document's; that both directions sit in one module
// is this design's choice.
module ec_point_codec
  import gf2m_pkg::*;
(
  // collapse
  input  elem_t x_in,
  input  logic  tr_in,
  output elem_t word_out,
  // uncollapse
  input  elem_t word_in,
  output elem_t x_out,
  output logic  tr_out
);
  always_comb begin
    word_out = {x_in[K-1:1], tr_in};
    tr_out   = word_in[0];
    // x0 = T(a) + (the other traced bits of x)
    x_out    = {word_in[K-1:1], trace(CURVE_A) ^ (^(word_in & TRACE_MASK & ~elem_t'(1)))};
  end
endmodule
