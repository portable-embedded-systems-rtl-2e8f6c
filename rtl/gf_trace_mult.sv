// gf_trace_mult: trace of a product, T(A*B), without forming the product.
//
// The trace is linear, T(C) = sum of t_n c_n, and the unreduced product has
// coefficient sum_{i+j=n} a_i b_j at x^n. So T(A*B) is the XOR of all a_i b_j
// for which x^(i+j) mod P(x) has trace 1. With P(x) = x^163+x^7+x^6+x^3+1 the
// trace vector has only bits 0 and 157 set, and the exponents that matter are
// i+j in {0, 157, 163, 313, 314, 317, 319, 323} (x^320 contributes to both
// traced bits and cancels). That is about 360 AND gates and one wide XOR tree:
// a single combinational level, far cheaper than a multiplier followed by a
// trace. The exponent set is derived here from P(x) and the trace vector at
// elaboration time (TRACE_PROD in gf2m_pkg); it matches the document's list.
//
//   a, b : operands        t : T(a*b)
module gf_trace_mult
  import gf2m_pkg::*;
(
  input  elem_t a,
  input  elem_t b,
  output logic  t
);
  logic [2*K-2:0] part;

  for (genvar n = 0; n < 2*K-1; n++) begin : g_n
    if (TRACE_PROD[n]) begin : g_on
      localparam int LO = (n > K-1) ? n - (K-1) : 0;
      localparam int HI = (n < K-1) ? n : K-1;
      always_comb begin
        part[n] = 1'b0;
        for (int i = LO; i <= HI; i++) part[n] = part[n] ^ (a[i] & b[n-i]);
      end
    end else begin : g_off
      assign part[n] = 1'b0;
    end
  end

  assign t = ^part;
endmodule
