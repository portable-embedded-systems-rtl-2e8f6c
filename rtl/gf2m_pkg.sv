// gf2m_pkg: field and curve constants shared by the GF(2^k) units and the
// elliptic-curve processor.
//
// The field is GF(2^163) in polynomial basis with the NIST pentanomial
// P(x) = x^163 + x^7 + x^6 + x^3 + 1. An element is a K-bit vector whose bit i
// is the coefficient of x^i. The curve is y^2 + xy = x^3 + a x^2 + b with the
// NIST B-163 coefficients (a = 1); the processor also needs d, the element
// with d^4 = b, which is computed here at elaboration time as d = b^(2^(k-2))
// (since b^(2^k) = b).
//
// The trace of an element in this basis is the parity of the bits selected by
// TRACE_MASK; for this field only coefficients 0 and 157 take part, so
// T(A) = a0 + a157. The field size, this trace vector and the set of product
// exponents used by the trace-of-product unit follow the document, and P(x)
// is the pentanomial they imply. The curve coefficients are the standard
// B-163 ones: the document only says that a, b and the generator are fixed
// when the hardware is built.
package gf2m_pkg;

  parameter int K = 163;

  typedef logic [K-1:0] elem_t;

  // P(x) without its x^K term.
  localparam elem_t POLY_LOW = elem_t'(1) | (elem_t'(1) << 3) | (elem_t'(1) << 6) | (elem_t'(1) << 7);

  // Bits of the trace vector: T(x^i) = 1 only for i = 0 and i = 157.
  localparam elem_t TRACE_MASK = elem_t'(1) | (elem_t'(1) << 157);

  // Curve coefficients (B-163).
  localparam elem_t CURVE_A = elem_t'(1);
  localparam elem_t CURVE_B = 163'h2_0a60_1907_b8c9_53ca_1481_eb10_512f_7874_4a32_05fd;

  // Multiplication by x: shift left, add P(x) when the x^K term appears.
  function automatic elem_t mulx(elem_t a);
    return {a[K-2:0], 1'b0} ^ (a[K-1] ? POLY_LOW : '0);
  endfunction

  // Division by x: add P(x) when a0 = 1 so that the shift is exact.
  function automatic elem_t divx(elem_t a);
    logic [K:0] t;
    t = a[0] ? {1'b1, a ^ POLY_LOW} : {1'b0, a};
    return t[K:1];
  endfunction

  // Reduce a polynomial of degree up to 2K-2 modulo P(x).
  function automatic elem_t reduce(logic [2*K-2:0] v);
    logic [2*K-2:0] r;
    r = v;
    for (int i = 2*K-2; i >= K; i--) begin
      if (r[i]) begin
        r[i] = 1'b0;
        r[i-K +: K] = r[i-K +: K] ^ POLY_LOW;
      end
    end
    return r[K-1:0];
  endfunction

  // Squaring: spread the bits to the even positions, then reduce.
  function automatic elem_t sqr(elem_t a);
    logic [2*K-2:0] v;
    v = '0;
    for (int i = 0; i < K; i++) v[2*i] = a[i];
    return reduce(v);
  endfunction

  function automatic logic trace(elem_t a);
    return ^(a & TRACE_MASK);
  endfunction

  // d with d^4 = b.
  function automatic elem_t fourth_root(elem_t b);
    elem_t r;
    r = b;
    for (int i = 0; i < K-2; i++) r = sqr(r);
    return r;
  endfunction

  localparam elem_t CURVE_D = fourth_root(CURVE_B);

  // Trace of x^n for n = 0 .. 2K-2, used by the trace-of-product unit.
  function automatic logic [2*K-2:0] product_trace_vector();
    logic [2*K-2:0] tv;
    elem_t p;
    p = elem_t'(1);
    for (int n = 0; n < 2*K-1; n++) begin
      tv[n] = trace(p);
      p = mulx(p);
    end
    return tv;
  endfunction

  localparam logic [2*K-2:0] TRACE_PROD = product_trace_vector();

  // Latencies in clock cycles from the start cycle to the done cycle.
  localparam int MULT_DIGITS = 4;
  localparam int MULT_ITERS  = (K + MULT_DIGITS - 1) / MULT_DIGITS;  // 41
  localparam int MULT_LAT    = MULT_ITERS + 2;                       // 43
  localparam int DIV_ITERS   = 2 * K;                                // 326
  localparam int DIV_LAT     = DIV_ITERS + 1;                        // 327
  // Root calculation: floor(k/4)+1 iterations when k mod 4 = 3, floor(k/4) when k mod 4 = 1.
  localparam int ROOT_ITERS  = (K % 4 == 3) ? (K / 4 + 1) : (K / 4);  // 41
  localparam int ROOT_LAT    = ROOT_ITERS + 1;                       // 42

  // Processor operations.
  typedef enum logic [0:0] {
    OP_PMUL = 1'b0,   // point multiplication: result = scalar * point_in, kept as the stored point
    OP_PADD = 1'b1    // point addition: result = point_in +/- stored point
  } ec_op_e;

endpackage
