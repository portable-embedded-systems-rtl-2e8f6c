// ec_processor: elliptic-curve processor over GF(2^163) working on collapsed
// points (x and the single bit T(y/x) packed into one 163-bit word).
//
// Operations
//   OP_PMUL  result = scalar * P. The scalar has the size of the subgroup
//            order, so its top bit (bit 162) is taken to be 1. The result is
//            also kept as the stored point (x_R, T(y_R/x_R)), for example the
//            shared secret k_A * K_B.
//   OP_PADD  result = P + stored point, or P - stored point when `decrypt` is
//            set. Encrypting a message point M is M + k_A K_B; decrypting a
//            received C is C - k_B K_A.
//
// Point multiplication is the Montgomery ladder in standard projective
// coordinates, using only x. Initialisation (one cycle) sets (X0,Z0) = P and
// (X1,Z1) = 2P = (x^4 + b, x^2). Each scalar bit s then costs two steps of
// three parallel field multiplications (2 x 43 cycles):
//   step 1: X_/s = X_s Z_/s, Ax1 = X_/s Z_s, Z_/s = (X_/s + Ax1)^2, Ax2 = (d Z_s)^4
//   step 2: X_/s = x Z_/s + X_/s Ax1, Z_s = (X_s Z_s)^2,   X_s = Ax2 + X_s^4
// (/s is the other index, d^4 = b). The conversion back to a collapsed point
// computes x_R = X0/Z0 and, without ever forming y,
//   T(y_R/x_R) = T(y/x) + T( (xZ0+X0)(x(X0Z1+X1Z0)+X0X1) / (x X0 Z0 Z1) )
// in four steps: two multiplication steps, one inversion that runs in
// parallel with two more multiplications, and a last multiplication; the
// final trace comes from the trace-of-product unit, not from a multiplier.
//
// Point addition first recovers y_R of the stored point from its collapsed
// form (g = x_R + a + b/x_R^2 on the divider, z = root of z^2+z=g with trace
// T(y_R/x_R) xor decrypt, y_R = x_R z). This is done once and reused for every
// following addition with the same `decrypt`. Then, for the input point:
// g = x + a + b/x^2 (divider); 1/(x + x_R) (divider) in parallel with the root
// and y = x z; lambda = (y + y_R)/(x + x_R); x3 = lambda^2 + lambda + x + x_R
// + a; then 1/x3 (divider) in parallel with y3 = lambda (x3 + x_R) + x3 + y_R;
// the output trace is T(y3 * (1/x3)).
//
// Timing, in clock cycles from the start cycle to the cycle in which
// `done_key` or `done_msg` is high: point multiplication 14,391 (1 capture + 1 initialisation +
// 162 x 86 ladder + 456 conversion + 1 final trace); point addition 1,026
// (327 + 327 + 43 + 327 divider-bound steps plus capture and final trace);
// 1,438 when the stored point's y must first be recovered (+327 + 42 + 43).
// Step results are written back and the next step's units are started in the
// same cycle, so the ladder runs at exactly 86 cycles per scalar bit, as in
// the document. The document's conversion takes 2 multiplications and one
// inversion (413 cycles); this schedule needs one more multiplication step
// after the inversion (456 cycles) because the inverse is needed for both
// x_R and the trace.
//
// Interface (the signal set follows the document; the handshake details are
// this design's): `start_key` (with `key_in`, `coord_in`) or `start_msg`
// (with `coord_in`, `decrypt`) is taken while `busy` is low; only one of them
// may be high. `received` pulses in the cycle after a point addition has
// taken `coord_in`, so the next input may be presented at once. `done_key`
// or `done_msg` pulses for one cycle with the collapsed result on
// `coord_key` or `coord_msg` (each held until its next done); `illegal_key`
// is set with `done_key` when the product is the point at infinity (Z = 0),
// in which case `coord_key` has no meaning. `msg_reset`, while idle, ends a
// run of additions: the next addition recovers the stored point's y again.
// The stored y is also recovered again after a point multiplication and
// whenever `decrypt` changes (this design's choice). Inputs that are
// the point at infinity, or additions of a point to itself or its negative,
// are not handled (the document does not treat them either).
module ec_processor
  import gf2m_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  elem_t  key_in,        // scalar of a point multiplication
  input  elem_t  coord_in,      // collapsed input point
  input  logic   start_key,     // start a point multiplication
  input  logic   start_msg,     // start a point addition with the stored point
  input  logic   decrypt,       // subtract the stored point instead of adding it
  input  logic   msg_reset,     // end of a run of additions: drop the stored y
  output elem_t  coord_key,     // result of the last point multiplication
  output elem_t  coord_msg,     // result of the last point addition
  output logic   done_key,
  output logic   done_msg,
  output logic   busy,
  output logic   received,      // coord_in has been taken by a point addition
  output logic   illegal_key    // the last point multiplication gave infinity
);
  logic   start;
  ec_op_e op;
  assign start = start_key || start_msg;
  assign op    = start_key ? OP_PMUL : OP_PADD;

  typedef enum logic [4:0] {
    S_IDLE, S_PM_INIT, S_PM_L1, S_PM_L2,
    S_MX_1, S_MX_2, S_MX_3, S_MX_4,
    S_PA_I1, S_PA_I2, S_PA_I3,
    S_PA_M1, S_PA_M2, S_PA_M3, S_PA_M4,
    S_FIN
  } state_e;

  typedef struct packed {
    elem_t  x0, z0, x1, z1;   // ladder points (X0:Z0) = kP, (X1:Z1) = (k+1)P
    elem_t  ax1, ax2, ax3;    // auxiliary registers
    elem_t  xb;               // x of the input point
    logic   tb;               // T(y/x) of the input point
    elem_t  xr;               // stored point x_R
    logic   tr;               // stored point T(y_R/x_R)
    elem_t  yr;               // y of the stored point, possibly negated
    logic   yr_valid;         // yr matches xr/tr and yr_dec
    logic   yr_dec;           // yr was derived with decrypt = yr_dec
    logic   dec;              // decrypt flag of the current addition
    ec_op_e op;               // current operation
    elem_t  ks;               // scalar shift register, MSB = current bit
    logic [7:0] cnt;          // remaining ladder iterations
    logic [1:0] sub;          // progress of multiplications overlapping a division
    logic   divok;            // the overlapping division has finished
  } regs_t;

  state_e st_q, st_n;
  regs_t  r, rn;

  // ---------------------------------------------------------------- units
  logic  m_start [3];
  elem_t m_a [3], m_b [3], m_z [3];
  logic  m_done [3], m_busy [3];

  for (genvar i = 0; i < 3; i++) begin : g_mult
    gf_mult u_mult (
      .clk(clk), .rst_n(rst_n), .start(m_start[i]), .a(m_a[i]), .b(m_b[i]),
      .busy(m_busy[i]), .done(m_done[i]), .z(m_z[i])
    );
  end

  logic  d_start, d_divide, d_busy, d_done;
  elem_t d_a, d_b, d_q;
  gf_div u_div (
    .clk(clk), .rst_n(rst_n), .start(d_start), .divide(d_divide), .a(d_a), .b(d_b),
    .busy(d_busy), .done(d_done), .q(d_q)
  );

  logic  rt_start, rt_t, rt_busy, rt_done;
  elem_t rt_g, rt_z;
  gf_root u_root (
    .clk(clk), .rst_n(rst_n), .start(rt_start), .g(rt_g), .t(rt_t),
    .busy(rt_busy), .done(rt_done), .z(rt_z)
  );

  logic tm_t;
  gf_trace_mult u_trm (.a(r.ax3), .b(r.ax1), .t(tm_t));

  elem_t in_x, res_word, res_x;
  logic  in_t, res_t;
  ec_point_codec u_codec (
    .x_in(res_x), .tr_in(res_t), .word_out(res_word),
    .word_in(coord_in), .x_out(in_x), .tr_out(in_t)
  );

  // ------------------------------------------------------- helper selects
  function automatic elem_t sel(logic s, elem_t v0, elem_t v1);
    return s ? v1 : v0;
  endfunction

  // --------------------------------------------------------- control path
  logic enter;       // st_n is entered now: start its units
  logic fin;         // the current operation finishes in this cycle
  logic s_bit;       // current scalar bit
  logic s_bit_n;

  always_comb begin
    rn    = r;
    st_n  = st_q;
    enter = 1'b0;
    fin   = 1'b0;
    res_x = r.xr;
    res_t = r.tr;
    for (int i = 0; i < 3; i++) begin
      m_start[i] = 1'b0; m_a[i] = '0; m_b[i] = '0;
    end
    d_start = 1'b0; d_divide = 1'b0; d_a = '0; d_b = '0;
    rt_start = 1'b0; rt_g = '0; rt_t = 1'b0;
    s_bit = r.ks[K-1];

    unique case (st_q)
      S_IDLE: if (start) begin
        rn.xb  = in_x;
        rn.tb  = in_t;
        rn.op  = op;
        rn.dec = decrypt;
        rn.ks  = key_in;
        if (op == OP_PMUL) begin
          st_n = S_PM_INIT;
        end else begin
          st_n  = (r.yr_valid && r.yr_dec == decrypt) ? S_PA_M1 : S_PA_I1;
          enter = 1'b1;
        end
      end else if (msg_reset) begin
        rn.yr_valid = 1'b0;
      end

      // ----------------------------------------------- point multiplication
      S_PM_INIT: begin
        rn.x0  = r.xb;
        rn.z0  = elem_t'(1);
        rn.x1  = sqr(sqr(r.xb)) ^ CURVE_B;
        rn.z1  = sqr(r.xb);
        rn.ks  = r.ks << 1;           // the leading 1 is absorbed by (P, 2P)
        rn.cnt = 8'(K - 1);
        st_n   = S_PM_L1;
        enter  = 1'b1;
      end
      S_PM_L1: if (m_done[0]) begin
        // X_/s = X_s Z_/s ; Ax1 = X_/s Z_s ; Z_/s = (..)^2 ; Ax2 = (d Z_s)^4
        if (s_bit) begin rn.x0 = m_z[0]; rn.z0 = sqr(m_z[0] ^ m_z[1]); end
        else       begin rn.x1 = m_z[0]; rn.z1 = sqr(m_z[0] ^ m_z[1]); end
        rn.ax1 = m_z[1];
        rn.ax2 = sqr(sqr(m_z[2]));
        st_n   = S_PM_L2;
        enter  = 1'b1;
      end
      S_PM_L2: if (m_done[0]) begin
        // X_/s = x Z_/s + X_/s Ax1 ; Z_s = (X_s Z_s)^2 ; X_s = Ax2 + X_s^4
        if (s_bit) begin
          rn.x0 = m_z[0] ^ m_z[1];
          rn.z1 = sqr(m_z[2]);
          rn.x1 = r.ax2 ^ sqr(sqr(r.x1));
        end else begin
          rn.x1 = m_z[0] ^ m_z[1];
          rn.z0 = sqr(m_z[2]);
          rn.x0 = r.ax2 ^ sqr(sqr(r.x0));
        end
        rn.ks  = r.ks << 1;
        rn.cnt = r.cnt - 1'b1;
        st_n   = (rn.cnt == '0) ? S_MX_1 : S_PM_L1;
        enter  = 1'b1;
      end

      // ------------------- projective to collapsed affine conversion (Mxy)
      S_MX_1: if (m_done[0]) begin
        rn.ax2 = m_z[0];              // x Z0
        rn.ax1 = m_z[1];              // X0 Z1
        rn.ax3 = m_z[1] ^ m_z[2];     // X0 Z1 + X1 Z0
        st_n   = S_MX_2;
        enter  = 1'b1;
      end
      S_MX_2: if (m_done[0]) begin
        rn.ax1 = m_z[0];              // x X0 Z0 Z1
        rn.ax3 = m_z[1] ^ m_z[2];     // x(X0 Z1 + X1 Z0) + X0 X1
        rn.ax2 = r.ax2 ^ r.x0;        // x Z0 + X0
        st_n   = S_MX_3;
        enter  = 1'b1;
      end
      S_MX_3: begin
        if (d_done) begin
          rn.ax1   = d_q;             // 1/(x X0 Z0 Z1)
          rn.divok = 1'b1;
        end
        if (m_done[0] && r.sub == 2'd0) begin
          rn.ax3 = m_z[0];            // numerator of the trace term
          rn.ax2 = m_z[1];            // x Z1
          rn.sub = 2'd1;
          m_start[0] = 1'b1;          // x Z1 X0^2
          m_a[0] = m_z[1];
          m_b[0] = sqr(r.x0);
        end else if (m_done[0] && r.sub == 2'd1) begin
          rn.x0  = m_z[0];
          rn.sub = 2'd2;
        end
        if (rn.divok && rn.sub == 2'd2) begin
          st_n  = S_MX_4;
          enter = 1'b1;
        end
      end
      S_MX_4: if (m_done[0]) begin
        rn.xr = m_z[0];               // x_R = X0/Z0
        st_n  = S_FIN;
      end

      // ------------------------------------------ point addition: stored y
      S_PA_I1: if (d_done) begin
        rn.ax1 = d_q ^ r.xr ^ CURVE_A;   // g(x_R)
        st_n   = S_PA_I2;
        enter  = 1'b1;
      end
      S_PA_I2: if (rt_done) begin
        rn.ax2 = rt_z;                   // y_R / x_R (or its complement)
        st_n   = S_PA_I3;
        enter  = 1'b1;
      end
      S_PA_I3: if (m_done[0]) begin
        rn.yr       = m_z[0];
        rn.yr_valid = 1'b1;
        rn.yr_dec   = r.dec;
        st_n        = S_PA_M1;
        enter       = 1'b1;
      end

      // ------------------------------------- point addition: main procedure
      S_PA_M1: if (d_done) begin
        rn.ax1 = d_q ^ r.xb ^ CURVE_A;   // g(x)
        st_n   = S_PA_M2;
        enter  = 1'b1;
      end
      S_PA_M2: begin
        if (d_done) begin
          rn.ax1   = d_q;                // 1/(x + x_R)
          rn.divok = 1'b1;
        end
        if (rt_done) begin
          rn.ax2 = rt_z;                 // y/x
          rn.sub = 2'd1;
          m_start[0] = 1'b1;             // y = x (y/x)
          m_a[0] = r.xb;
          m_b[0] = rt_z;
        end
        if (m_done[0] && r.sub == 2'd1) begin
          rn.ax3 = m_z[0];               // y
          rn.sub = 2'd2;
        end
        if (rn.divok && rn.sub == 2'd2) begin
          st_n  = S_PA_M3;
          enter = 1'b1;
        end
      end
      S_PA_M3: if (m_done[0]) begin
        rn.ax1 = m_z[0];                                             // lambda
        rn.ax2 = sqr(m_z[0]) ^ m_z[0] ^ r.xr ^ r.xb ^ CURVE_A;      // x3
        st_n   = S_PA_M4;
        enter  = 1'b1;
      end
      S_PA_M4: begin
        if (d_done) begin
          rn.ax1   = d_q;                // 1/x3
          rn.divok = 1'b1;
        end
        if (m_done[0]) begin
          rn.ax3 = m_z[0] ^ r.ax2 ^ r.yr; // y3
          rn.sub = 2'd2;
        end
        if (rn.divok && rn.sub == 2'd2) st_n = S_FIN;
      end

      S_FIN: begin
        fin = 1'b1;
        if (r.op == OP_PMUL) begin
          rn.tr       = tm_t ^ r.tb;
          rn.yr_valid = 1'b0;
          res_x       = r.xr;
          res_t       = rn.tr;
        end else begin
          res_x = r.ax2;
          res_t = tm_t;
        end
        st_n = S_IDLE;
      end

      default: st_n = S_IDLE;
    endcase

    // Start the units of the state being entered, from the updated registers.
    s_bit_n = rn.ks[K-1];
    if (enter) begin
      rn.sub   = 2'd0;
      rn.divok = 1'b0;
      unique case (st_n)
        S_PM_L1: begin
          m_start = '{default: 1'b1};
          m_a[0] = sel(s_bit_n, rn.x0, rn.x1);  m_b[0] = sel(s_bit_n, rn.z1, rn.z0);
          m_a[1] = sel(s_bit_n, rn.x1, rn.x0);  m_b[1] = sel(s_bit_n, rn.z0, rn.z1);
          m_a[2] = CURVE_D;                     m_b[2] = sel(s_bit_n, rn.z0, rn.z1);
        end
        S_PM_L2: begin
          m_start = '{default: 1'b1};
          m_a[0] = rn.xb;                       m_b[0] = sel(s_bit_n, rn.z1, rn.z0);
          m_a[1] = sel(s_bit_n, rn.x1, rn.x0);  m_b[1] = rn.ax1;
          m_a[2] = sel(s_bit_n, rn.x0, rn.x1);  m_b[2] = sel(s_bit_n, rn.z0, rn.z1);
        end
        S_MX_1: begin
          m_start = '{default: 1'b1};
          m_a[0] = rn.xb; m_b[0] = rn.z0;
          m_a[1] = rn.x0; m_b[1] = rn.z1;
          m_a[2] = rn.x1; m_b[2] = rn.z0;
        end
        S_MX_2: begin
          m_start = '{default: 1'b1};
          m_a[0] = rn.ax2; m_b[0] = rn.ax1;
          m_a[1] = rn.ax3; m_b[1] = rn.xb;
          m_a[2] = rn.x0;  m_b[2] = rn.x1;
        end
        S_MX_3: begin
          d_start = 1'b1; d_divide = 1'b0; d_b = rn.ax1;
          m_start[0] = 1'b1; m_a[0] = rn.ax2; m_b[0] = rn.ax3;
          m_start[1] = 1'b1; m_a[1] = rn.xb;  m_b[1] = rn.z1;
        end
        S_MX_4: begin
          m_start[0] = 1'b1; m_a[0] = rn.x0; m_b[0] = rn.ax1;
        end
        S_PA_I1: begin
          d_start = 1'b1; d_divide = 1'b1; d_a = CURVE_B; d_b = sqr(rn.xr);
        end
        S_PA_I2: begin
          rt_start = 1'b1; rt_g = rn.ax1; rt_t = rn.tr ^ rn.dec;
        end
        S_PA_I3: begin
          m_start[0] = 1'b1; m_a[0] = rn.xr; m_b[0] = rn.ax2;
        end
        S_PA_M1: begin
          d_start = 1'b1; d_divide = 1'b1; d_a = CURVE_B; d_b = sqr(rn.xb);
        end
        S_PA_M2: begin
          d_start  = 1'b1; d_divide = 1'b0; d_b = rn.xb ^ rn.xr;
          rt_start = 1'b1; rt_g = rn.ax1; rt_t = rn.tb;
        end
        S_PA_M3: begin
          m_start[0] = 1'b1; m_a[0] = rn.ax1; m_b[0] = rn.yr ^ rn.ax3;
        end
        S_PA_M4: begin
          d_start = 1'b1; d_divide = 1'b0; d_b = rn.ax2;
          m_start[0] = 1'b1; m_a[0] = rn.ax1; m_b[0] = rn.ax2 ^ rn.xr;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      r           <= '0;
      done_key    <= 1'b0;
      done_msg    <= 1'b0;
      coord_key   <= '0;
      coord_msg   <= '0;
      received    <= 1'b0;
      illegal_key <= 1'b0;
    end else begin
      st_q     <= st_n;
      r        <= rn;
      done_key <= fin && (r.op == OP_PMUL);
      done_msg <= fin && (r.op == OP_PADD);
      received <= start_msg && !start_key && (st_q == S_IDLE);
      if (fin && r.op == OP_PMUL) begin
        coord_key   <= res_word;
        illegal_key <= (r.z0 == '0);
      end
      if (fin && r.op == OP_PADD) coord_msg <= res_word;
    end
  end

  assign busy = (st_q != S_IDLE);

  // Units are only started while idle.
  for (genvar i = 0; i < 3; i++) begin : g_chk
    a_mult_idle: assert property (@(posedge clk) disable iff (!rst_n) m_start[i] |-> !m_busy[i]);
  end
  a_div_idle:  assert property (@(posedge clk) disable iff (!rst_n) d_start |-> !d_busy);
  a_root_idle: assert property (@(posedge clk) disable iff (!rst_n) rt_start |-> !rt_busy);
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_one_start:  assert property (@(posedge clk) disable iff (!rst_n) !(start_key && start_msg));

endmodule
