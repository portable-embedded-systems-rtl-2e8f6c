// gf_div: GF(2^163) inverter and divider after Brunner's extended-Euclid
// algorithm, one iteration per clock, 2k = 326 iterations.
//
// Registers R and S are k+1 bits wide and start as the divisor and P(x); U and
// V start as the dividend (or 1 for an inversion) and 0. Each iteration looks
// only at the top bits r_k, s_k and whether the degree difference `delta` is
// zero, and does one of:
//   r_k=0                    : R=xR,      U=xU
//   r_k=1 s_k=0 delta=0      : R=xS,      S=R,      U=xV,      V=U
//   r_k=1 s_k=0 delta!=0     : S=xS,      U=U/x
//   r_k=1 s_k=1 delta=0      : R=x(S-R),  S=R,      U=x(V-U),  V=U
//   r_k=1 s_k=1 delta!=0     : S=x(S-R),  U=U/x,    V=V-U
// delta is incremented in the first, second and fourth case and decremented
// otherwise. The products by x of R and S are plain shifts; those of U and V
// are modulo P(x) (gf_mulx, gf_divx cells). After 326 iterations U holds
// dividend/divisor. The control never looks at U or V, so the sequence of
// steps depends only on the divisor.
//
// Interface: on `start` (taken while idle) the operands are loaded; `divide`
// selects a division (U starts as `a`) or an inversion (U starts as 1). `done`
// is high for one cycle 327 cycles after the start cycle, with the quotient on
// `q`, held until the next start. The divisor must be nonzero. The algorithm,
// the control table and the 327-cycle count are the document's; the handshake
// is this design's.
module gf_div
  import gf2m_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  divide,
  input  elem_t a,      // dividend (ignored for an inversion)
  input  elem_t b,      // divisor
  output logic  busy,
  output logic  done,
  output elem_t q
);
  localparam int CW = $clog2(DIV_ITERS + 1);

  logic         run_q;
  logic [K:0]   r_q, s_q;
  elem_t        u_q, v_q;
  logic [CW-1:0] cnt_q;
  logic [CW-1:0] delta_q;

  // Modular shifts of U and V.
  elem_t xu, xv, xuv, u_div_x;
  gf_mulx u_xu  (.a(u_q),        .y(xu));
  gf_mulx u_xv  (.a(v_q),        .y(xv));
  gf_mulx u_xuv (.a(v_q ^ u_q),  .y(xuv));
  gf_divx u_ux  (.a(u_q),        .y(u_div_x));

  logic [K:0]   r_n, s_n;
  elem_t        u_n, v_n;
  logic [CW-1:0] delta_n;

  always_comb begin
    r_n = r_q; s_n = s_q; u_n = u_q; v_n = v_q; delta_n = delta_q;
    if (!r_q[K]) begin
      r_n = r_q << 1;
      u_n = xu;
      delta_n = delta_q + 1'b1;
    end else if (delta_q == '0) begin
      // degree of S has fallen below that of R: exchange the pairs
      r_n = s_q[K] ? ((s_q ^ r_q) << 1) : (s_q << 1);
      u_n = s_q[K] ? xuv : xv;
      s_n = r_q;
      v_n = u_q;
      delta_n = delta_q + 1'b1;
    end else begin
      s_n = s_q[K] ? ((s_q ^ r_q) << 1) : (s_q << 1);
      if (s_q[K]) v_n = v_q ^ u_q;
      u_n = u_div_x;
      delta_n = delta_q - 1'b1;
    end
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      r_q     <= '0;
      s_q     <= '0;
      u_q     <= '0;
      v_q     <= '0;
      cnt_q   <= '0;
      delta_q <= '0;
      done    <= 1'b0;
      q       <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q   <= 1'b1;
          r_q     <= {1'b0, b};
          s_q     <= {1'b1, POLY_LOW};
          u_q     <= divide ? a : elem_t'(1);
          v_q     <= '0;
          cnt_q   <= '0;
          delta_q <= '0;
        end
      end else begin
        r_q     <= r_n;
        s_q     <= s_n;
        u_q     <= u_n;
        v_q     <= v_n;
        delta_q <= delta_n;
        cnt_q   <= cnt_q + 1'b1;
        if (cnt_q == CW'(DIV_ITERS - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          q     <= u_n;
        end
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // The result arrives exactly DIV_LAT cycles after the start cycle.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> ##(DIV_LAT) done);

endmodule
