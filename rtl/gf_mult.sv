// gf_mult: digit-serial GF(2^163) multiplier, four partial products per clock.
//
// The product A*B = sum_j b_j x^j A is split into four interleaved sums
//   Z0 = b0 A + b4 x^4 A + ...         Z1 = b1 A + b5 x^4 A + ...
//   Z2 = b2 A + b6 x^4 A + ...         Z3 = b3 A + b7 x^4 A + ...
// so that A*B = Z0 + x Z1 + x^2 Z2 + x^3 Z3. Each iteration adds the current
// A (conditionally on four bits of B) into the four accumulators, multiplies
// A by x^4 with four chained gf_mulx cells (the reduction is embedded there,
// no separate reduction step) and shifts B right by four. After ceil(163/4) =
// 41 iterations one more cycle combines the accumulators. Registers: A, B and
// Z0..Z3 (six of 163 bits) plus a 6-bit iteration counter.
//
// Interface: `start` is taken when the unit is idle (`busy` low); the operands
// are loaded on that clock edge. `done` is high for one cycle, 43 cycles after
// the start cycle, with the product on `z`, which then holds until the next
// start. A new start may be given in the done cycle. The 43-cycle count
// (41 iterations, one combine cycle, one return to idle) is the document's; the
// exact split of those cycles and the handshake are this design's.
module gf_mult
  import gf2m_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  elem_t a,
  input  elem_t b,
  output logic  busy,
  output logic  done,
  output elem_t z
);
  typedef enum logic [1:0] {IDLE, ITER, COMB} state_e;

  state_e state;
  elem_t  a_q, b_q;
  elem_t  acc_q [4];
  logic [$clog2(MULT_ITERS+1)-1:0] cnt_q;

  // x^4 * A through four chained multiply-by-x cells.
  elem_t ax [5];
  assign ax[0] = a_q;
  for (genvar i = 0; i < 4; i++) begin : g_ax4
    gf_mulx u_mulx (.a(ax[i]), .y(ax[i+1]));
  end

  // Combination: Z0 + x Z1 + x^2 Z2 + x^3 Z3 (Horner form, three cells).
  elem_t h3, h2, h1;
  gf_mulx u_c3 (.a(acc_q[3]),          .y(h3));
  gf_mulx u_c2 (.a(acc_q[2] ^ h3),     .y(h2));
  gf_mulx u_c1 (.a(acc_q[1] ^ h2),     .y(h1));

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a_q   <= '0;
      b_q   <= '0;
      for (int j = 0; j < 4; j++) acc_q[j] <= '0;
      cnt_q <= '0;
      done  <= 1'b0;
      z     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          for (int j = 0; j < 4; j++) acc_q[j] <= '0;
          cnt_q <= '0;
          state <= ITER;
        end
        ITER: begin
          for (int j = 0; j < 4; j++)
            if (b_q[j]) acc_q[j] <= acc_q[j] ^ a_q;
          a_q   <= ax[4];
          b_q   <= b_q >> 4;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == $bits(cnt_q)'(MULT_ITERS - 1)) state <= COMB;
        end
        COMB: begin
          z     <= acc_q[0] ^ h1;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A start while the unit is working would be lost.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // The result arrives exactly MULT_LAT cycles after the start cycle.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> ##(MULT_LAT) done);

endmodule
