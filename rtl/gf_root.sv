// gf_root: root calculation unit. Given g and a trace bit t it returns the
// solution z of z^2 + z = g whose trace is t (for the curve, z = y/x and
// g = x + a + b/x^2). The other solution is z + 1.
//
// For odd k the sum of the odd powers g^(2^i), i in {1, 3, ..., k-2}, equals
// z + T(z). The sum is taken four exponents per iteration: a register G holds
// g^(2^(4j)); its square and its eighth power (squaring cells) are the two
// terms g^(2^(4j+1)) and g^(2^(4j+3)), both added into Temp, and G advances to
// its sixteenth power. For k = 163 (k mod 4 = 3) the last of the 41
// iterations adds only the first term, which is what the `last` control does.
// In the last iteration t is added into the constant coefficient.
//
// Interface: `start` (taken while idle) loads g and t. `done` is high for one
// cycle 42 cycles after the start cycle with z on `z`, held until the next
// start. The parallel form of the sum, the iteration count and the 42-cycle
// latency are the document's; the handshake is this design's. The result is
// only a root when T(g) = 0, which holds for x-coordinates of curve points.
module gf_root
  import gf2m_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  elem_t g,
  input  logic  t,
  output logic  busy,
  output logic  done,
  output elem_t z
);
  localparam int CW = $clog2(ROOT_ITERS + 1);
  // With k mod 4 = 3 the final iteration has only one term.
  localparam bit LAST_SINGLE = (K % 4 == 3);

  logic          run_q;
  elem_t         g_q, temp_q;
  logic          t_q;
  logic [CW-1:0] cnt_q;

  // g^2, g^4, g^8, g^16 through chained squaring cells.
  elem_t w [5];
  assign w[0] = g_q;
  for (genvar i = 0; i < 4; i++) begin : g_sq
    gf_sqr u_sqr (.a(w[i]), .y(w[i+1]));
  end

  logic  last;
  elem_t temp_n;
  assign last   = (cnt_q == CW'(ROOT_ITERS - 1));
  assign temp_n = temp_q ^ w[1] ^ ((last && LAST_SINGLE) ? '0 : w[3]);

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      g_q    <= '0;
      temp_q <= '0;
      t_q    <= 1'b0;
      cnt_q  <= '0;
      done   <= 1'b0;
      z      <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q  <= 1'b1;
          g_q    <= g;
          t_q    <= t;
          temp_q <= '0;
          cnt_q  <= '0;
        end
      end else begin
        g_q    <= w[4];
        temp_q <= temp_n;
        cnt_q  <= cnt_q + 1'b1;
        if (last) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          z     <= temp_n ^ elem_t'(t_q);
        end
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // The result arrives exactly ROOT_LAT cycles after the start cycle.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> ##(ROOT_LAT) done);

endmodule
