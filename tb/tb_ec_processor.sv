// tb_ec_processor: end-to-end checks of the EC processor on collapsed points
// of B-163, against an affine double-and-add reference.
//   * point multiplication k*P for random subgroup points and scalars with the
//     top bit set, result compared with the collapsed reference product;
//   * a key exchange: kA*(kB*G) must equal kB*(kA*G);
//   * point addition M + S (encryption) with the stored point S, first with the
//     y-recovery step, then again without it (stored y reused);
//   * point subtraction C - S (decryption) must return M;
//   * msg_reset makes the next addition recover the stored y again; the
//     received pulse follows every addition start; done_key / done_msg;
//   * n*G (n the subgroup order) raises illegal_key;
//   * cycle counts: 86 cycles per scalar bit in the ladder, total point
//     multiplication time, point-addition time with and without the stored-y
//     step (their difference is the 412-cycle y recovery plus the state that
//     launches it).
module tb_ec_processor;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  localparam int PMUL_CYC      = 2 + (K - 1) * 86 + 456 + 1;   // 14391
  localparam int PADD_CYC      = 327 + 327 + 43 + 327 + 1 + 1; // 1026
  localparam int PADD_INIT_CYC = PADD_CYC + 327 + 42 + 43;     // 1438

  logic clk = 0, rst_n = 0, start_key = 0, start_msg = 0, decrypt = 0, msg_reset = 0;
  elem_t point_in, scalar, coord_key, coord_msg;
  logic busy, done_key, done_msg, received, illegal_key;
  int n_received = 0;
  int checks = 0, failures = 0;

  ec_processor dut (.clk, .rst_n, .key_in(scalar), .coord_in(point_in), .start_key,
                    .start_msg, .decrypt, .msg_reset, .coord_key, .coord_msg, .done_key,
                    .done_msg, .busy, .received, .illegal_key);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ec_op_e o, logic dec, elem_t p, elem_t k, output elem_t res, output int cyc);
    decrypt = dec; point_in = p; scalar = k;
    start_key = (o == OP_PMUL); start_msg = (o == OP_PADD);
    @(posedge clk); #1 start_key = 0; start_msg = 0;
    cyc = 1;
    if (received) n_received++;
    while (!(done_key || done_msg)) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (done_key != (o == OP_PMUL) || illegal_key) begin
      failures++;
      $display("wrong done signal or illegal_key set");
    end
    res = (o == OP_PMUL) ? coord_key : coord_msg;
  endtask

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_cyc(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", what, got, exp);
    end else $display("%s: %0d cycles", what, got);
  endtask

  function automatic fe_t rand_scalar();
    fe_t k;
    k = rnd();
    k[K-1] = 1'b1;
    return k;
  endfunction

  initial begin
    pt_t g, pa, pb, s, m, m2, c;
    fe_t ka, kb, res, res2;
    int cyc;
    point_in = '0; scalar = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Key exchange with a random generator G.
    g  = rand_point();
    checks++; if (!on_curve(g)) begin failures++; $display("reference point not on curve"); end
    ka = rand_scalar();
    kb = rand_scalar();
    pa = smul(ka, g);
    pb = smul(kb, g);
    run(OP_PMUL, 0, collapse(g), ka, res, cyc);
    check("kA*G", res, collapse(pa));
    check_cyc("point multiplication", cyc, PMUL_CYC);
    run(OP_PMUL, 0, collapse(g), kb, res, cyc);
    check("kB*G", res, collapse(pb));
    run(OP_PMUL, 0, collapse(pb), ka, res, cyc);      // stored: kA kB G
    s = smul(ka, pb);
    check("kA*(kB*G)", res, collapse(s));
    check("shared secret agrees", collapse(smul(kb, pa)), collapse(s));

    // Encryption: C = M + S, first with the stored-y step.
    m = rand_point();
    c = padd(m, s);
    run(OP_PADD, 0, collapse(m), '0, res, cyc);
    check("M + S", res, collapse(c));
    check_cyc("first point addition", cyc, PADD_INIT_CYC);
    // Second message point, stored y reused.
    m2 = rand_point();
    run(OP_PADD, 0, collapse(m2), '0, res2, cyc);
    check("M2 + S", res2, collapse(padd(m2, s)));
    check_cyc("next point addition", cyc, PADD_CYC);

    // Decryption: C - S = M (stored y recomputed for the negated point).
    run(OP_PADD, 1, res, '0, res, cyc);
    check("C - S", res, collapse(m));
    check_cyc("first point subtraction", cyc, PADD_INIT_CYC);
    run(OP_PADD, 1, res2, '0, res, cyc);
    check("C2 - S", res, collapse(m2));

    // After msg_reset the stored y is recovered again.
    @(negedge clk) msg_reset = 1;
    @(negedge clk) msg_reset = 0;
    run(OP_PADD, 1, res2, '0, res, cyc);
    check("C2 - S after reset", res, collapse(m2));
    check_cyc("subtraction after msg_reset", cyc, PADD_INIT_CYC);
    checks++;
    if (n_received != 5) begin failures++; $display("received pulsed %0d times", n_received); end

    // More random multiplications.
    for (int i = 0; i < 2; i++) begin
      pt_t p;
      fe_t k;
      p = rand_point();
      k = rand_scalar();
      run(OP_PMUL, 0, collapse(p), k, res, cyc);
      check("k*P", res, collapse(smul(k, p)));
    end
    // Scalar 2^162 (only the leading bit): pure doublings.
    run(OP_PMUL, 0, collapse(g), fe_t'(1) << (K-1), res, cyc);
    check("2^162*G", res, collapse(smul(fe_t'(1) << (K-1), g)));

    // The subgroup order n times a subgroup point is the point at infinity.
    @(negedge clk);
    scalar = 163'h4_0000_0000_0000_0000_0002_92fe_77e7_0c12_a423_4c33;
    point_in = collapse(g); start_key = 1;
    @(negedge clk) start_key = 0;
    while (!done_key) @(negedge clk);
    checks++;
    if (!illegal_key) begin failures++; $display("n*G not flagged as illegal"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
