// tb_ecc_top: end-to-end test of the coprocessor at its default parameters
// (the B-163 generator as the public-key base point). A host model drives the
// LAD registers and a MicroBlaze model the GPIO registers; every result is
// compared with an affine reference computed in the testbench.
//
// Sequence: load the private key k; public key k*G streamed to the
// MicroBlaze word by word with acknowledgments; remote public key from the
// MicroBlaze gives the shared secret S = k*Q; two encryptions M + S, the
// second issued while the processor is still busy with the first and held
// until the MicroBlaze link is free; three ciphertexts from the MicroBlaze,
// decrypted to the host, the second held until the host has read the first
// (result_valid) and the third's last word held until the job slot frees;
// a shared secret from a point supplied by the host, then one more
// encryption under it; the end of the session, after which the next
// encryption recovers the stored point's y again.
//
// Every processor job's duration is checked: 14,391 cycles for a point
// multiplication, 1,438 for an addition that first recovers the stored
// point's y, 1,026 for one that reuses it. Each mechanism is counted and
// one that never happens is a failure.
module tb_ecc_top;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  localparam fe_t GX = 163'h3_f0eb_a162_86a2_d57e_a099_1168_d499_4637_e834_3e36;
  localparam fe_t GY = 163'h0_d51f_bc6c_71a0_094f_a2cd_d545_b11c_5c0c_7973_24f1;

  localparam int PMUL_CYC      = 14391;
  localparam int PADD_CYC      = 1026;
  localparam int PADD_INIT_CYC = 1438;

  localparam logic [3:0] HC_LOAD_KEY = 4'd1, HC_PUBKEY = 4'd2, HC_SECRET = 4'd3,
                         HC_ENCRYPT = 4'd4, HC_READ_ACK = 4'd5, HC_END = 4'd6;
  localparam logic [3:0] NC_ACK = 4'd1, NC_SECRET = 4'd2, NC_RESULT = 4'd3;
  localparam logic [3:0] MC_WORD = 4'd1, MC_ACK = 4'd2, MB_PUBKEY = 4'd3, MB_CIPHER = 4'd4;

  logic        clk = 0, rst_n = 0;
  logic        lad_wr_en = 0;
  logic [2:0]  lad_wr_addr = '0, lad_rd_addr = 3'd6;
  logic [31:0] lad_wr_data = '0, lad_rd_data;
  logic [31:0] gpio_in_data = '0, gpio_out_data;
  logic [11:0] gpio_in_cmd = '0, gpio_out_cmd;

  int checks = 0, failures = 0;

  ecc_top dut (.clk, .rst_n, .lad_wr_en, .lad_wr_addr, .lad_wr_data,
               .lad_rd_addr, .lad_rd_data, .gpio_in_data, .gpio_in_cmd,
               .gpio_out_data, .gpio_out_cmd);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ counters
  int n_pubkey = 0, n_word_ack = 0, n_secret_mb = 0, n_secret_host = 0;
  int n_encrypt = 0, n_decrypt = 0, n_y_recover = 0, n_y_reuse = 0;
  int n_session_end = 0, n_queued_busy = 0, n_tx_wait = 0, n_result_hold = 0, n_rx_hold = 0;

  int unsigned ncyc = 0;    // negative clock edges
  always @(negedge clk) ncyc++;

  // Processor job durations, seen on the wires between the two blocks.
  int unsigned job_t0;
  ec_op_e      job_op;
  always @(negedge clk) if (rst_n) begin
    if (dut.ec_start_key || dut.ec_start_msg) begin
      job_t0 = ncyc;
      job_op = dut.ec_start_key ? OP_PMUL : OP_PADD;
    end
    if (dut.ec_done_key || dut.ec_done_msg) begin
      int d;
      d = int'(ncyc - job_t0);
      checks++;
      if (job_op == OP_PMUL) begin
        if (d != PMUL_CYC) begin failures++; $display("point multiplication took %0d cycles", d); end
      end else if (d == PADD_INIT_CYC) n_y_recover++;
      else if (d == PADD_CYC) n_y_reuse++;
      else begin failures++; $display("point addition took %0d cycles", d); end
    end
    // Control-block stalls.
    if (dut.u_ecpc.hjob_q.valid && !dut.ec_busy && !dut.u_ecpc.run_q && dut.u_ecpc.tx_busy_q)
      n_tx_wait++;
    if (dut.u_ecpc.mjob_q.valid && !dut.ec_busy && !dut.u_ecpc.run_q && dut.u_ecpc.result_valid_q)
      n_result_hold++;
    if (dut.u_ecpc.m_cmd_new && dut.u_ecpc.rx_idx_q == 3'd5 && dut.u_ecpc.mjob_q.valid)
      n_rx_hold++;
  end

  // ------------------------------------------------------ host notifications
  typedef struct {
    logic [3:0]  code;
    int unsigned t;
  } note_t;
  note_t notes[$];
  logic  n_seen = 1'b0;
  always @(negedge clk) if (rst_n && lad_rd_addr == 3'd6 && lad_rd_data[31] != n_seen) begin
    n_seen = lad_rd_data[31];
    notes.push_back('{code: lad_rd_data[3:0], t: ncyc});
    if (lad_rd_data[3:0] == NC_ACK && dut.ec_busy) n_queued_busy++;
  end

  task automatic wait_note(logic [3:0] code, output int unsigned t);
    forever begin
      for (int i = 0; i < notes.size(); i++)
        if (notes[i].code == code) begin
          t = notes[i].t;
          notes.delete(i);
          return;
        end
      @(negedge clk);
    end
  endtask

  // ------------------------------------------------------------- host model
  logic h_strobe = 1'b0;

  task automatic host_write(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    lad_wr_en = 1'b1; lad_wr_addr = a; lad_wr_data = d;
    @(negedge clk);
    lad_wr_en = 1'b0;
  endtask

  task automatic host_cmd(logic [3:0] code, fe_t data);
    logic [191:0] w;
    w = 192'(data);
    if (code != HC_PUBKEY && code != HC_READ_ACK)
      for (int i = 0; i < 6; i++) host_write(3'(i), w[32*i +: 32]);
    h_strobe = ~h_strobe;
    host_write(3'd6, {h_strobe, 27'b0, code});
  endtask

  // Host command that is answered with NC_ACK.
  task automatic host_req(logic [3:0] code, fe_t data);
    int unsigned t;
    host_cmd(code, data);
    wait_note(NC_ACK, t);
  endtask

  task automatic host_read(output fe_t v);
    logic [191:0] w;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      lad_rd_addr = 3'(i);
      #1 w[32*i +: 32] = lad_rd_data;
    end
    @(negedge clk);
    lad_rd_addr = 3'd6;
    v = w[K-1:0];
  endtask

  // ------------------------------------------------------- MicroBlaze model
  // Words from the ECPC are collected and acknowledged; points to the ECPC are
  // queued and sent one word per command, each after the previous command was
  // taken (bit 4 of the ECPC's command register).
  typedef struct {
    logic [3:0]  code;
    logic [31:0] data;
  } mb_cmd_t;
  mb_cmd_t mb_q[$];
  fe_t     mb_rx[$];
  logic [191:0] rx_w;
  logic o_seen = 1'b0, m_strobe = 1'b0;
  int   ack_pending = 0;

  always @(negedge clk) if (rst_n) begin
    if (gpio_out_cmd[11] != o_seen && gpio_out_cmd[3:0] == MC_WORD) begin
      o_seen = gpio_out_cmd[11];
      rx_w[32*gpio_out_cmd[10:8] +: 32] = gpio_out_data;
      if (gpio_out_cmd[10:8] == 3'd5) mb_rx.push_back(rx_w[K-1:0]);
      ack_pending++;
    end
    if (gpio_out_cmd[4] == m_strobe && $urandom_range(3) == 0) begin
      if (ack_pending > 0) begin
        ack_pending--;
        n_word_ack++;
        m_strobe = ~m_strobe;
        gpio_in_cmd = {m_strobe, 7'b0, MC_ACK};
      end else if (mb_q.size() > 0) begin
        mb_cmd_t c;
        c = mb_q.pop_front();
        m_strobe = ~m_strobe;
        gpio_in_data = c.data;
        gpio_in_cmd  = {m_strobe, 7'b0, c.code};
      end
    end
  end

  task automatic mb_send(logic [3:0] code, fe_t p);
    logic [191:0] w;
    w = 192'(p);
    for (int i = 0; i < 6; i++) mb_q.push_back('{code: code, data: w[32*i +: 32]});
  endtask

  task automatic mb_receive(output fe_t p);
    while (mb_rx.size() == 0) @(negedge clk);
    p = mb_rx.pop_front();
  endtask

  // --------------------------------------------------------------- sequence
  task automatic count_check(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("%s never happened", what);
    end else $display("%-34s %0d", what, n);
  endtask

  function automatic fe_t rand_scalar();
    fe_t k;
    k = rnd();
    k[K-1] = 1'b1;
    return k;
  endfunction

  initial begin
    pt_t  g, q, s, s2, m[7];
    fe_t  k, kb, kc, got;
    int unsigned t;

    g.x = GX; g.y = GY;
    checks++;
    if (!on_curve(g) || collapse(g) !== dut.u_ecpc.GEN_POINT) begin
      failures++;
      $display("generator does not match the reference");
    end
    for (int i = 0; i < 7; i++) m[i] = rand_point();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Private key, public key to the MicroBlaze.
    k = rand_scalar();
    host_req(HC_LOAD_KEY, k);
    host_req(HC_PUBKEY, '0);
    mb_receive(got);
    check("public key k*G", got, collapse(smul(k, g)));
    n_pubkey++;

    // Remote public key from the MicroBlaze: shared secret.
    kb = rand_scalar();
    q  = smul(kb, g);
    s  = smul(k, q);
    mb_send(MB_PUBKEY, collapse(q));
    wait_note(NC_SECRET, t);
    n_secret_mb++;

    // Two encryptions; the second is accepted while the first runs.
    host_req(HC_ENCRYPT, collapse(m[0]));
    host_req(HC_ENCRYPT, collapse(m[1]));
    mb_receive(got);
    check("M0 + S", got, collapse(padd(m[0], s)));
    mb_receive(got);
    check("M1 + S", got, collapse(padd(m[1], s)));
    n_encrypt += 2;

    // Three ciphertexts from the MicroBlaze, decrypted to the host.
    for (int i = 2; i < 5; i++) mb_send(MB_CIPHER, collapse(padd(m[i], s)));
    for (int i = 2; i < 5; i++) begin
      wait_note(NC_RESULT, t);
      // The host is slow to read: the next result must wait for it.
      repeat (1500) @(negedge clk);
      host_read(got);
      check($sformatf("C%0d - S", i), got, collapse(m[i]));
      n_decrypt++;
      host_cmd(HC_READ_ACK, '0);
    end

    // Shared secret from a point given by the host, then an encryption.
    kc = rand_scalar();
    s2 = smul(k, smul(kc, g));
    host_req(HC_SECRET, collapse(smul(kc, g)));
    wait_note(NC_SECRET, t);
    n_secret_host++;
    host_req(HC_ENCRYPT, collapse(m[5]));
    mb_receive(got);
    check("M5 + S2", got, collapse(padd(m[5], s2)));
    n_encrypt++;

    // End of the session: the next encryption recovers the stored y again.
    begin
      int n_rec0;
      host_req(HC_END, '0);
      n_rec0 = n_y_recover;
      host_req(HC_ENCRYPT, collapse(m[6]));
      mb_receive(got);
      check("M6 + S2", got, collapse(padd(m[6], s2)));
      n_encrypt++;
      if (n_y_recover == n_rec0 + 1) n_session_end++;
    end

    repeat (20) @(negedge clk);
    count_check("public keys streamed", n_pubkey);
    count_check("word acknowledgments", n_word_ack);
    count_check("secrets from the MicroBlaze", n_secret_mb);
    count_check("secrets from the host", n_secret_host);
    count_check("encryptions", n_encrypt);
    count_check("decryptions", n_decrypt);
    count_check("additions with y recovery", n_y_recover);
    count_check("additions reusing y", n_y_reuse);
    count_check("session ends (y recovered again)", n_session_end);
    count_check("commands taken while busy", n_queued_busy);
    count_check("cycles job waits for the link", n_tx_wait);
    count_check("cycles job waits for the host", n_result_hold);
    count_check("cycles last word held", n_rx_hold);
    checks++;
    if (notes.size() != 0 || mb_rx.size() != 0) begin
      failures++;
      $display("unexpected notifications or words left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
