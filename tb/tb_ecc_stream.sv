// tb_ecc_stream: the two streaming workloads of the coprocessor, shortened:
// a stream of public keys (a new private key and its public key k*G, one
// after the other, sent to the MicroBlaze) and a stream of message points
// encrypted with one shared secret. The design is used at its default
// parameters. Every key and every ciphertext is checked against the reference.
//
// The control block buffers the next job while the processor works, so the
// processor never waits for the host: after the first job, each start
// follows the previous done as soon as the previous result has been passed
// to the MicroBlaze (six acknowledged words); the check allows 100 cycles. The test checks that gap for every job and
// reports the cycles per key and per message point (14,391 + gap and
// 1,026 + gap).
module tb_ecc_stream;
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
    repeat (150000) @(posedge clk);
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

  int unsigned ncyc = 0;    // negative clock edges
  always @(negedge clk) ncyc++;

  // Gaps between a processor done and the next start.
  int unsigned last_done = 0, max_gap = 0, n_jobs = 0, first_start = 0;
  logic        gap_armed = 1'b0;
  always @(negedge clk) if (rst_n) begin
    if (dut.ec_start_key || dut.ec_start_msg) begin
      if (n_jobs == 0) first_start = ncyc;
      if (gap_armed && ncyc - last_done > max_gap) max_gap = ncyc - last_done;
      n_jobs++;
    end
    if (dut.ec_done_key || dut.ec_done_msg) last_done = ncyc;
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
  localparam int NKEYS = 3, NMSG = 6, MAX_GAP = 100;

  function automatic fe_t rand_scalar();
    fe_t k;
    k = rnd();
    k[K-1] = 1'b1;
    return k;
  endfunction

  task automatic check_gap(string what);
    checks++;
    if (max_gap > MAX_GAP) begin
      failures++;
      $display("%s: processor idle for %0d cycles between jobs", what, max_gap);
    end
  endtask

  pt_t  g, s, m[NMSG];
  fe_t  keys[NKEYS];

  initial begin
    fe_t got, kb;
    int unsigned t, t0;
    g.x = GX; g.y = GY;
    for (int i = 0; i < NKEYS; i++) keys[i] = rand_scalar();
    for (int i = 0; i < NMSG; i++) m[i] = rand_point();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Public-key stream: the host keeps one job queued behind the running one.
    fork
      for (int i = 0; i < NKEYS; i++) begin
        host_req(HC_LOAD_KEY, keys[i]);
        host_req(HC_PUBKEY, '0);
      end
      for (int i = 0; i < NKEYS; i++) begin
        mb_receive(got);
        check($sformatf("public key %0d", i), got, collapse(smul(keys[i], g)));
      end
    join
    checks++;
    if (n_jobs != NKEYS) begin failures++; $display("%0d jobs for %0d keys", n_jobs, NKEYS); end
    gap_armed = 1'b0;
    $display("public keys: %0d cycles per key", (last_done - first_start) / NKEYS);
    check_gap("key stream");

    // Shared secret with a remote key, then the message stream.
    kb = rand_scalar();
    s = smul(keys[NKEYS-1], smul(kb, g));
    host_req(HC_SECRET, collapse(smul(kb, g)));
    wait_note(NC_SECRET, t);
    n_jobs = 0; max_gap = 0;
    fork
      for (int i = 0; i < NMSG; i++) host_req(HC_ENCRYPT, collapse(m[i]));
      for (int i = 0; i < NMSG; i++) begin
        mb_receive(got);
        check($sformatf("ciphertext %0d", i), got, collapse(padd(m[i], s)));
      end
    join
    $display("message points: %0d cycles per point (first includes y recovery)",
             (last_done - first_start) / NMSG);
    check_gap("message stream");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    @(negedge clk);
    wait (n_jobs == 1);
    gap_armed = 1'b1;
  end
endmodule
