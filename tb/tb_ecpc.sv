// tb_ecpc: the control block on its own, with a small processor stand-in in
// place of the EC processor. The stand-in records each job (operation,
// decrypt flag, point, scalar), stays busy for a fixed time and returns a
// result that is a fixed function of the job, so the test can tell whether
// every command reached the processor with the right operands and whether
// every result went to the right place: the MicroBlaze stream (public key,
// encryption), a host notification (shared secret) or the host read
// registers (decryption). It also checks the read-back of the notification
// register (slot_free, result_valid) and that a result for the host waits
// until the host has read the previous one, the end-of-session command
// (processor msg_reset once idle) and the report of a product at infinity.
module tb_ecpc;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;

  localparam int PROC_CYC = 60;
  localparam elem_t GEN = 163'h1_2345_6789_abcd_ef01_2345_6789_abcd_ef01_2345_6789;

  localparam logic [3:0] HC_LOAD_KEY = 4'd1, HC_PUBKEY = 4'd2, HC_SECRET = 4'd3,
                         HC_ENCRYPT = 4'd4, HC_READ_ACK = 4'd5, HC_END = 4'd6;
  localparam logic [3:0] NC_ACK = 4'd1, NC_SECRET = 4'd2, NC_RESULT = 4'd3, NC_ILLEGAL = 4'd4;
  localparam logic [3:0] MC_WORD = 4'd1, MC_ACK = 4'd2, MB_PUBKEY = 4'd3, MB_CIPHER = 4'd4;

  logic        clk = 0, rst_n = 0;
  logic        lad_wr_en = 0;
  logic [2:0]  lad_wr_addr = '0, lad_rd_addr = 3'd6;
  logic [31:0] lad_wr_data = '0, lad_rd_data;
  logic [31:0] gpio_in_data = '0, gpio_out_data;
  logic [11:0] gpio_in_cmd = '0, gpio_out_cmd;
  logic        ec_start_key, ec_start_msg, ec_decrypt, ec_msg_reset, ec_busy;
  logic        ec_done_key = 1'b0, ec_done_msg = 1'b0, ec_illegal_key = 1'b0;
  elem_t       ec_coord, ec_key, ec_coord_key = '0, ec_coord_msg = '0;
  int          n_msg_reset = 0;

  int checks = 0, failures = 0;
  int n_queued_busy = 0;

  ecpc #(.GEN_POINT(GEN)) dut (
    .clk, .rst_n, .lad_wr_en, .lad_wr_addr, .lad_wr_data, .lad_rd_addr, .lad_rd_data,
    .gpio_in_data, .gpio_in_cmd, .gpio_out_data, .gpio_out_cmd,
    .ec_start_key, .ec_start_msg, .ec_decrypt, .ec_msg_reset, .ec_coord, .ec_key,
    .ec_busy, .ec_done_key, .ec_done_msg, .ec_coord_key, .ec_coord_msg, .ec_illegal_key);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int unsigned ncyc = 0;
  always @(negedge clk) ncyc++;

  // Processor stand-in.
  typedef struct {
    ec_op_e op;
    logic   dec;
    elem_t  point;
    elem_t  scalar;
  } job_t;
  job_t jobs[$];
  int   busy_cnt = 0;

  // The stand-in's result; a point multiplication of the all-zero point
  // stands for a product at infinity.
  function automatic elem_t model(job_t j);
    return {j.point[K-2:0], j.point[K-1]} ^ j.scalar ^ elem_t'({j.op, j.dec, 1'b1});
  endfunction

  assign ec_busy = (busy_cnt != 0);
  always @(posedge clk) begin
    ec_done_key <= 1'b0;
    ec_done_msg <= 1'b0;
    if (busy_cnt == 1) begin
      if (jobs[$].op == OP_PMUL) begin
        ec_coord_key   <= model(jobs[$]);
        ec_done_key    <= 1'b1;
        ec_illegal_key <= (jobs[$].point == '0);
      end else begin
        ec_coord_msg <= model(jobs[$]);
        ec_done_msg  <= 1'b1;
      end
    end
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (ec_msg_reset) begin
      n_msg_reset++;
      checks++;
      if (busy_cnt != 0) begin failures++; $display("msg_reset while busy"); end
    end
    if (ec_start_key || ec_start_msg) begin
      checks++;
      if (busy_cnt != 0 || (ec_start_key && ec_start_msg)) begin
        failures++;
        $display("bad start");
      end
      jobs.push_back('{op: ec_start_key ? OP_PMUL : OP_PADD, dec: ec_decrypt,
                       point: ec_coord, scalar: ec_key});
      busy_cnt <= PROC_CYC;
    end
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
    if (lad_rd_data[3:0] == NC_ACK && ec_busy) n_queued_busy++;
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

  function automatic elem_t job_res(ec_op_e op, logic dec, elem_t p, elem_t k);
    return model('{op: op, dec: dec, point: p, scalar: k});
  endfunction

  task automatic check_job(int i, string what, ec_op_e op, logic dec, elem_t p, elem_t k);
    checks++;
    if (jobs.size() <= i || jobs[i].op != op || jobs[i].dec != dec || jobs[i].point !== p
        || jobs[i].scalar !== k) begin
      failures++;
      $display("job %0d (%s) has wrong operands", i, what);
    end
  endtask

  task automatic read_status(output logic [31:0] v);
    @(negedge clk);
    #1 v = lad_rd_data;
  endtask

  initial begin
    elem_t k, q, q2, m0, m1, c0, c1, c2, got;
    int unsigned t;
    logic [31:0] st;
    k = rnd(); q = rnd(); q2 = rnd(); m0 = rnd(); m1 = rnd();
    c0 = rnd(); c1 = rnd(); c2 = rnd();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    read_status(st);
    checks++;
    if (st[8] !== 1'b1 || st[9] !== 1'b0) begin failures++; $display("bad idle status %h", st); end

    host_req(HC_LOAD_KEY, k);
    checks++;
    if (dut.key_q !== k) begin failures++; $display("key not loaded"); end
    host_req(HC_PUBKEY, '0);
    mb_receive(got);
    check_job(0, "public key", OP_PMUL, 1'b0, GEN, k);
    check("public key to MicroBlaze", got, job_res(OP_PMUL, 0, GEN, k));

    mb_send(MB_PUBKEY, q);
    wait_note(NC_SECRET, t);
    check_job(1, "remote key", OP_PMUL, 1'b0, q, k);

    // Two encryptions back to back: the second is taken while the first runs.
    host_req(HC_ENCRYPT, m0);
    host_req(HC_ENCRYPT, m1);
    read_status(st);
    checks++;
    if (st[8] !== 1'b0) begin failures++; $display("slot_free set with a job waiting"); end
    mb_receive(got);
    check("M0 result", got, job_res(OP_PADD, 0, m0, '0));
    mb_receive(got);
    check("M1 result", got, job_res(OP_PADD, 0, m1, '0));
    check_job(2, "encrypt 0", OP_PADD, 1'b0, m0, '0);
    check_job(3, "encrypt 1", OP_PADD, 1'b0, m1, '0);

    // Decryptions to the host; the second waits for the host's read.
    mb_send(MB_CIPHER, c0);
    mb_send(MB_CIPHER, c1);
    mb_send(MB_CIPHER, c2);
    for (int i = 0; i < 3; i++) begin
      wait_note(NC_RESULT, t);
      repeat (3 * PROC_CYC) @(negedge clk);
      checks++;
      if (jobs.size() != 5 + i) begin failures++; $display("job started before the host read"); end
      read_status(st);
      checks++;
      if (st[9] !== 1'b1) begin failures++; $display("result_valid not set"); end
      host_read(got);
      check($sformatf("decrypted %0d", i), got,
            job_res(OP_PADD, 1, (i == 0) ? c0 : (i == 1) ? c1 : c2, '0));
      host_cmd(HC_READ_ACK, '0);
      read_status(st);
      checks++;
      if (st[9] !== 1'b0) begin failures++; $display("result_valid not cleared"); end
    end
    check_job(4, "decrypt 0", OP_PADD, 1'b1, c0, '0);
    check_job(6, "decrypt 2", OP_PADD, 1'b1, c2, '0);

    host_req(HC_SECRET, q2);
    wait_note(NC_SECRET, t);
    check_job(7, "host secret", OP_PMUL, 1'b0, q2, k);

    // End of session while an encryption runs: msg_reset once it is idle.
    host_req(HC_ENCRYPT, m0);
    host_req(HC_END, '0);
    mb_receive(got);
    check("M0 result again", got, job_res(OP_PADD, 0, m0, '0));
    repeat (5) @(negedge clk);
    checks++;
    if (n_msg_reset != 1) begin failures++; $display("msg_reset given %0d times", n_msg_reset); end

    // A product at infinity is reported and not sent.
    host_req(HC_SECRET, '0);
    wait_note(NC_ILLEGAL, t);

    repeat (10) @(negedge clk);
    checks++;
    if (n_queued_busy == 0) begin failures++; $display("no command taken while busy"); end
    checks++;
    if (notes.size() != 0 || mb_rx.size() != 0 || jobs.size() != 10) begin
      failures++;
      $display("unexpected traffic left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
