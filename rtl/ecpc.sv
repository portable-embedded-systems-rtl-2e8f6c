// ecpc: Elliptic Curve Processor Control. Connects the EC processor to a host
// (through a bank of 32-bit LAD-style registers) and to a MicroBlaze that
// relays points to and from a remote system (through 32-bit GPIO data
// registers and 12-bit GPIO command registers).
//
// A collapsed point or a private key is 163 bits and travels as six 32-bit
// words, word 0 holding bits 31:0. Commands and notifications carry a strobe
// bit that the sender complements for every new command; the receiver acts
// when the strobe differs from the last one it saw.
//
// Host side (8 write and 8 read registers, a power of two as the interface
// requires): write registers 0-5 hold data, register 6 the command
// {strobe[31], code[3:0]}. Read registers 0-5 return the last decrypted
// message point, register 6 the notification
// {strobe[31], result_valid[9], slot_free[8], code[3:0]}. Host commands:
//   HC_LOAD_KEY  data = private key k (waits while a queued job needs the
//                previous key)
//   HC_PUBKEY    send k*G to the remote system (public-key stream)
//   HC_SECRET    data = remote public key Q; compute and keep S = k*Q
//   HC_ENCRYPT   data = message point M; send M + S to the remote system
//   HC_READ_ACK  the host has read the decrypted point in registers 0-5
//   HC_END       end of a message session: the processor drops the stored
//                point's y (its msg_reset input) once it is idle
// Each accepted command except HC_READ_ACK is answered with NC_ACK; a
// finished shared secret with NC_SECRET; a decrypted point with NC_RESULT; a
// point multiplication whose result is the point at infinity with NC_ILLEGAL
// (nothing is sent for it).
//
// MicroBlaze side: ECPC -> MicroBlaze, one word at a time: ECPC writes the
// data register and {strobe[11], index[10:8], code[3:0]} with code MC_WORD and
// waits for a command MC_ACK (strobe complemented) before the next word.
// MicroBlaze -> ECPC: six words, each announced by a complemented strobe with
// code MB_PUBKEY (remote public key: ECPC computes S = k*Q) or MB_CIPHER
// (ciphertext C: ECPC computes C - S and hands it to the host). The ECPC
// returns the strobe of the last MicroBlaze command it has taken in bit 4 of
// its command register; the MicroBlaze changes its command register only when
// that bit equals its own strobe. Words are taken in the cycle after they
// are written, except the sixth word of a point, which waits while the
// MicroBlaze job slot is still occupied.
//
// The processor work is queued: one job from the host and one from the
// MicroBlaze can wait while the processor is busy, so new data is requested
// (NC_ACK) while a computation runs. A job is only started when the
// destination of its result is free.
//
// The document describes these registers, the strobe rule, the six-word
// transfers, the per-word acknowledgment towards the MicroBlaze, the 12-bit
// GPIO command register and the buffering of new input during computation.
// The command codes, bit positions, the job queue and the arbitration are this
// design's own.
module ecpc
  import gf2m_pkg::*;
#(
  // Generator point of the public keys, collapsed (x with bit 0 = T(y/x)).
  parameter elem_t GEN_POINT = 163'h3_f0eb_a162_86a2_d57e_a099_1168_d499_4637_e834_3e37
)(
  input  logic        clk,
  input  logic        rst_n,
  // host (LAD) registers
  input  logic        lad_wr_en,
  input  logic [2:0]  lad_wr_addr,
  input  logic [31:0] lad_wr_data,
  input  logic [2:0]  lad_rd_addr,
  output logic [31:0] lad_rd_data,
  // MicroBlaze (GPIO) registers
  input  logic [31:0] gpio_in_data,
  input  logic [11:0] gpio_in_cmd,
  output logic [31:0] gpio_out_data,
  output logic [11:0] gpio_out_cmd,
  // EC processor
  output logic        ec_start_key,
  output logic        ec_start_msg,
  output logic        ec_decrypt,
  output logic        ec_msg_reset,
  output elem_t       ec_coord,
  output elem_t       ec_key,
  input  logic        ec_busy,
  input  logic        ec_done_key,
  input  logic        ec_done_msg,
  input  elem_t       ec_coord_key,
  input  elem_t       ec_coord_msg,
  input  logic        ec_illegal_key
);
  localparam int NW = 6;   // 32-bit words per 163-bit value

  typedef enum logic [3:0] {
    HC_NONE = 4'd0, HC_LOAD_KEY = 4'd1, HC_PUBKEY = 4'd2, HC_SECRET = 4'd3,
    HC_ENCRYPT = 4'd4, HC_READ_ACK = 4'd5, HC_END = 4'd6
  } host_cmd_e;
  typedef enum logic [3:0] {
    NC_NONE = 4'd0, NC_ACK = 4'd1, NC_SECRET = 4'd2, NC_RESULT = 4'd3, NC_ILLEGAL = 4'd4
  } host_note_e;
  typedef enum logic [3:0] {
    MC_NONE = 4'd0, MC_WORD = 4'd1, MC_ACK = 4'd2, MB_PUBKEY = 4'd3, MB_CIPHER = 4'd4
  } mb_code_e;
  // What to do with a processor result.
  typedef enum logic [1:0] {DST_NONE, DST_HOST_NOTE, DST_HOST_DATA, DST_MB} dest_e;

  typedef struct packed {
    logic   valid;
    ec_op_e op;
    logic   decrypt;
    logic   use_key;   // scalar = private key
    elem_t  point;
    dest_e  dest;
  } job_t;

  function automatic elem_t words_to_elem(logic [NW*32-1:0] w);
    return w[K-1:0];
  endfunction

  // ---------------------------------------------------------- host side
  logic [31:0] hw_q [8];          // host-written registers
  logic        h_strobe_seen;
  logic [31:0] hr_data_q [NW];    // read registers 0-5
  logic        n_strobe_q;
  host_note_e  n_code_q;
  logic        result_valid_q;

  logic [NW*32-1:0] h_data_flat;
  always_comb for (int i = 0; i < NW; i++) h_data_flat[i*32 +: 32] = hw_q[i];

  logic      h_cmd_new;
  host_cmd_e h_cmd;
  assign h_cmd     = host_cmd_e'(hw_q[6][3:0]);
  assign h_cmd_new = (hw_q[6][31] != h_strobe_seen);

  elem_t key_q;
  job_t  hjob_q, mjob_q;

  // -------------------------------------------------- MicroBlaze side
  logic             m_strobe_seen;
  logic [2:0]       rx_idx_q;
  logic [NW*32-1:0] rx_buf_q;
  logic             m_cmd_new;
  mb_code_e         m_code;
  assign m_code    = mb_code_e'(gpio_in_cmd[3:0]);
  assign m_cmd_new = (gpio_in_cmd[11] != m_strobe_seen);

  logic             tx_busy_q;
  logic [2:0]       tx_idx_q;
  logic [NW*32-1:0] tx_buf_q;
  logic             o_strobe_q;

  // -------------------------------------------------- processor dispatch
  logic  run_q;
  dest_e run_dest_q;

  function automatic logic dest_free(dest_e d, logic tx_busy, logic res_valid);
    case (d)
      DST_MB:        return !tx_busy;
      DST_HOST_DATA: return !res_valid;
      default:       return 1'b1;
    endcase
  endfunction

  logic pick_h, pick_m;
  always_comb begin
    pick_h = !run_q && !ec_busy && hjob_q.valid && dest_free(hjob_q.dest, tx_busy_q, result_valid_q);
    pick_m = !run_q && !ec_busy && !pick_h && mjob_q.valid && dest_free(mjob_q.dest, tx_busy_q, result_valid_q);
  end

  job_t  go_job;
  logic  ec_start, ec_done, end_q;
  elem_t ec_result;
  assign go_job       = pick_h ? hjob_q : mjob_q;
  assign ec_start     = pick_h || pick_m;
  assign ec_start_key = ec_start && (go_job.op == OP_PMUL);
  assign ec_start_msg = ec_start && (go_job.op == OP_PADD);
  assign ec_decrypt   = go_job.decrypt;
  assign ec_coord     = go_job.point;
  assign ec_key       = go_job.use_key ? key_q : '0;
  assign ec_done      = ec_done_key || ec_done_msg;
  assign ec_result    = ec_done_key ? ec_coord_key : ec_coord_msg;
  // End of a session: passed on once the processor is idle and no job starts.
  assign ec_msg_reset = end_q && !run_q && !ec_busy && !ec_start;

  // -------------------------------------------------------------- outputs
  always_comb begin
    lad_rd_data = '0;
    if (lad_rd_addr < 3'(NW)) lad_rd_data = hr_data_q[lad_rd_addr];
    else if (lad_rd_addr == 3'd6)
      lad_rd_data = {n_strobe_q, 21'b0, result_valid_q, !hjob_q.valid, 4'b0, n_code_q};
  end

  assign gpio_out_data = tx_buf_q[tx_idx_q*32 +: 32];
  assign gpio_out_cmd  = {o_strobe_q, tx_idx_q, 3'b0, m_strobe_seen, (tx_busy_q ? MC_WORD : MC_NONE)};

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) hw_q[i] <= '0;
      for (int i = 0; i < NW; i++) hr_data_q[i] <= '0;
      h_strobe_seen  <= 1'b0;
      n_strobe_q     <= 1'b0;
      n_code_q       <= NC_NONE;
      result_valid_q <= 1'b0;
      key_q          <= '0;
      hjob_q         <= '0;
      mjob_q         <= '0;
      m_strobe_seen  <= 1'b0;
      rx_idx_q       <= '0;
      rx_buf_q       <= '0;
      tx_busy_q      <= 1'b0;
      tx_idx_q       <= '0;
      tx_buf_q       <= '0;
      o_strobe_q     <= 1'b0;
      run_q          <= 1'b0;
      run_dest_q     <= DST_NONE;
      end_q          <= 1'b0;
    end else begin
      if (lad_wr_en) hw_q[lad_wr_addr] <= lad_wr_data;

      // Host command: taken when the host job slot can hold it. It waits
      // while a result notification to the host is being posted, and a new
      // key waits while a queued job still needs the old one.
      if (h_cmd_new && !(hjob_q.valid && h_cmd inside {HC_PUBKEY, HC_SECRET, HC_ENCRYPT})
                    && !(lad_wr_en && lad_wr_addr == 3'd6)
                    && !(h_cmd == HC_LOAD_KEY && ((hjob_q.valid && hjob_q.use_key)
                                                 || (mjob_q.valid && mjob_q.use_key)))
                    && !(run_q && ec_done && run_dest_q inside {DST_HOST_NOTE, DST_HOST_DATA})) begin
        h_strobe_seen <= hw_q[6][31];
        unique case (h_cmd)
          HC_LOAD_KEY: key_q <= words_to_elem(h_data_flat);
          HC_PUBKEY:   hjob_q <= '{valid: 1'b1, op: OP_PMUL, decrypt: 1'b0, use_key: 1'b1,
                                   point: GEN_POINT, dest: DST_MB};
          HC_SECRET:   hjob_q <= '{valid: 1'b1, op: OP_PMUL, decrypt: 1'b0, use_key: 1'b1,
                                   point: words_to_elem(h_data_flat), dest: DST_HOST_NOTE};
          HC_ENCRYPT:  hjob_q <= '{valid: 1'b1, op: OP_PADD, decrypt: 1'b0, use_key: 1'b0,
                                   point: words_to_elem(h_data_flat), dest: DST_MB};
          HC_READ_ACK: result_valid_q <= 1'b0;
          HC_END:      end_q <= 1'b1;
          default: ;
        endcase
        if (h_cmd != HC_READ_ACK) begin
          n_strobe_q <= ~n_strobe_q;
          n_code_q   <= NC_ACK;
        end
      end

      // MicroBlaze words and acknowledgments.
      if (m_cmd_new) begin
        unique case (m_code)
          MC_ACK: if (tx_busy_q) begin
            m_strobe_seen <= gpio_in_cmd[11];
            if (tx_idx_q == 3'(NW - 1)) begin
              tx_busy_q <= 1'b0;
              tx_idx_q  <= '0;
            end else begin
              tx_idx_q   <= tx_idx_q + 1'b1;
              o_strobe_q <= ~o_strobe_q;
            end
          end else m_strobe_seen <= gpio_in_cmd[11];
          MB_PUBKEY, MB_CIPHER: begin
            // The last word is only taken once the MicroBlaze job slot is free.
            if (rx_idx_q != 3'(NW-1) || !mjob_q.valid) begin
              m_strobe_seen <= gpio_in_cmd[11];
              if (rx_idx_q == 3'(NW-1)) begin
                rx_idx_q <= '0;
                mjob_q <= '{valid: 1'b1,
                            op: (m_code == MB_PUBKEY) ? OP_PMUL : OP_PADD,
                            decrypt: (m_code == MB_CIPHER),
                            use_key: (m_code == MB_PUBKEY),
                            point: words_to_elem({gpio_in_data, rx_buf_q[(NW-1)*32-1:0]}),
                            dest: (m_code == MB_PUBKEY) ? DST_HOST_NOTE : DST_HOST_DATA};
              end else begin
                rx_buf_q[32*rx_idx_q +: 32] <= gpio_in_data;
                rx_idx_q <= rx_idx_q + 1'b1;
              end
            end
          end
          default: m_strobe_seen <= gpio_in_cmd[11];
        endcase
      end

      if (ec_msg_reset) end_q <= 1'b0;

      // Dispatch to the processor.
      if (ec_start) begin
        run_q      <= 1'b1;
        run_dest_q <= go_job.dest;
        if (pick_h) hjob_q.valid <= 1'b0;
        else        mjob_q.valid <= 1'b0;
      end

      // Results.
      if (run_q && ec_done) begin
        run_q <= 1'b0;
        if (ec_done_key && ec_illegal_key) begin
          // A product at infinity is neither sent nor kept as a secret.
          n_strobe_q <= ~n_strobe_q;
          n_code_q   <= NC_ILLEGAL;
        end else unique case (run_dest_q)
          DST_MB: begin
            tx_buf_q   <= {{(NW*32-K){1'b0}}, ec_result};
            tx_busy_q  <= 1'b1;
            tx_idx_q   <= '0;
            o_strobe_q <= ~o_strobe_q;
          end
          DST_HOST_DATA: begin
            for (int i = 0; i < NW; i++)
              hr_data_q[i] <= 32'({{(NW*32-K){1'b0}}, ec_result} >> (32*i));
            result_valid_q <= 1'b1;
            n_strobe_q     <= ~n_strobe_q;
            n_code_q       <= NC_RESULT;
          end
          DST_HOST_NOTE: begin
            n_strobe_q <= ~n_strobe_q;
            n_code_q   <= NC_SECRET;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
