// ecc_top: the elliptic-curve coprocessor as seen by the rest of the system:
// the EC processor (GF(2^163) point multiplication and point addition on
// collapsed points) behind its control block, which talks to a host through
// eight 32-bit LAD registers and to a MicroBlaze through 32-bit GPIO data
// registers and 12-bit GPIO command registers (see ecpc for the protocol).
//
// The host, the MicroBlaze, the UART and the RS-232 transceiver are outside
// this design; their connections are the ports below. The LAD write port is a
// single-cycle write (enable, address, data); the read port is combinational
// from the address. One clock and one active-low asynchronous reset serve both
// blocks.
//
// Timing: a public key or a shared secret takes 14,391 cycles of processor
// time, an encryption 1,026 (1,438 for the first one after a new secret),
// plus two cycles of job dispatch and result handling in the control block
// and the transfer time on the host and MicroBlaze sides.
module ecc_top
  import gf2m_pkg::*;
(
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
  output logic [11:0] gpio_out_cmd
);
  logic  ec_start_key, ec_start_msg, ec_decrypt, ec_msg_reset;
  logic  ec_busy, ec_done_key, ec_done_msg, ec_illegal_key;
  elem_t ec_coord, ec_key, ec_coord_key, ec_coord_msg;

  ecpc u_ecpc (
    .clk, .rst_n,
    .lad_wr_en, .lad_wr_addr, .lad_wr_data, .lad_rd_addr, .lad_rd_data,
    .gpio_in_data, .gpio_in_cmd, .gpio_out_data, .gpio_out_cmd,
    .ec_start_key, .ec_start_msg, .ec_decrypt, .ec_msg_reset, .ec_coord, .ec_key,
    .ec_busy, .ec_done_key, .ec_done_msg, .ec_coord_key, .ec_coord_msg, .ec_illegal_key
  );

  // The processor's `received` pulse is not needed here: the control block
  // hands the processor one job at a time from its own job registers.
  ec_processor u_proc (
    .clk, .rst_n,
    .key_in(ec_key), .coord_in(ec_coord),
    .start_key(ec_start_key), .start_msg(ec_start_msg),
    .decrypt(ec_decrypt), .msg_reset(ec_msg_reset),
    .coord_key(ec_coord_key), .coord_msg(ec_coord_msg),
    .done_key(ec_done_key), .done_msg(ec_done_msg),
    .busy(ec_busy), .received(), .illegal_key(ec_illegal_key)
  );

endmodule
