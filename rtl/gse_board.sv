// gse_board: the FPGA logic of one GSE VME I/O board.
//
// One board stands in for the digital electronics towards one analog board
// (WPU, TPU or ACU) of the detector. It sends commands that the host writes
// over VME, and stores the data packets of the analog board in its 1 Mbyte
// SRAM. The SRAM is run as two swapping buffers, so the host can read one
// while the other fills.
//
// Blocks, wired as five parts on an internal bus:
//   vme_addr_ctrl  decodes the VME cycle, register strobes, SRAM read request
//   vme_data_ctrl  data transceiver, command and control registers
//   ae_cmd_ctrl    command serialiser (Data, Enable, Clock, Act)
//   ae_data_ctrl   packet deserialiser (word done, packet done)
//   ae_ptr_ctrl    pointer handling: words, sizes, packet pointers, A/B swap
//   mem_ctrl       SRAM sequencer; port 0 AE data path, port 1 VME
// The SRAM itself is outside: its pins are ports of this module.
//
// pkt_stored pulses when a packet has been indexed in the SRAM, or dropped on
// overflow. It is the "packet done" that can end an external veto.
// HAS_ACT is 1 only on the ACU board, whose hardware commands raise Act.
// All timing parameters count 20 MHz clocks; their defaults are in the
// blocks' own descriptions.
module gse_board
  import gse_pkg::*;
#(
  parameter bit          HAS_ACT         = 1'b0,
  parameter int unsigned HALF_PERIOD     = 76,
  parameter int unsigned ATT_WAIT_CYCLES = 2438,
  parameter int unsigned ATT_HIGH_CYCLES = 600000,
  parameter int unsigned DATA_WORDS      = 65536,
  parameter int unsigned INDEX_WORDS     = 65536,
  parameter int unsigned SETUP_CYCLES    = 1,
  parameter int unsigned ACTIVE_CYCLES   = 2,
  parameter logic [3:0]  BASE_HI         = 4'h1
) (
  input  logic        clk,            // 20 MHz
  input  logic        rst_n,
  input  logic [3:0]  board_id,
  // VME side
  input  logic [31:2] vme_addr,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // command lines to the AE board
  output logic        ae_cmd_data,
  output logic        ae_cmd_enable,
  output logic        ae_cmd_clock,
  output logic        ae_act,
  // data lines from the AE board
  input  logic        ae_dat_data,
  input  logic        ae_dat_enable,
  input  logic        ae_dat_clock,
  // SRAM pins
  output mem_addr_t   sram_addr,
  output mem_word_t   sram_dq_out,
  output logic        sram_dq_oe,
  input  mem_word_t   sram_dq_in,
  output logic        sram_ce_n,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  // packet stored
  output logic        pkt_stored
);

  // internal bus
  logic          reg_wr, sel_mem, rd_latch, data_oe;
  reg_idx_e      reg_idx;
  logic          go, hw_cmd, swap_req, clr_ovf, cmd_busy;
  logic [15:0]   cmd;
  logic          word_done, pkt_done, pkt_id, pkt_active;
  logic [31:0]   word;
  logic [15:0]   pkt_bits;
  mem_req_t      mreq [2];
  mem_rsp_t      mrsp [2];
  board_status_t status;

  vme_addr_ctrl #(.BASE_HI(BASE_HI)) u_vme_addr (
    .clk, .rst_n, .board_id, .vme_addr, .vme_ds_n, .vme_write_n, .vme_dtack_n,
    .reg_wr, .reg_idx, .sel_mem, .rd_latch, .data_oe,
    .mem_req(mreq[1]), .mem_rsp(mrsp[1])
  );

  vme_data_ctrl u_vme_data (
    .clk, .rst_n, .vme_data_in, .vme_data_out, .vme_data_oe,
    .reg_wr, .reg_idx, .sel_mem, .rd_latch, .data_oe,
    .mem_rdata(mrsp[1].rdata), .status,
    .go, .cmd, .hw_cmd, .swap_req, .clr_ovf
  );

  ae_cmd_ctrl #(
    .HALF_PERIOD(HALF_PERIOD), .ATT_WAIT_CYCLES(ATT_WAIT_CYCLES),
    .ATT_HIGH_CYCLES(ATT_HIGH_CYCLES), .HAS_ACT(HAS_ACT)
  ) u_cmd (
    .clk, .rst_n, .go, .cmd, .hw_cmd, .busy(cmd_busy),
    .ae_data(ae_cmd_data), .ae_enable(ae_cmd_enable),
    .ae_clock(ae_cmd_clock), .ae_act
  );

  ae_data_ctrl #(.BITCNT_W(16)) u_data (
    .clk, .rst_n, .ae_data(ae_dat_data), .ae_enable(ae_dat_enable),
    .ae_clock(ae_dat_clock), .word_done, .word, .pkt_done, .pkt_bits,
    .pkt_id, .pkt_active
  );

  ae_ptr_ctrl #(
    .DATA_WORDS(DATA_WORDS), .INDEX_WORDS(INDEX_WORDS), .BITCNT_W(16)
  ) u_ptr (
    .clk, .rst_n, .word_done, .word, .pkt_done, .pkt_bits, .pkt_id,
    .pkt_active, .swap_req, .clr_ovf,
    .mem_req(mreq[0]), .mem_rsp(mrsp[0]),
    .wr_buf(status.wr_buf), .overflow(status.overflow),
    .swap_pending(status.swap_pending), .pkt_stored,
    .pkt_count(status.pkt_count), .word_count(status.word_count),
    .closed_buf(status.closed_buf), .closed_pkts(status.closed_pkts),
    .closed_words(status.closed_words)
  );

  mem_ctrl #(.SETUP_CYCLES(SETUP_CYCLES), .ACTIVE_CYCLES(ACTIVE_CYCLES)) u_mem (
    .clk, .rst_n, .req(mreq), .rsp(mrsp), .m_sel(),
    .sram_addr, .sram_dq_out, .sram_dq_oe, .sram_dq_in,
    .sram_ce_n, .sram_we_n, .sram_oe_n
  );

  assign status.cmd_busy   = cmd_busy;
  assign status.act        = ae_act;
  assign status.pkt_active = pkt_active;

endmodule
