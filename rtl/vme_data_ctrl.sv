// vme_data_ctrl: VME Data Controller.
//
// The board's bus transceiver on the VME data lines. It takes write data into
// the command and control registers and returns register or SRAM data on
// reads.
//
// Registers (index from vme_addr_ctrl; the layout is this design's own):
//   0 CMD    W: [15:0] command, [16] hardware command (Act follows).
//            A write starts ae_cmd_ctrl, if it is idle, with a one-cycle go.
//            A write that arrives while a command is being sent is dropped.
//            R: the last command written.
//   1 STATUS R: [31] command busy, [30] Act, [29] write buffer (0 = A),
//            [28] overflow, [27] packet being received, [26] swap pending,
//            [25] last closed buffer, [15:0] packets in the write buffer
//   2 CTRL   W: [0] swap buffers, [1] clear overflow (one-cycle pulses)
//   3 CLOSED R: [31:16] words, [15:0] packets in the last closed buffer
//   4 WORDS  R: [15:0] words in the write buffer
// Any other index reads as zero.
//
// Timing: reg_wr comes in the cycle after the strobe is sampled, and go,
// swap_req and clr_ovf follow one cycle later. Read data is captured on
// rd_latch and held on data_out while data_oe is high.
//
// From the design: the command is first written into a register of the board
// and then passed to the command controller. The rest is this design's own.
module vme_data_ctrl
  import gse_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   vme_data_in,
  output logic [31:0]   vme_data_out,
  output logic          vme_data_oe,
  // from vme_addr_ctrl
  input  logic          reg_wr,
  input  reg_idx_e      reg_idx,
  input  logic          sel_mem,
  input  logic          rd_latch,
  input  logic          data_oe,
  // SRAM read data from mem_ctrl
  input  mem_word_t     mem_rdata,
  // board state
  input  board_status_t status,
  // to the controllers
  output logic          go,
  output logic [15:0]   cmd,
  output logic          hw_cmd,
  output logic          swap_req,
  output logic          clr_ovf
);

  logic [31:0] reg_rdata;

  always_comb begin
    unique case (reg_idx)
      REG_CMD:    reg_rdata = {15'b0, hw_cmd, cmd};
      REG_STATUS: reg_rdata = {status.cmd_busy, status.act, status.wr_buf,
                               status.overflow, status.pkt_active,
                               status.swap_pending, status.closed_buf, 9'b0,
                               status.pkt_count};
      REG_CLOSED: reg_rdata = {status.closed_words, status.closed_pkts};
      REG_WORDS:  reg_rdata = {16'b0, status.word_count};
      default:    reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd          <= '0;
      hw_cmd       <= 1'b0;
      go           <= 1'b0;
      swap_req     <= 1'b0;
      clr_ovf      <= 1'b0;
      vme_data_out <= '0;
    end else begin
      go       <= 1'b0;
      swap_req <= 1'b0;
      clr_ovf  <= 1'b0;
      if (reg_wr && reg_idx == REG_CMD && !status.cmd_busy) begin
        cmd    <= vme_data_in[15:0];
        hw_cmd <= vme_data_in[16];
        go     <= 1'b1;
      end
      if (reg_wr && reg_idx == REG_CTRL) begin
        swap_req <= vme_data_in[0];
        clr_ovf  <= vme_data_in[1];
      end
      if (rd_latch) vme_data_out <= sel_mem ? mem_rdata : reg_rdata;
    end
  end

  assign vme_data_oe = data_oe;

endmodule
