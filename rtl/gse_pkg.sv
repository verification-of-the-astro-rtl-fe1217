// gse_pkg: types and constants shared by the GSE board logic.
//
// The board logic runs on one 20 MHz clock. The SRAM on the board holds
// 1 Mbyte, seen here as 256K words of 32 bits. Each of the two buffers, A and
// B, is 512 kbyte. It is split into a 256 kbyte index block and a 256 kbyte
// data block. Word 2n of the index block holds the size of packet n and word
// 2n+1 holds where packet n starts. Those numbers follow the design. The
// 32-bit word width and the bit layout of the address are choices made here:
//   addr[17]    buffer (0 = A, 1 = B)
//   addr[16]    block  (0 = index, 1 = data)
//   addr[15:0]  word inside the block
// Memory requests use one struct type. A requester holds `req` and the
// request fields steady until it sees `ack`, then drops `req`.
package gse_pkg;

  localparam int unsigned MEM_AW    = 18;  // 256K words = 1 Mbyte
  localparam int unsigned MEM_DW    = 32;  // one word = 4 bytes
  localparam int unsigned BLOCK_AW  = 16;  // 64K words = 256 kbyte per block

  typedef logic [MEM_AW-1:0] mem_addr_t;
  typedef logic [MEM_DW-1:0] mem_word_t;

  typedef struct packed {
    logic      req;    // M_sel request, held until ack
    logic      we;     // 1 = write, 0 = read
    mem_addr_t addr;
    mem_word_t wdata;
  } mem_req_t;

  typedef struct packed {
    logic      ack;    // high in Mem Ack until req drops
    mem_word_t rdata;  // valid while ack is high (reads)
  } mem_rsp_t;

  // Build an SRAM word address from buffer, block and word offset.
  function automatic mem_addr_t mem_addr(input logic buf_b, input logic data_blk,
                                         input logic [BLOCK_AW-1:0] word);
    return {buf_b, data_blk, word};
  endfunction

  // VME register offsets (word index, address bits [4:2]).
  typedef enum logic [2:0] {
    REG_CMD    = 3'd0,  // W: bits 15:0 command, bit 16 hardware (Act) command
    REG_STATUS = 3'd1,  // R: board status, see vme_data_ctrl
    REG_CTRL   = 3'd2,  // W: bit 0 swap buffers, bit 1 clear overflow
    REG_CLOSED = 3'd3,  // R: what the last closed buffer holds
    REG_WORDS  = 3'd4   // R: words stored in the write buffer
  } reg_idx_e;

  // Status seen by the VME side.
  typedef struct packed {
    logic                 cmd_busy;
    logic                 act;
    logic                 wr_buf;      // buffer being written (0 = A)
    logic                 overflow;
    logic                 pkt_active;  // AE packet being received
    logic                 swap_pending;
    logic [BLOCK_AW-1:0]  pkt_count;   // packets stored in the write buffer
    logic [BLOCK_AW-1:0]  word_count;  // data words stored in the write buffer
    logic                 closed_buf;  // buffer closed by the last swap
    logic [BLOCK_AW-1:0]  closed_pkts;
    logic [BLOCK_AW-1:0]  closed_words;
  } board_status_t;

endpackage
