// ae_ptr_ctrl: AE Data Controller, pointer-handling part, with the double
// buffer.
//
// Stores what ae_data_ctrl receives in the SRAM, through mem_ctrl. The SRAM is
// split into buffers A and B. Each buffer has an index block and a data block.
// Received words go one after another into the data block of the write
// buffer. For packet n, word 2n of the index block gets the packet's size and
// word 2n+1 gets the data-block word where the packet starts. The host reads
// one buffer while this block fills the other. It asks for a swap when it
// wants the buffer being written.
//
// How it works. word_done and pkt_done are caught in one-entry holding
// registers, so a packet end that arrives during a word write is not lost.
// The state machine:
//   Idle -> Data Write -> Word Ptr ++ -> Idle                  (per word)
//   Idle -> Bit cnt Write -> Pkt Ptr ++ -> Word ptr Write -> Pkt Ptr ++ -> Idle
//                                                              (per packet)
// A waiting word is served before a waiting packet end. A swap request waits
// until no packet is being received and nothing is waiting. The swap then
// records what the closed buffer holds, flips the write buffer, and clears
// the pointers and the overflow flag. When the data block is full, words are
// dropped without moving the pointer, so nothing is overwritten. A packet
// that lost words, or that finds the index block full, gets no index entry.
// Either case sets `overflow`. The flag stays set until a swap or clr_ovf.
//
// Interface. Memory requests follow gse_pkg: hold req until ack, then drop
// it. pkt_stored pulses for one cycle when a packet's index entry is written,
// or when a packet is dropped.
// Size word: bit 31 the data identification bit, bits 15:0 the bit count.
//
// From the design: the pointer states, the 2n / 2n+1 index layout, the two
// 256 kbyte blocks per buffer, the A/B buffers and the overflow stop. Choices
// made here: the layout of the size word, and the swap request with its
// packet-boundary rule.
module ae_ptr_ctrl
  import gse_pkg::*;
#(
  parameter int unsigned DATA_WORDS  = 65536,   // data block: 256 kbyte
  parameter int unsigned INDEX_WORDS = 65536,   // index block: 256 kbyte
  parameter int unsigned BITCNT_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // from ae_data_ctrl
  input  logic                word_done,
  input  logic [31:0]         word,
  input  logic                pkt_done,
  input  logic [BITCNT_W-1:0] pkt_bits,
  input  logic                pkt_id,
  input  logic                pkt_active,
  // from the VME side
  input  logic                swap_req,     // one-cycle pulse
  input  logic                clr_ovf,      // one-cycle pulse
  // to/from mem_ctrl
  output mem_req_t            mem_req,
  input  mem_rsp_t            mem_rsp,
  // status
  output logic                wr_buf,       // 0 = A, 1 = B
  output logic                overflow,
  output logic                swap_pending,
  output logic                pkt_stored,   // one-cycle pulse
  output logic [BLOCK_AW-1:0] pkt_count,    // packets indexed in wr_buf
  output logic [BLOCK_AW-1:0] word_count,   // words stored in wr_buf
  output logic                closed_buf,
  output logic [BLOCK_AW-1:0] closed_pkts,
  output logic [BLOCK_AW-1:0] closed_words
);

  localparam int unsigned PW = BLOCK_AW + 1;   // pointers may reach the block end

  typedef enum logic [2:0] {
    S_IDLE, S_DATA_WRITE, S_WORD_PTR_INC, S_BITCNT_WRITE, S_PKT_PTR_INC1,
    S_WORDPTR_WRITE, S_PKT_PTR_INC2
  } state_e;

  state_e              state;
  logic                wpend, ppend;
  logic [31:0]         wbuf;
  logic [BITCNT_W-1:0] pbits;
  logic                pid;
  logic [PW-1:0]       word_ptr;     // next free word in the data block
  logic [PW-1:0]       idx_ptr;      // next free word in the index block
  logic [PW-1:0]       pkt_start;    // first data word of the current packet
  logic                pkt_bad;      // current packet lost words
  logic [BLOCK_AW-1:0] npkts;

  logic data_full, index_full, can_swap;
  assign data_full  = (word_ptr >= PW'(DATA_WORDS));
  assign index_full = (idx_ptr + PW'(2) > PW'(INDEX_WORDS));
  assign can_swap   = swap_pending && !wpend && !ppend && !pkt_active &&
                      !word_done && !pkt_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wpend        <= 1'b0;
      ppend        <= 1'b0;
      wbuf         <= '0;
      pbits        <= '0;
      pid          <= 1'b0;
      word_ptr     <= '0;
      idx_ptr      <= '0;
      pkt_start    <= '0;
      pkt_bad      <= 1'b0;
      npkts        <= '0;
      wr_buf       <= 1'b0;
      overflow     <= 1'b0;
      swap_pending <= 1'b0;
      pkt_stored   <= 1'b0;
      closed_buf   <= 1'b1;
      closed_pkts  <= '0;
      closed_words <= '0;
      mem_req      <= '0;
    end else begin
      pkt_stored <= 1'b0;
      if (word_done) begin
        wpend <= 1'b1;
        wbuf  <= word;
      end
      if (pkt_done) begin
        ppend <= 1'b1;
        pbits <= pkt_bits;
        pid   <= pkt_id;
      end
      if (swap_req) swap_pending <= 1'b1;
      if (clr_ovf)  overflow     <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (wpend) begin
            wpend <= word_done;              // a new word may land right now
            if (data_full) begin
              overflow <= 1'b1;              // stop: no write, no increment
              pkt_bad  <= 1'b1;
            end else begin
              mem_req <= '{req: 1'b1, we: 1'b1,
                           addr: mem_addr(wr_buf, 1'b1, word_ptr[BLOCK_AW-1:0]),
                           wdata: wbuf};
              state   <= S_DATA_WRITE;
            end
          end else if (ppend) begin
            ppend <= pkt_done;
            if (pkt_bad || index_full) begin
              overflow   <= 1'b1;
              pkt_bad    <= 1'b0;
              pkt_start  <= word_ptr;
              pkt_stored <= 1'b1;
            end else begin
              mem_req <= '{req: 1'b1, we: 1'b1,
                           addr: mem_addr(wr_buf, 1'b0, idx_ptr[BLOCK_AW-1:0]),
                           wdata: {pid, {(31-BITCNT_W){1'b0}}, pbits}};
              state   <= S_BITCNT_WRITE;
            end
          end else if (can_swap) begin
            swap_pending <= swap_req;
            closed_buf   <= wr_buf;
            closed_pkts  <= npkts;
            closed_words <= word_ptr[BLOCK_AW-1:0];
            wr_buf       <= ~wr_buf;
            word_ptr     <= '0;
            idx_ptr      <= '0;
            pkt_start    <= '0;
            npkts        <= '0;
            overflow     <= 1'b0;
          end
        end
        S_DATA_WRITE: if (mem_rsp.ack) begin
          mem_req.req <= 1'b0;
          state       <= S_WORD_PTR_INC;
        end
        S_WORD_PTR_INC: begin
          word_ptr <= word_ptr + 1'b1;
          state    <= S_IDLE;
        end
        S_BITCNT_WRITE: if (mem_rsp.ack) begin
          mem_req.req <= 1'b0;
          state       <= S_PKT_PTR_INC1;
        end
        S_PKT_PTR_INC1: begin
          idx_ptr <= idx_ptr + 1'b1;
          mem_req <= '{req: 1'b1, we: 1'b1,
                       addr: mem_addr(wr_buf, 1'b0, idx_ptr[BLOCK_AW-1:0] + 1'b1),
                       wdata: 32'(pkt_start)};
          state   <= S_WORDPTR_WRITE;
        end
        S_WORDPTR_WRITE: if (mem_rsp.ack) begin
          mem_req.req <= 1'b0;
          state       <= S_PKT_PTR_INC2;
        end
        S_PKT_PTR_INC2: begin
          idx_ptr    <= idx_ptr + 1'b1;
          pkt_start  <= word_ptr;
          npkts      <= npkts + 1'b1;
          pkt_stored <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pkt_count  = npkts;
  assign word_count = word_ptr[BLOCK_AW-1:0];

  // A word or packet end must not arrive while the previous one still waits.
  a_no_word_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(word_done && wpend && state != S_IDLE));
  a_no_pkt_overrun:  assert property (@(posedge clk) disable iff (!rst_n)
                                      !(pkt_done && ppend && !(state == S_IDLE && !wpend)));

endmodule
