// ae_data_ctrl: AE Data Controller, data-handling part.
//
// Receives one data packet from an analog-electronics (AE) board on three
// lines, Enable, Clock and Data, and cuts it into 32-bit words for the
// pointer-handling part (ae_ptr_ctrl).
//
// How it works. The three lines are asynchronous to the 20 MHz clock and go
// through two-flop synchronisers. The state machine: Idle waits for Enable to
// rise -> First takes the bit at the first rising edge of Clock; this MSB is
// the data identification bit (0 observational, 1 monitor data) -> Clk High
// and Clk Low follow the Clock level and take one bit at each rising edge ->
// every 32 bits the machine passes Word Last and pulses word_done with the
// word -> when Enable falls it passes Word Last for the bits of an unfinished
// word, then Pkt Last, which pulses pkt_done with the bit count and the
// identification bit, and returns to Idle.
//
// Timing. Bits are taken on the rising edge of Clock, so Clock must stay low
// and high for at least three system clocks each (the defaults of the design
// use 3.8 us half periods, the bench test used 0.5 us). The first bit received
// is bit 31 of the first word. An unfinished last word is sent left-aligned,
// its unused low bits zero. word_done and pkt_done are one-cycle pulses;
// pkt_done comes one cycle after the last word_done of a packet.
//
// From the design: the states, the identification bit in the MSB, the
// 4-byte word, the word done and packet done signals. Choices made here: the
// rising-edge sampling, the synchronisers, the handling of a last word that
// is not full, and that the size passed on is a count of bits.
module ae_data_ctrl #(
  parameter int unsigned BITCNT_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ae_data,     // serial data from AE
  input  logic                ae_enable,   // high for the whole packet
  input  logic                ae_clock,    // serial clock from AE
  output logic                word_done,   // one-cycle pulse: word valid
  output logic [31:0]         word,        // received word, first bit in bit 31
  output logic                pkt_done,    // one-cycle pulse: packet ended
  output logic [BITCNT_W-1:0] pkt_bits,    // bits received in the packet
  output logic                pkt_id,      // data identification bit
  output logic                pkt_active   // a packet is being received
);

  typedef enum logic [2:0] {
    S_IDLE, S_FIRST, S_CLK_HIGH, S_CLK_LOW, S_WORD_LAST, S_PKT_LAST
  } state_e;

  state_e              state;
  logic [1:0]          d_sync, e_sync, c_sync;
  logic                d_s, e_s, c_s, e_q, c_q;
  logic [31:0]         shreg;
  logic [5:0]          nbits;         // bits in the current word
  logic [BITCNT_W-1:0] bitcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sync <= '0;
      e_sync <= '0;
      c_sync <= '0;
      e_q    <= 1'b0;
      c_q    <= 1'b0;
    end else begin
      d_sync <= {d_sync[0], ae_data};
      e_sync <= {e_sync[0], ae_enable};
      c_sync <= {c_sync[0], ae_clock};
      e_q    <= e_sync[1];
      c_q    <= c_sync[1];
    end
  end
  assign d_s = d_sync[1];
  assign e_s = e_sync[1];
  assign c_s = c_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shreg     <= '0;
      nbits     <= '0;
      bitcnt    <= '0;
      pkt_id    <= 1'b0;
      word      <= '0;
      word_done <= 1'b0;
      pkt_done  <= 1'b0;
      pkt_bits  <= '0;
    end else begin
      word_done <= 1'b0;
      pkt_done  <= 1'b0;
      unique case (state)
        S_IDLE: if (e_s && !e_q) begin
          nbits  <= '0;
          bitcnt <= '0;
          shreg  <= '0;
          state  <= S_FIRST;
        end
        S_FIRST: begin
          if (c_s && !c_q) begin             // first rising edge: ID bit
            pkt_id <= d_s;
            shreg  <= {shreg[30:0], d_s};
            nbits  <= 6'd1;
            bitcnt <= BITCNT_W'(1);
            state  <= S_CLK_HIGH;
          end else if (!e_s) begin
            state  <= S_WORD_LAST;           // Enable without any bit
          end
        end
        S_CLK_HIGH: begin
          if (nbits == 6'd32 || !e_s) state <= S_WORD_LAST;
          else if (!c_s)               state <= S_CLK_LOW;
        end
        S_CLK_LOW: begin
          if (c_s) begin                     // rising edge of Clock
            shreg  <= {shreg[30:0], d_s};
            nbits  <= nbits + 1'b1;
            if (bitcnt != '1) bitcnt <= bitcnt + 1'b1;
            state  <= S_CLK_HIGH;
          end else if (!e_s) begin
            state  <= S_WORD_LAST;
          end
        end
        S_WORD_LAST: begin
          if (nbits != 6'd0) begin
            word      <= shreg << (6'd32 - nbits);
            word_done <= 1'b1;
          end
          nbits <= '0;
          shreg <= '0;
          state <= e_s ? S_CLK_HIGH : S_PKT_LAST;
        end
        S_PKT_LAST: begin
          pkt_done <= 1'b1;
          pkt_bits <= bitcnt;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pkt_active = (state != S_IDLE);

endmodule
