// mem_ctrl: Memory Controller for the board's asynchronous SRAM.
//
// Two requesters share the one SRAM: port 0 is the AE data path
// (ae_ptr_ctrl) and port 1 is the VME side (vme_addr_ctrl). Each access goes
// through four states. Idle waits for a request (M_sel) -> Mem Setup drives
// address, chip enable and, for a write, the data, for SETUP_CYCLES -> Mem
// Active pulses WE or OE low for ACTIVE_CYCLES and takes the read data at the
// end -> Mem Ack holds ack until the requester drops M_sel, then Idle. Port 0
// wins when both ask in the same cycle, so the AE data path never waits for
// more than one VME access.
//
// Interface. Requests and responses use gse_pkg's mem_req_t and mem_rsp_t.
// A requester holds req, we, addr and wdata until it sees ack. SRAM pins are
// active low, and the bidirectional data bus is split into dq_out, dq_oe and
// dq_in. Timing: at the defaults an access takes 1 + 2 cycles plus one cycle
// of ack, 200 ns at 20 MHz. The SRAM writes on the rising edge of WE, so
// chip enable, address and write data stay driven through Mem Ack to give the
// write a hold time.
//
// From the design: the four states and the M_sel handshake. Choices made
// here: the cycle counts, the two ports and the fixed priority.
module mem_ctrl
  import gse_pkg::*;
#(
  parameter int unsigned SETUP_CYCLES  = 1,
  parameter int unsigned ACTIVE_CYCLES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_req_t  req [2],
  output mem_rsp_t  rsp [2],
  output logic      m_sel,      // request being served
  // SRAM pins
  output mem_addr_t sram_addr,
  output mem_word_t sram_dq_out,
  output logic      sram_dq_oe,
  input  mem_word_t sram_dq_in,
  output logic      sram_ce_n,
  output logic      sram_we_n,
  output logic      sram_oe_n
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACTIVE, S_ACK} state_e;

  localparam int unsigned CW = $clog2((SETUP_CYCLES > ACTIVE_CYCLES ?
                                       SETUP_CYCLES : ACTIVE_CYCLES) + 1);

  state_e     state;
  logic       grant;
  logic [CW-1:0] cnt;
  mem_req_t   cur;
  mem_word_t  rdata;

  assign cur   = req[grant];
  assign m_sel = cur.req && (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      grant <= 1'b0;
      cnt   <= '0;
      rdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (req[0].req) begin
            grant <= 1'b0;
            state <= S_SETUP;
          end else if (req[1].req) begin
            grant <= 1'b1;
            state <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (cnt == CW'(SETUP_CYCLES - 1)) begin
            cnt   <= '0;
            state <= S_ACTIVE;
          end else cnt <= cnt + 1'b1;
        end
        S_ACTIVE: begin
          if (cnt == CW'(ACTIVE_CYCLES - 1)) begin
            cnt   <= '0;
            if (!cur.we) rdata <= sram_dq_in;
            state <= S_ACK;
          end else cnt <= cnt + 1'b1;
        end
        S_ACK: if (!cur.req) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sram_addr   = cur.addr;
    sram_dq_out = cur.wdata;
    sram_dq_oe  = cur.we && (state != S_IDLE);
    sram_ce_n   = (state == S_IDLE);
    sram_we_n   = !(state == S_ACTIVE && cur.we);
    sram_oe_n   = !(state == S_ACTIVE && !cur.we);
    for (int p = 0; p < 2; p++) begin
      rsp[p].ack   = (state == S_ACK) && (grant == 1'(p));
      rsp[p].rdata = rdata;
    end
  end

  // The served requester keeps its request up until it is acknowledged.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_SETUP || state == S_ACTIVE) |-> cur.req);

endmodule
