// vme_addr_ctrl: VME Address Controller.
//
// Watches the VME address and data strobe, decides whether a bus cycle is for
// this board, and runs the cycle: a register access, or an SRAM read through
// mem_ctrl. It ends each cycle with DTACK.
//
// Address map (A32, byte addresses; all choices made here):
//   A[31:28] = BASE_HI, A[27:24] = board_id  selects the board
//   A[20] = 1  SRAM window, word address A[19:2] (1 Mbyte)
//   A[20] = 0  registers, index A[4:2] (see gse_pkg::reg_idx_e)
// Writes to the SRAM window are acknowledged and ignored: the host only
// reads the SRAM.
//
// How it works. The data strobe is sampled on every clock, so a request is
// seen within one 50 ns clock. Idle -> (strobe, board selected) either Reg,
// with a one-cycle reg_wr for a write, or Mem, which holds a read request to
// mem_ctrl until ack -> Dtack drives dtack_n low, with the data bus enabled on
// reads, until the strobe is released -> Idle. rd_latch tells vme_data_ctrl
// when to capture the read data.
//
// From the design: this block decodes the VME address and supplies the SRAM
// control (here through mem_ctrl), and the strobe is examined every clock.
// The map, the states and the DTACK timing are this design's own; the bus
// buffers of the board sit outside this logic and hand it plain signals.
module vme_addr_ctrl
  import gse_pkg::*;
#(
  parameter logic [3:0] BASE_HI = 4'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  board_id,
  input  logic [31:2] vme_addr,
  input  logic        vme_ds_n,      // data strobe, active low
  input  logic        vme_write_n,   // 0 = write cycle
  output logic        vme_dtack_n,
  // to vme_data_ctrl
  output logic        reg_wr,        // one cycle: register write
  output reg_idx_e    reg_idx,
  output logic        sel_mem,       // the cycle is an SRAM access
  output logic        rd_latch,      // capture read data this cycle
  output logic        data_oe,       // drive the VME data bus
  // to/from mem_ctrl (port 1)
  output mem_req_t    mem_req,
  input  mem_rsp_t    mem_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_REG, S_MEM, S_DTACK} state_e;

  state_e state;
  logic   ds_q;
  logic   write_q;
  logic   hit;
  reg_idx_e idx_q;

  assign hit = ds_q && (vme_addr[31:28] == BASE_HI) && (vme_addr[27:24] == board_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_q    <= 1'b0;
      state   <= S_IDLE;
      write_q <= 1'b0;
      sel_mem <= 1'b0;
      idx_q   <= REG_CMD;
      mem_req <= '0;
    end else begin
      ds_q <= !vme_ds_n;
      unique case (state)
        S_IDLE: if (hit) begin
          write_q <= !vme_write_n;
          sel_mem <= vme_addr[20];
          idx_q   <= reg_idx_e'(vme_addr[4:2]);
          if (vme_addr[20] && vme_write_n) begin
            mem_req <= '{req: 1'b1, we: 1'b0, addr: vme_addr[19:2], wdata: '0};
            state   <= S_MEM;
          end else begin
            state   <= vme_addr[20] ? S_DTACK : S_REG;
          end
        end
        S_REG: state <= S_DTACK;
        S_MEM: if (mem_rsp.ack) begin
          mem_req.req <= 1'b0;
          state       <= S_DTACK;
        end
        S_DTACK: if (!ds_q) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    reg_wr      = (state == S_IDLE) && hit && !vme_write_n && !vme_addr[20];
    reg_idx     = (state == S_IDLE) ? reg_idx_e'(vme_addr[4:2]) : idx_q;
    rd_latch    = !write_q && ((state == S_REG) || (state == S_MEM && mem_rsp.ack));
    vme_dtack_n = !(state == S_DTACK);
    data_oe     = (state == S_DTACK) && !write_q;
  end

endmodule
