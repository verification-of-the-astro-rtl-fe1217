// hxd_gse_system: the ground support equipment (GSE) of the hard X-ray
// detector, plus the detector-side pile-up flag logic.
//
// Nine GSE boards share one VME bus: four for the well processing units
// (WPU, boards 0-3), four for the transient processing units (TPU, boards
// 4-7) and one for the analog control unit (ACU, board 8). Only the ACU board
// drives Act. Board k answers to VME addresses with A[27:24] = k. Each board
// has its own command lines, data lines and SRAM, brought out as arrays
// indexed by board. The VME read data of the boards are ORed, each board
// driving zeros unless it owns the cycle, and DTACK is the AND of the
// active-low acknowledges.
//
// Beside the GSE, and not connected to it, sit NUM_PHOSWICH pile-up
// detectors, one per phoswich counter. In the instrument they live on the WPU
// boards, and their DBL flags reach the GSE only inside the WPU data packets.
// They run on their own 10 MHz clock.
//
// The board counts (4 + 4 + 1) and the 16 phoswich counters follow the
// design. The address map and the bus combining are this design's own.
module hxd_gse_system
  import gse_pkg::*;
#(
  parameter int unsigned NUM_WPU         = 4,
  parameter int unsigned NUM_TPU         = 4,
  parameter int unsigned NUM_PHOSWICH    = 16,
  parameter int unsigned HALF_PERIOD     = 76,
  parameter int unsigned ATT_WAIT_CYCLES = 2438,
  parameter int unsigned ATT_HIGH_CYCLES = 600000,
  parameter int unsigned DATA_WORDS      = 65536,
  parameter int unsigned INDEX_WORDS     = 65536,
  parameter int unsigned GATE_CYCLES     = 94,
  localparam int unsigned NB             = NUM_WPU + NUM_TPU + 1
) (
  input  logic        clk,            // 20 MHz board clock
  input  logic        rst_n,
  // VME bus
  input  logic [31:2] vme_addr,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // per board: command lines out, data lines in
  output logic [NB-1:0] ae_cmd_data,
  output logic [NB-1:0] ae_cmd_enable,
  output logic [NB-1:0] ae_cmd_clock,
  output logic [NB-1:0] ae_act,
  input  logic [NB-1:0] ae_dat_data,
  input  logic [NB-1:0] ae_dat_enable,
  input  logic [NB-1:0] ae_dat_clock,
  output logic [NB-1:0] pkt_stored,
  // per board: SRAM pins
  output mem_addr_t   sram_addr   [NB],
  output mem_word_t   sram_dq_out [NB],
  output logic [NB-1:0] sram_dq_oe,
  input  mem_word_t   sram_dq_in  [NB],
  output logic [NB-1:0] sram_ce_n,
  output logic [NB-1:0] sram_we_n,
  output logic [NB-1:0] sram_oe_n,
  // pile-up detectors
  input  logic                    clk10,   // 10 MHz
  input  logic [NUM_PHOSWICH-1:0] anode_trig,
  output logic [NUM_PHOSWICH-1:0] ph_gate,
  output logic [NUM_PHOSWICH-1:0] dbl_flag,
  output logic [NUM_PHOSWICH-1:0] dbl_latch,
  output logic [NUM_PHOSWICH-1:0] dbl_latched
);

  logic [31:0]   bd_data [NB];
  logic [NB-1:0] bd_oe, bd_dtack_n;

  for (genvar b = 0; b < NB; b++) begin : g_board
    gse_board #(
      .HAS_ACT(b == NB - 1), .HALF_PERIOD(HALF_PERIOD),
      .ATT_WAIT_CYCLES(ATT_WAIT_CYCLES), .ATT_HIGH_CYCLES(ATT_HIGH_CYCLES),
      .DATA_WORDS(DATA_WORDS), .INDEX_WORDS(INDEX_WORDS)
    ) u_board (
      .clk, .rst_n, .board_id(4'(b)),
      .vme_addr, .vme_ds_n, .vme_write_n, .vme_data_in,
      .vme_data_out(bd_data[b]), .vme_data_oe(bd_oe[b]),
      .vme_dtack_n(bd_dtack_n[b]),
      .ae_cmd_data(ae_cmd_data[b]), .ae_cmd_enable(ae_cmd_enable[b]),
      .ae_cmd_clock(ae_cmd_clock[b]), .ae_act(ae_act[b]),
      .ae_dat_data(ae_dat_data[b]), .ae_dat_enable(ae_dat_enable[b]),
      .ae_dat_clock(ae_dat_clock[b]),
      .sram_addr(sram_addr[b]), .sram_dq_out(sram_dq_out[b]),
      .sram_dq_oe(sram_dq_oe[b]), .sram_dq_in(sram_dq_in[b]),
      .sram_ce_n(sram_ce_n[b]), .sram_we_n(sram_we_n[b]),
      .sram_oe_n(sram_oe_n[b]), .pkt_stored(pkt_stored[b])
    );
  end

  always_comb begin
    vme_data_out = '0;
    for (int b = 0; b < NB; b++)
      if (bd_oe[b]) vme_data_out |= bd_data[b];
    vme_data_oe = |bd_oe;
    vme_dtack_n = &bd_dtack_n;
  end

  for (genvar p = 0; p < NUM_PHOSWICH; p++) begin : g_phoswich
    pileup_detector #(.GATE_CYCLES(GATE_CYCLES)) u_pileup (
      .clk(clk10), .rst_n, .anode_trig(anode_trig[p]),
      .ph_gate(ph_gate[p]), .dbl_flag(dbl_flag[p]),
      .latch(dbl_latch[p]), .dbl_latched(dbl_latched[p])
    );
  end

endmodule
