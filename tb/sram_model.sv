// sram_model: behavioural model of the board's 1 Mbyte asynchronous SRAM,
// seen as WORDS words of 32 bits, for simulation only.
//
// Reads are combinational: dq_in shows the addressed word while ce_n and
// oe_n are low, and zero otherwise. A write takes the data on the rising edge
// of we_n while ce_n is low. The memory starts cleared. Not synthesizable.
`timescale 1ns/1ps
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic [AW-1:0] addr,
  input  logic [31:0]   dq_out,     // data driven by the controller
  input  logic          dq_oe,
  output logic [31:0]   dq_in,      // data driven by the SRAM
  input  logic          ce_n,
  input  logic          we_n,
  input  logic          oe_n
);
  logic [31:0] mem [2**AW];
  int unsigned writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always @(posedge we_n) if (!ce_n && dq_oe) begin
    mem[addr] <= dq_out;
    writes++;
  end

  assign dq_in = (!ce_n && !oe_n) ? mem[addr] : 32'h0;
endmodule
