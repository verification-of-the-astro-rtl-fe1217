// vme_master_model: behavioural VME bus master (the host side), for
// simulation only.
//
// write32 / read32 put the address (and data), wait 40 ns, pull the data
// strobe low, wait for DTACK, release the strobe and wait for DTACK to go
// high again. A cycle that sees no DTACK within timeout_ns ends with ok = 0
// (bus error). `cycles` counts bus cycles for the benches.
`timescale 1ns/1ps
module vme_master_model (
  output logic [31:2] addr,
  output logic        ds_n,
  output logic        write_n,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        dtack_n
);
  int unsigned cycles = 0;
  initial begin addr = '0; ds_n = 1; write_n = 1; wdata = '0; end

  task automatic cycle(input logic [31:0] a, input bit wr, input logic [31:0] wd,
                       output logic [31:0] rd, output bit ok, input int timeout_ns = 4000);
    int t = 0;
    addr = a[31:2]; write_n = !wr; wdata = wd;
    #40 ds_n = 0;
    while (dtack_n && t < timeout_ns) begin #10; t += 10; end
    ok = !dtack_n;
    #10 rd = rdata;
    ds_n = 1;
    t = 0;
    while (!dtack_n && t < timeout_ns) begin #10; t += 10; end
    write_n = 1;
    #20;
    cycles++;
  endtask

  task automatic write32(input logic [31:0] a, input logic [31:0] wd, output bit ok);
    logic [31:0] rd;
    cycle(a, 1'b1, wd, rd, ok);
  endtask

  task automatic read32(input logic [31:0] a, output logic [31:0] rd, output bit ok);
    cycle(a, 1'b0, '0, rd, ok);
  endtask
endmodule
