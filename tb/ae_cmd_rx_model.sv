// ae_cmd_rx_model: behavioural model of the command input of an analog
// board, for simulation only.
//
// Samples Data on each rising edge of Clock while Enable is high. When Enable
// falls it stores the received bits in `last_cmd` and their number in
// `last_nbits`, and counts the command in `ncmd`. It also counts Act pulses
// and measures the length of the last one in ns.
`timescale 1ns/1ps
module ae_cmd_rx_model (
  input logic data,
  input logic enable,
  input logic clock,
  input logic act
);
  logic [15:0] sh = '0, last_cmd = '0;
  int nbits = 0, last_nbits = 0, ncmd = 0, nact = 0;
  realtime act_rise = 0, act_len = 0;

  always @(posedge clock) if (enable) begin
    sh = {sh[14:0], data};
    nbits++;
  end
  always @(negedge enable) begin
    last_cmd = sh; last_nbits = nbits; ncmd++;
    nbits = 0; sh = '0;
  end
  always @(posedge act) act_rise = $realtime;
  always @(negedge act) begin act_len = $realtime - act_rise; nact++; end
endmodule
