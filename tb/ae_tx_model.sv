// ae_tx_model: behavioural model of the data output of an analog board, for
// simulation only.
//
// send() raises Enable, shifts the packet out MSB first, one bit per Clock
// period of 2*half_ns ns, with Data set while Clock is low and Clock rising
// in the middle of the bit, then drops Enable half a period after the last
// falling edge. Bits are given in a 1024-byte array, bit 0 of the packet in
// bits[0].
`timescale 1ns/1ps
module ae_tx_model (
  output logic data,
  output logic enable,
  output logic clock
);
  initial begin data = 0; enable = 0; clock = 0; end

  task automatic send(input logic bits [8192], input int n, input int half_ns);
    enable = 1;
    #(half_ns);
    for (int i = 0; i < n; i++) begin
      data = bits[i];
      #(half_ns);
      clock = 1;
      #(half_ns);
      clock = 0;
    end
    #(half_ns);
    enable = 0;
    data   = 0;
  endtask
endmodule
