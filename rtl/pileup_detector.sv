// pileup_detector: peak-hold gate and DBL (double trigger) flag of one
// phoswich counter.
//
// A photon event opens a peak-hold (PH) gate of 9.4 us. If a second anode
// trigger arrives while the gate is open, the event is piled up. The DBL flag
// records that. The flag is latched at the trailing edge of the gate and
// travels with the event's data, so piled-up events can be dropped later.
//
// How it works. Everything runs on a 10 MHz clock. The anode trigger goes
// through a two-flop synchroniser and a rising-edge detector. With the gate
// closed, a trigger opens it for GATE_CYCLES clocks. With the gate open, a
// trigger sets dbl_flag, and more triggers change nothing. In the cycle in
// which the gate closes, `latch` is high for one cycle and dbl_latched holds
// the flag (a trigger in the last gate cycle counts). The flag is cleared at
// the same time. A trigger after the gate closed opens a new gate.
//
// Timing. A trigger is seen 3 clocks (300 ns) after it rises, and must stay
// high for at least one clock (100 ns). The gate lasts GATE_CYCLES = 94
// clocks = 9.4 us.
//
// From the design: the 10 MHz clock, the 9.4 us gate, a flag set by the
// second trigger and latched at the trailing edge of the gate. The original
// uses a one-shot and flip-flops clocked by the trigger itself. This version
// is fully synchronous: the synchroniser, the counter that replaces the
// one-shot and the minimum pulse width are its own.
module pileup_detector #(
  parameter int unsigned GATE_CYCLES = 94   // 9.4 us at 10 MHz
) (
  input  logic clk,           // 10 MHz
  input  logic rst_n,
  input  logic anode_trig,    // fast anode trigger, asynchronous
  output logic ph_gate,       // peak-hold gate
  output logic dbl_flag,      // second trigger seen in this gate
  output logic latch,         // one cycle at the gate's trailing edge
  output logic dbl_latched    // DBL flag of the event just closed
);

  localparam int unsigned CW = $clog2(GATE_CYCLES + 1);

  logic [2:0]    sync;          // two sync stages plus the previous value
  logic          trig;
  logic [CW-1:0] cnt;

  assign trig = sync[1] && !sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      ph_gate     <= 1'b0;
      dbl_flag    <= 1'b0;
      cnt         <= '0;
      latch       <= 1'b0;
      dbl_latched <= 1'b0;
    end else begin
      sync  <= {sync[1:0], anode_trig};
      latch <= 1'b0;
      if (!ph_gate) begin
        if (trig) begin
          ph_gate <= 1'b1;
          cnt     <= '0;
        end
      end else if (cnt == CW'(GATE_CYCLES - 1)) begin
        ph_gate     <= 1'b0;
        dbl_flag    <= 1'b0;
        latch       <= 1'b1;
        dbl_latched <= dbl_flag || trig;
      end else begin
        cnt <= cnt + 1'b1;
        if (trig) dbl_flag <= 1'b1;
      end
    end
  end

endmodule
