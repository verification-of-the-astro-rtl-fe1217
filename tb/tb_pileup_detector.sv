// tb_pileup_detector: self-checking test of the peak-hold gate and DBL flag.
//
// Pairs of anode triggers are sent with a spacing dt swept from 0.2 us to
// 12 us (the design scans pile-up from 0 to 7 us). Expected: one gate of
// exactly 94 clocks (9.4 us); a pair closer than the gate gives a single
// latch with DBL = 1; a pair farther apart gives two latches with DBL = 0; a
// third trigger changes nothing. dbl_flag must follow the second trigger
// within 4 clocks while the gate is still open.
`timescale 1ns/1ps
module tb_pileup_detector;
  localparam int G = 94;
  logic clk = 0, rst_n = 0, trig = 0;
  logic gate, dbl, latch, dbl_l;
  int checks = 0, failures = 0;

  pileup_detector #(.GATE_CYCLES(G)) dut (.clk, .rst_n, .anode_trig(trig),
    .ph_gate(gate), .dbl_flag(dbl), .latch, .dbl_latched(dbl_l));

  always #50 clk = ~clk;    // 10 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nlatch = 0, ndbl = 0, gate_len = 0, last_gate = 0;
  always @(posedge clk) if (rst_n) begin
    if (latch) begin nlatch++; if (dbl_l) ndbl++; end
    if (gate) gate_len++;
    else if (gate_len != 0) begin last_gate = gate_len; gate_len = 0; end
  end

  task automatic pulse();
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
  endtask

  task automatic pair(input int dt, input bit third = 0);
    int n0 = nlatch, d0 = ndbl;
    bit exp_dbl = (dt <= G);
    pulse();
    repeat (dt - 1) @(negedge clk);
    trig = 1;
    @(negedge clk); trig = 0;
    if (dt <= G - 5) begin
      repeat (4) @(negedge clk);
      check(dbl == 1'b1, $sformatf("dt=%0d: flag follows second trigger", dt));
    end
    if (third && dt + 10 < G) begin
      repeat (5) @(negedge clk);
      pulse();
    end
    repeat (2 * G + 10) @(negedge clk);
    check(last_gate == G, $sformatf("dt=%0d: gate %0d clocks", dt, last_gate));
    if (exp_dbl)
      check(nlatch - n0 == 1 && ndbl - d0 == 1,
            $sformatf("dt=%0d: %0d latches, %0d flagged", dt, nlatch - n0, ndbl - d0));
    else
      check(nlatch - n0 == 2 && ndbl - d0 == 0,
            $sformatf("dt=%0d: %0d latches, %0d flagged", dt, nlatch - n0, ndbl - d0));
    check(!dbl && !gate, "idle after the events");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // single event
    pulse();
    repeat (G + 10) @(negedge clk);
    check(nlatch == 1 && ndbl == 0 && last_gate == G, "single trigger");
    pair(2);  pair(10); pair(20); pair(40); pair(70);
    pair(93); pair(94); pair(95); pair(96); pair(120);
    pair(20, 1);
    for (int k = 0; k < 6; k++) pair(int'($urandom_range(2, 130)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
