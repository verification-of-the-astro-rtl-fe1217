// tb_ae_cmd_ctrl: self-checking test of the command serialiser.
//
// A receiver model samples Data on each rising edge of Clock while Enable is
// high and rebuilds the command. Checked per command: the 16 received bits,
// the number of Clock edges, the Enable length (16 Clock periods), and for
// hardware commands the Act delay (ATT_WAIT_CYCLES + 3 clocks after Enable
// falls) and Act width. Ordinary commands must raise no Act. Small
// timing parameters keep the run short.
`timescale 1ns/1ps
module tb_ae_cmd_ctrl;
  localparam int HP = 4, AW = 10, AH = 20;
  logic clk = 0, rst_n = 0, go = 0, hw = 0;
  logic [15:0] cmd = '0;
  logic busy, d, en, sc, act;
  int checks = 0, failures = 0;

  ae_cmd_ctrl #(.HALF_PERIOD(HP), .ATT_WAIT_CYCLES(AW), .ATT_HIGH_CYCLES(AH),
                .HAS_ACT(1'b1)) dut (
    .clk, .rst_n, .go, .cmd, .hw_cmd(hw), .busy, .ae_data(d),
    .ae_enable(en), .ae_clock(sc), .ae_act(act));

  always #25 clk = ~clk;

  // receiver and timing monitor
  logic [15:0] rx; int nrx, en_len, gap, act_len, cyc;
  logic sc_q, en_q, act_q; int en_fall_cyc, act_rise_cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    sc_q <= sc; en_q <= en; act_q <= act;
    if (en) en_len++;
    if (act) act_len++;
    if (en && sc && !sc_q) begin rx = {rx[14:0], d}; nrx++; end
    if (!en && en_q) en_fall_cyc = cyc;
    if (act && !act_q) act_rise_cyc = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [15:0] c, input bit h);
    rx = '0; nrx = 0; en_len = 0; act_len = 0; act_rise_cyc = -1;
    @(negedge clk); cmd = c; hw = h; go = 1;
    @(negedge clk); go = 0; cmd = ~c;       // input must have been captured
    wait (!busy);
    repeat (3) @(negedge clk);
    check(rx == c, $sformatf("command %h received as %h", c, rx));
    check(nrx == 16, $sformatf("%0d clock edges under Enable", nrx));
    check(en_len == 16 * 2 * HP, $sformatf("Enable %0d cycles", en_len));
    if (h) begin
      check(act_rise_cyc - en_fall_cyc == AW + 3,
            $sformatf("Act delay %0d", act_rise_cyc - en_fall_cyc));
      check(act_len == AH, $sformatf("Act width %0d", act_len));
    end else begin
      check(act_len == 0, "Act raised by an ordinary command");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(!en && !act && !busy, "idle outputs");
    send(16'hA5C3, 0);
    send(16'h8001, 1);
    send(16'h0000, 0);
    for (int i = 0; i < 6; i++) send(16'($urandom), 1'($urandom));
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
