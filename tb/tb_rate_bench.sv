// tb_rate_bench: event-rate test of one GSE board, modelled on a bench
// set-up in which a pulse generator feeds the board's data input.
//
// Test equipment modelled here: a 1 MHz clock drives the board's data Clock.
// A pulse generator makes 1 us trigger pulses, periodic or random. A
// flip-flop samples the trigger on the falling edge of the 1 MHz clock. A
// veto (latch gate) blocks further triggers: it opens with an accepted
// trigger and closes on the board's pkt_stored pulse. Each accepted trigger
// makes a 2 us Enable and a 1 us Data pulse, so every event is a 2-bit packet
// "10".
//
// Measured: input triggers, processed events and the veto width. Checked:
//   - every accepted event is stored as a 2-bit packet, word 0x80000000,
//     with consecutive pointers;
//   - periodic input up to 140 kHz loses no event;
//   - above the rate set by the veto width, periodic input loses events;
//   - random input loses events in line with a dead time of one veto
//     width (processed/input = 1/(1 + rate * veto), within 3 points).
// The board runs with its default sizes and timing.
`timescale 1ns/1ps
module tb_rate_bench;
  import gse_pkg::*;
  logic clk = 0, rst_n = 0, clk1m = 0;
  logic [31:2] va; logic ds_n, wr_n, dtack_n, doe; logic [31:0] vdi, vdo;
  logic cd, ce, cc, act, pkt_stored;
  logic dd = 0, de = 0;
  mem_addr_t sa; mem_word_t sdo, sdi; logic soe, sce, swe, soen;
  int checks = 0, failures = 0;

  gse_board dut (
    .clk, .rst_n, .board_id(4'd0), .vme_addr(va), .vme_ds_n(ds_n),
    .vme_write_n(wr_n), .vme_data_in(vdi), .vme_data_out(vdo),
    .vme_data_oe(doe), .vme_dtack_n(dtack_n),
    .ae_cmd_data(cd), .ae_cmd_enable(ce), .ae_cmd_clock(cc), .ae_act(act),
    .ae_dat_data(dd), .ae_dat_enable(de), .ae_dat_clock(clk1m),
    .sram_addr(sa), .sram_dq_out(sdo), .sram_dq_oe(soe), .sram_dq_in(sdi),
    .sram_ce_n(sce), .sram_we_n(swe), .sram_oe_n(soen), .pkt_stored);
  sram_model #(.AW(18)) ram (.addr(sa), .dq_out(sdo), .dq_oe(soe), .dq_in(sdi),
                             .ce_n(sce), .we_n(swe), .oe_n(soen));
  vme_master_model host (.addr(va), .ds_n, .write_n(wr_n), .wdata(vdi),
                         .rdata(doe ? vdo : 32'h0), .dtack_n);

  always #25  clk   = ~clk;
  always #500 clk1m = ~clk1m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pulse generator, flip-flop, veto and gate generators
  logic trig = 0, veto = 0;
  int n_in = 0, n_acc = 0, n_stored = 0;
  realtime veto_start, veto_sum = 0;
  always @(negedge clk1m) if (trig && !veto) begin
    veto = 1; veto_start = $realtime; n_acc++;
    fork
      begin de = 1; dd = 1; #1000 dd = 0; #1000 de = 0; end
    join_none
  end
  always @(negedge pkt_stored) if (veto) begin
    veto = 0; n_stored++; veto_sum += $realtime - veto_start;
  end

  task automatic run(input real rate_hz, input bit random, input int nevents,
                     output real ratio, output real veto_ns);
    real period = 1.0e9 / rate_hz;
    n_in = 0; n_acc = 0; n_stored = 0; veto_sum = 0;
    for (int i = 0; i < nevents; i++) begin
      real gap = random ? -period * $ln(1.0 - real'($urandom_range(0, 999999)) / 1.0e6)
                        : period;
      if (gap < 1000.0) gap = 1000.0;         // pulses cannot overlap
      trig = 1; n_in++;
      #1000 trig = 0;
      #(gap - 1000.0);
    end
    #20000;
    ratio   = 100.0 * n_stored / n_in;
    veto_ns = n_stored > 0 ? veto_sum / n_stored : 0;
    check(n_acc == n_stored, $sformatf("%0.0f Hz: %0d accepted, %0d stored", rate_hz, n_acc, n_stored));
    $display("%s %8.0f Hz: %0d in, %0d processed (%5.1f %%), veto %0.0f ns",
             random ? "random  " : "periodic", rate_hz, n_in, n_stored, ratio, veto_ns);
  endtask

  initial begin
    real r, v, v140, expct;
    logic [31:0] s;
    bit ok;
    int total;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    run(10.0e3, 0, 100, r, v);   check(r == 100.0, "10 kHz periodic: no loss");
    run(100.0e3, 0, 400, r, v);  check(r == 100.0, "100 kHz periodic: no loss");
    run(140.0e3, 0, 400, r, v);  check(r == 100.0, "140 kHz periodic: no loss");
    v140 = v;
    run(500.0e3, 0, 400, r, v);  check(r < 100.0, "500 kHz periodic: losses");
    for (int k = 0; k < 3; k++) begin
      real rate;
      rate = (k == 0) ? 30.0e3 : (k == 1) ? 100.0e3 : 250.0e3;
      run(rate, 1, 1500, r, v);
      expct = 100.0 / (1.0 + rate * v140 * 1.0e-9);
      check(r > expct - 3.0 && r < expct + 3.0,
            $sformatf("random %0.0f Hz: %0.1f %% against %0.1f %%", rate, r, expct));
    end
    // every stored event is a 2-bit packet "10" with consecutive pointers
    host.read32(32'h1000_0004, s, ok);
    total = s[15:0];
    check(ok && total > 1000, $sformatf("%0d packets stored", total));
    for (int p = 0; p < total; p++) begin
      if (ram.mem[{1'b0, 1'b0, 16'(2 * p)}] != {1'b1, 15'b0, 16'd2} ||
          ram.mem[{1'b0, 1'b0, 16'(2 * p + 1)}] != 32'(p) ||
          ram.mem[{1'b0, 1'b1, 16'(p)}] != 32'h8000_0000) begin
        failures++; $display("FAIL: packet %0d", p); break;
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
