// tb_loopback: two GSE boards back to back. The command output of board A
// (Data, Enable, Clock) is wired to the data input of board B, so every
// command that A sends arrives at B as a 16-bit packet. This is the
// two-board bench set-up for checking the command link, the data receiver
// and the memory path together without the analog electronics.
//
// Both boards run with their default timing and sizes: a 20 MHz clock and a
// command Clock of 152 cycles (7.6 us). The host writes random commands to
// board A over VME and measures A's outputs directly:
//   - Clock period 152 cycles, Enable 16 periods (2432 cycles = 121.6 us);
//   - board B stores one packet per command.
// After all commands the host swaps B's buffers and reads the closed buffer
// back. Each packet must have size word {cmd[15], 15'b0, 16} (the first bit
// is the data identification bit), pointer word n, and data word
// {cmd, 16'b0}.
`timescale 1ns/1ps
module tb_loopback;
  import gse_pkg::*;
  localparam int NCMD = 24;
  localparam int HALF = 76;
  logic clk = 0, rst_n = 0;
  logic [31:2] va; logic ds_n, wr_n; logic [31:0] vdi;
  logic [31:0] vdo_a, vdo_b; logic doe_a, doe_b, dtack_a, dtack_b;
  logic cd, ce, cc, act_a, act_b, bcd, bce, bcc, stored_a, stored_b;
  mem_addr_t sa_a, sa_b; mem_word_t sdo_a, sdi_a, sdo_b, sdi_b;
  logic soe_a, sce_a, swe_a, soen_a, soe_b, sce_b, swe_b, soen_b;
  int checks = 0, failures = 0;

  // board A: sends commands
  gse_board brd_a (
    .clk, .rst_n, .board_id(4'd0), .vme_addr(va), .vme_ds_n(ds_n),
    .vme_write_n(wr_n), .vme_data_in(vdi), .vme_data_out(vdo_a),
    .vme_data_oe(doe_a), .vme_dtack_n(dtack_a),
    .ae_cmd_data(cd), .ae_cmd_enable(ce), .ae_cmd_clock(cc), .ae_act(act_a),
    .ae_dat_data(1'b0), .ae_dat_enable(1'b0), .ae_dat_clock(1'b0),
    .sram_addr(sa_a), .sram_dq_out(sdo_a), .sram_dq_oe(soe_a), .sram_dq_in(sdi_a),
    .sram_ce_n(sce_a), .sram_we_n(swe_a), .sram_oe_n(soen_a), .pkt_stored(stored_a));

  // board B: receives A's commands as data
  gse_board brd_b (
    .clk, .rst_n, .board_id(4'd1), .vme_addr(va), .vme_ds_n(ds_n),
    .vme_write_n(wr_n), .vme_data_in(vdi), .vme_data_out(vdo_b),
    .vme_data_oe(doe_b), .vme_dtack_n(dtack_b),
    .ae_cmd_data(bcd), .ae_cmd_enable(bce), .ae_cmd_clock(bcc), .ae_act(act_b),
    .ae_dat_data(cd), .ae_dat_enable(ce), .ae_dat_clock(cc),
    .sram_addr(sa_b), .sram_dq_out(sdo_b), .sram_dq_oe(soe_b), .sram_dq_in(sdi_b),
    .sram_ce_n(sce_b), .sram_we_n(swe_b), .sram_oe_n(soen_b), .pkt_stored(stored_b));

  sram_model ram_a (.addr(sa_a), .dq_out(sdo_a), .dq_oe(soe_a), .dq_in(sdi_a),
                    .ce_n(sce_a), .we_n(swe_a), .oe_n(soen_a));
  sram_model ram_b (.addr(sa_b), .dq_out(sdo_b), .dq_oe(soe_b), .dq_in(sdi_b),
                    .ce_n(sce_b), .we_n(swe_b), .oe_n(soen_b));
  vme_master_model host (.addr(va), .ds_n, .write_n(wr_n), .wdata(vdi),
                         .rdata((doe_a ? vdo_a : 32'h0) | (doe_b ? vdo_b : 32'h0)),
                         .dtack_n(dtack_a & dtack_b));

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] BASE_A = 32'h1000_0000, BASE_B = 32'h1100_0000;
  task automatic vread(input logic [31:0] a, output logic [31:0] d);
    bit ok;
    host.read32(a, d, ok);
    check(ok, $sformatf("DTACK on read %h", a));
  endtask
  task automatic vwrite(input logic [31:0] a, input logic [31:0] d);
    bit ok;
    host.write32(a, d, ok);
    check(ok, $sformatf("DTACK on write %h", a));
  endtask
  function automatic logic [31:0] sram_off(input logic b, input logic blk, input int w);
    return 32'h0010_0000 | {12'b0, b, blk, 16'(w), 2'b00};
  endfunction

  // direct measurement of board A's command outputs, in board cycles
  longint cyc = 0, clk_rise_last = -1, en_rise = 0;
  int n_period = 0, bad_period = 0, n_enable = 0, bad_enable = 0, nstored_b = 0;
  logic cc_q = 0, ce_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    cc_q <= cc; ce_q <= ce;
    if (cc && !cc_q) begin
      if (clk_rise_last >= 0) begin
        n_period++;
        if (cyc - clk_rise_last != 2 * HALF) bad_period++;
      end
      clk_rise_last = cyc;
    end
    if (ce && !ce_q) en_rise = cyc;
    if (!ce && ce_q) begin
      n_enable++;
      if (cyc - en_rise != 32 * HALF) bad_enable++;
    end
    if (stored_b) nstored_b++;
  end

  logic [15:0] sent [NCMD];

  initial begin
    logic [31:0] s;
    int n0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < NCMD; i++) begin
      n0 = nstored_b;
      sent[i] = (i == 0) ? 16'h0001 : (i == 1) ? 16'hFFFF : 16'($urandom);
      vwrite(BASE_A | 32'h0, {16'b0, sent[i]});
      do vread(BASE_A | 32'h4, s); while (s[31]);
      repeat (40) @(posedge clk);
      check(nstored_b == n0 + 1, $sformatf("command %0d stored once by board B", i));
      vread(BASE_B | 32'h4, s);
      check(s[15:0] == 16'(i + 1), $sformatf("board B packet count %0d", s[15:0]));
    end
    check(n_enable == NCMD && bad_enable == 0,
          $sformatf("Enable width: %0d pulses, %0d wrong", n_enable, bad_enable));
    check(n_period >= 16 * NCMD && bad_period == 0,
          $sformatf("Clock period: %0d periods, %0d wrong", n_period, bad_period));
    check(act_a == 1'b0, "no Act on a WPU/TPU board");
    // swap B and read the closed buffer
    vwrite(BASE_B | 32'h8, 32'h1);
    do vread(BASE_B | 32'h4, s); while (s[26]);
    check(s[25] == 1'b0 && s[29] == 1'b1, "buffer A closed, B being written");
    vread(BASE_B | 32'hC, s);
    check(s == {16'(NCMD), 16'(NCMD)}, $sformatf("closed buffer summary %h", s));
    for (int i = 0; i < NCMD; i++) begin
      vread(BASE_B | sram_off(1'b0, 1'b0, 2 * i), s);
      check(s == {sent[i][15], 15'b0, 16'd16}, $sformatf("size word %0d: %h", i, s));
      vread(BASE_B | sram_off(1'b0, 1'b0, 2 * i + 1), s);
      check(s == 32'(i), $sformatf("pointer word %0d: %h", i, s));
      vread(BASE_B | sram_off(1'b0, 1'b1, i), s);
      check(s == {sent[i], 16'b0}, $sformatf("data word %0d: %h, sent %h", i, s, sent[i]));
    end
    $display("loopback: commands=%0d clock_periods=%0d", NCMD, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
