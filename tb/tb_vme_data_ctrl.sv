// tb_vme_data_ctrl: self-checking test of the VME data transceiver and its
// registers.
//
// The bench drives the internal-bus strobes directly. Checked: a CMD write
// gives one go pulse with the command and hardware flag; a CMD write while
// the command controller is busy is dropped; CTRL writes give swap and clear
// pulses; each readable register shows the status bits at the documented
// positions; SRAM data is passed through on memory cycles; the data bus is
// driven only with data_oe.
`timescale 1ns/1ps
module tb_vme_data_ctrl;
  import gse_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] din = '0, dout;
  logic doe;
  logic reg_wr = 0, sel_mem = 0, rd_latch = 0, data_oe = 0;
  reg_idx_e reg_idx = REG_CMD;
  mem_word_t mem_rdata = '0;
  board_status_t st;
  logic go, hw, swap_req, clr_ovf;
  logic [15:0] cmd;
  int checks = 0, failures = 0;

  vme_data_ctrl dut (.clk, .rst_n, .vme_data_in(din), .vme_data_out(dout),
    .vme_data_oe(doe), .reg_wr, .reg_idx, .sel_mem, .rd_latch, .data_oe,
    .mem_rdata, .status(st), .go, .cmd, .hw_cmd(hw), .swap_req, .clr_ovf);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ngo = 0, nswap = 0, nclr = 0;
  always @(posedge clk) if (rst_n) begin
    if (go) ngo++;
    if (swap_req) nswap++;
    if (clr_ovf) nclr++;
  end

  task automatic wr(input reg_idx_e i, input logic [31:0] d);
    @(negedge clk); reg_idx = i; din = d; reg_wr = 1;
    @(negedge clk); reg_wr = 0;
    @(negedge clk);
  endtask

  task automatic rd(input reg_idx_e i, input bit m, output logic [31:0] d);
    @(negedge clk); reg_idx = i; sel_mem = m; rd_latch = 1;
    @(negedge clk); rd_latch = 0; data_oe = 1;
    @(negedge clk); d = dout;
    check(doe, "data bus driven on read");
    data_oe = 0; sel_mem = 0;
    @(negedge clk);
    check(!doe, "data bus released");
  endtask

  initial begin
    logic [31:0] r;
    st = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // command write
    wr(REG_CMD, 32'h0001_BEEF);
    check(ngo == 1 && cmd == 16'hBEEF && hw == 1'b1, "command accepted");
    rd(REG_CMD, 0, r);
    check(r == 32'h0001_BEEF, $sformatf("CMD reads %h", r));
    st.cmd_busy = 1;
    wr(REG_CMD, 32'h0000_1111);
    check(ngo == 1 && cmd == 16'hBEEF, "command dropped while busy");
    st.cmd_busy = 0;
    wr(REG_CMD, 32'h0000_2222);
    check(ngo == 2 && cmd == 16'h2222 && !hw, "second command");
    // control
    wr(REG_CTRL, 32'h1);
    check(nswap == 1 && nclr == 0, "swap pulse");
    wr(REG_CTRL, 32'h2);
    check(nswap == 1 && nclr == 1, "clear pulse");
    wr(REG_STATUS, 32'h3);
    check(nswap == 1 && nclr == 1 && ngo == 2, "status is read-only");
    // status layout
    for (int k = 0; k < 8; k++) begin
      logic [31:0] expv;
      st = board_status_t'({$urandom, $urandom, $urandom});
      expv = {st.cmd_busy, st.act, st.wr_buf, st.overflow, st.pkt_active,
              st.swap_pending, st.closed_buf, 9'b0, st.pkt_count};
      rd(REG_STATUS, 0, r);
      check(r == expv, $sformatf("STATUS %h expected %h", r, expv));
      rd(REG_CLOSED, 0, r);
      check(r == {st.closed_words, st.closed_pkts}, "CLOSED");
      rd(REG_WORDS, 0, r);
      check(r == {16'b0, st.word_count}, "WORDS");
      mem_rdata = $urandom;
      rd(REG_CMD, 1, r);
      check(r == mem_rdata, "SRAM data passed through");
    end
    rd(reg_idx_e'(3'd7), 0, r);
    check(r == 0, "unused index reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
