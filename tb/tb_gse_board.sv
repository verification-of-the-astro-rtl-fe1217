// tb_gse_board: end-to-end test of one GSE board (the ACU variant, with Act).
//
// Host model on VME, analog-board models on the command and data lines, and
// the SRAM model. Small timing and block sizes keep it short. Checked:
// commands written over VME arrive bit-exact on the command lines; a hardware
// command gives an Act pulse of the set length; packets are stored and can be
// read back over VME (size and pointer words in the index block, words in
// the data block); the swap reports what the closed buffer holds; a full
// data block sets the overflow bit, stops storing and keeps the stored data;
// the clear bit resets the flag.
`timescale 1ns/1ps
module tb_gse_board;
  import gse_pkg::*;
  localparam int HP = 4, AW = 20, AH = 40, DW = 64, IW = 64;
  localparam logic [31:0] BASE = 32'h1500_0000;   // BASE_HI 1, board 5
  logic clk = 0, rst_n = 0;
  logic [31:2] va; logic ds_n, wr_n, dtack_n, doe; logic [31:0] vdi, vdo;
  logic cd, ce, cc, act, dd, de, dc, pkt_stored;
  mem_addr_t sa; mem_word_t sdo, sdi; logic soe, sce, swe, soen;
  int checks = 0, failures = 0;

  gse_board #(.HAS_ACT(1'b1), .HALF_PERIOD(HP), .ATT_WAIT_CYCLES(AW),
              .ATT_HIGH_CYCLES(AH), .DATA_WORDS(DW), .INDEX_WORDS(IW)) dut (
    .clk, .rst_n, .board_id(4'd5), .vme_addr(va), .vme_ds_n(ds_n),
    .vme_write_n(wr_n), .vme_data_in(vdi), .vme_data_out(vdo),
    .vme_data_oe(doe), .vme_dtack_n(dtack_n),
    .ae_cmd_data(cd), .ae_cmd_enable(ce), .ae_cmd_clock(cc), .ae_act(act),
    .ae_dat_data(dd), .ae_dat_enable(de), .ae_dat_clock(dc),
    .sram_addr(sa), .sram_dq_out(sdo), .sram_dq_oe(soe), .sram_dq_in(sdi),
    .sram_ce_n(sce), .sram_we_n(swe), .sram_oe_n(soen), .pkt_stored);

  sram_model #(.AW(18)) ram (.addr(sa), .dq_out(sdo), .dq_oe(soe), .dq_in(sdi),
                             .ce_n(sce), .we_n(swe), .oe_n(soen));
  vme_master_model host (.addr(va), .ds_n, .write_n(wr_n), .wdata(vdi),
                         .rdata(doe ? vdo : 32'h0), .dtack_n);
  ae_cmd_rx_model rx (.data(cd), .enable(ce), .clock(cc), .act);
  ae_tx_model tx (.data(dd), .enable(de), .clock(dc));

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nstored = 0;
  always @(posedge clk) if (rst_n && pkt_stored) nstored++;

  task automatic vread(input logic [31:0] off, output logic [31:0] d);
    bit ok;
    host.read32(BASE | off, d, ok);
    check(ok, $sformatf("DTACK on read %h", off));
  endtask
  task automatic vwrite(input logic [31:0] off, input logic [31:0] d);
    bit ok;
    host.write32(BASE | off, d, ok);
    check(ok, $sformatf("DTACK on write %h", off));
  endtask
  function automatic logic [31:0] sram_off(input logic b, input logic blk, input int w);
    return 32'h0010_0000 | {12'b0, b, blk, 16'(w), 2'b00};
  endfunction

  task automatic command(input logic [15:0] c, input bit hw);
    logic [31:0] s;
    int n0 = rx.ncmd, a0 = rx.nact;
    vwrite(32'h0, {15'b0, hw, c});
    do vread(32'h4, s); while (s[31]);
    check(rx.ncmd == n0 + 1 && rx.last_cmd == c && rx.last_nbits == 16,
          $sformatf("command %h received as %h (%0d bits)", c, rx.last_cmd, rx.last_nbits));
    check(rx.nact == a0 + (hw ? 1 : 0), "Act only for hardware commands");
    if (hw) check(rx.act_len == AH * 50.0, $sformatf("Act %0t ns", rx.act_len));
  endtask

  // packet store with expected contents
  logic bits [8192];
  logic [31:0] expw [$];
  int  exp_bits [$], exp_ptr [$];
  bit  exp_id [$];

  task automatic packet(input int n);
    int start = expw.size();
    logic [31:0] w;
    for (int i = 0; i < n; i++) bits[i] = 1'($urandom);
    for (int i = 0; i < n; i += 32) begin
      w = '0;
      for (int j = 0; j < 32; j++) w[31-j] = (i + j < n) ? bits[i+j] : 1'b0;
      expw.push_back(w);
    end
    exp_bits.push_back(n); exp_ptr.push_back(start); exp_id.push_back(bits[0]);
    tx.send(bits, n, 200);
    repeat (30) @(posedge clk);
  endtask

  task automatic verify_buffer(input logic b);
    logic [31:0] d;
    for (int p = 0; p < exp_bits.size(); p++) begin
      vread(sram_off(b, 1'b0, 2 * p), d);
      check(d == {exp_id[p], 15'b0, 16'(exp_bits[p])}, $sformatf("size word %0d: %h", p, d));
      vread(sram_off(b, 1'b0, 2 * p + 1), d);
      check(d == 32'(exp_ptr[p]), $sformatf("pointer word %0d: %h", p, d));
    end
    for (int i = 0; i < expw.size(); i++) begin
      vread(sram_off(b, 1'b1, i), d);
      check(d == expw[i], $sformatf("data word %0d: %h expected %h", i, d, expw[i]));
    end
  endtask

  task automatic clear_expect();
    expw.delete(); exp_bits.delete(); exp_ptr.delete(); exp_id.delete();
  endtask

  initial begin
    logic [31:0] s;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    command(16'h1A2B, 0);
    command(16'h8003, 1);
    command(16'hFFFF, 0);
    // packets into buffer A
    packet(128); packet(2); packet(40); packet(33);
    vread(32'h4, s);
    check(s[29] == 1'b0 && s[15:0] == 16'd4, $sformatf("status %h", s));
    vread(32'h10, s);
    check(s[15:0] == 16'(expw.size()), $sformatf("word count %0d", s[15:0]));
    vwrite(32'h8, 32'h1);                         // swap A -> B
    repeat (5) @(posedge clk);
    vread(32'hC, s);
    check(s == {16'(expw.size()), 16'd4}, $sformatf("closed %h", s));
    vread(32'h4, s);
    check(s[29] == 1'b1 && s[25] == 1'b0 && s[15:0] == 0, $sformatf("after swap %h", s));
    verify_buffer(1'b0);
    // buffer B: fill the data block (64 words) with 4-word packets
    clear_expect();
    for (int k = 0; k < 16; k++) packet(128);
    vread(32'h4, s);
    check(!s[28] && s[15:0] == 16, "full but not overflowed");
    verify_buffer(1'b1);
    packet(128);                                   // does not fit
    vread(32'h4, s);
    check(s[28] && s[15:0] == 16, $sformatf("overflow: status %h", s));
    exp_bits.pop_back(); exp_ptr.pop_back(); exp_id.pop_back();
    repeat (4) void'(expw.pop_back());
    verify_buffer(1'b1);                           // nothing overwritten
    vwrite(32'h8, 32'h2);                          // clear overflow
    vread(32'h4, s);
    check(!s[28], "overflow cleared");
    check(nstored == 21, $sformatf("%0d packets stored or dropped", nstored));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
