// tb_hxd_gse_full: the nine-board GSE and the pile-up detectors at their
// default sizes and timing: 20 MHz, 7.6 us command Clock, 30 ms Act,
// 256 kbyte index and data blocks, 9.4 us peak-hold gate.
//
// The run, with the analog-board data Clock at its nominal 7.63 us period
// except where noted:
//   1. a command to every board, then a hardware command to the ACU board,
//      whose Act must last 30 ms;
//   2. a 16-byte observational packet from every board at once, and a
//      monitor packet from the TPU boards;
//   3. swap and read back every board over VME;
//   4. board 5 fills its whole 64K-word data block with 256 packets of
//      1 kbyte (2.5 MHz data Clock); one more packet must overflow, and the
//      SRAM must hold every stored word;
//   5. board 6 fills its index block with 32768 one-bit packets; the next
//      packet must overflow;
//   6. one clean and one piled-up event on each of the 16 pile-up detectors.
// Every mechanism is counted, and one that never happened counts as a
// failure.
`timescale 1ns/1ps
module tb_hxd_gse_full;
  import gse_pkg::*;
  localparam int NB = 9, NP = 16, DW = 65536, IW = 65536;
  localparam int ACU = 8;
  logic clk = 0, clk10 = 0, rst_n = 0;
  logic [31:2] va; logic ds_n, wr_n, dtack_n, doe; logic [31:0] vdi, vdo;
  logic [NB-1:0] cd, ce, cc, act, stored, soe, sce, swe, soen;
  logic [NB-1:0] dd = '0, de = '0, dc = '0;
  mem_addr_t sa [NB]; mem_word_t sdo [NB], sdi [NB];
  logic [NP-1:0] trig = '0, gate, dbl, dlatch, dlatched;
  int checks = 0, failures = 0;

  hxd_gse_system dut (
    .clk, .rst_n, .vme_addr(va), .vme_ds_n(ds_n), .vme_write_n(wr_n),
    .vme_data_in(vdi), .vme_data_out(vdo), .vme_data_oe(doe),
    .vme_dtack_n(dtack_n), .ae_cmd_data(cd), .ae_cmd_enable(ce),
    .ae_cmd_clock(cc), .ae_act(act), .ae_dat_data(dd), .ae_dat_enable(de),
    .ae_dat_clock(dc), .pkt_stored(stored), .sram_addr(sa), .sram_dq_out(sdo),
    .sram_dq_oe(soe), .sram_dq_in(sdi), .sram_ce_n(sce), .sram_we_n(swe),
    .sram_oe_n(soen), .clk10, .anode_trig(trig), .ph_gate(gate),
    .dbl_flag(dbl), .dbl_latch(dlatch), .dbl_latched(dlatched));

  vme_master_model host (.addr(va), .ds_n, .write_n(wr_n), .wdata(vdi),
                         .rdata(doe ? vdo : 32'h0), .dtack_n);

  // per board: SRAM and command receiver
  logic [15:0] rx_cmd [NB];
  int rx_bits [NB], rx_n [NB], nact [NB], cont [NB];
  for (genvar b = 0; b < NB; b++) begin : g_b
    sram_model #(.AW(18)) ram (.addr(sa[b]), .dq_out(sdo[b]), .dq_oe(soe[b]),
                               .dq_in(sdi[b]), .ce_n(sce[b]), .we_n(swe[b]),
                               .oe_n(soen[b]));
    ae_cmd_rx_model rx (.data(cd[b]), .enable(ce[b]), .clock(cc[b]), .act(act[b]));
    always @(negedge ce[b]) if (rst_n) begin
      #1 rx_cmd[b] = rx.last_cmd; rx_bits[b] = rx.last_nbits; rx_n[b]++;
    end
    always @(negedge act[b]) if (rst_n) #1 nact[b]++;
    always @(posedge clk)
      if (dut.g_board[b].u_board.mreq[0].req && dut.g_board[b].u_board.mreq[1].req)
        cont[b]++;
  end

  always #25 clk = ~clk;
  always #50 clk10 = ~clk10;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int m_cmd = 0, m_act = 0, m_stored = 0, m_partial = 0, m_id0 = 0, m_id1 = 0;
  int m_swap = 0, m_swap_deferred = 0, m_overflow_data = 0, m_overflow_index = 0;
  int m_vme_read = 0, m_contention = 0, m_concurrent = 0, m_single = 0, m_dbl = 0;
  always @(posedge clk) if (rst_n) begin
    m_stored += $countones(stored);
    if ($countones(de) > 1) m_concurrent++;
  end
  always @(posedge clk10) if (rst_n)
    for (int p = 0; p < NP; p++) if (dlatch[p]) begin
      if (dlatched[p]) m_dbl++; else m_single++;
    end

  function automatic logic [31:0] bbase(input int b);
    return 32'h1000_0000 | (32'(b) << 24);
  endfunction
  function automatic logic [31:0] sram_off(input logic bf, input logic blk, input int w);
    return 32'h0010_0000 | {12'b0, bf, blk, 16'(w), 2'b00};
  endfunction

  // one host, several bench processes: take turns on the bus, first come
  // first served
  int next_ticket = 0, serving = 0;
  task automatic lock();
    int my = next_ticket++;
    while (serving != my) @(posedge clk);
  endtask

  task automatic vread(input int b, input logic [31:0] off, output logic [31:0] d);
    bit ok;
    lock();
    host.read32(bbase(b) | off, d, ok);
    serving++;
    check(ok, $sformatf("board %0d DTACK on read %h", b, off));
    if (off[20]) m_vme_read++;
  endtask
  task automatic vwrite(input int b, input logic [31:0] off, input logic [31:0] d);
    bit ok;
    lock();
    host.write32(bbase(b) | off, d, ok);
    serving++;
    check(ok, $sformatf("board %0d DTACK on write %h", b, off));
  endtask

  task automatic command(input int b, input logic [15:0] c, input bit hw);
    logic [31:0] s;
    int n0 = rx_n[b], a0 = nact[b];
    vwrite(b, 32'h0, {15'b0, hw, c});
    do vread(b, 32'h4, s); while (s[31]);
    #10;
    check(rx_n[b] == n0 + 1 && rx_cmd[b] == c && rx_bits[b] == 16,
          $sformatf("board %0d command %h received as %h", b, c, rx_cmd[b]));
    m_cmd++;
    if (hw && b == ACU) begin
      check(nact[b] == a0 + 1, "ACU Act pulse");
      m_act++;
    end else check(nact[b] == a0, $sformatf("board %0d: no Act", b));
  endtask

  // expected contents, per board and buffer side
  logic [31:0] expw  [NB][$];
  int          expn  [NB][$];
  int          expp  [NB][$];
  bit          expid [NB][$];
  bit          cur_buf [NB];

  task automatic send(input int b, input int n, input int half_ns, input int id = -1);
    logic bits [8192];
    logic [31:0] w;
    for (int i = 0; i < n; i++) bits[i] = 1'($urandom);
    if (id >= 0) bits[0] = 1'(id);
    expn[b].push_back(n); expp[b].push_back(expw[b].size()); expid[b].push_back(bits[0]);
    for (int i = 0; i < n; i += 32) begin
      w = '0;
      for (int j = 0; j < 32; j++) w[31-j] = (i + j < n) ? bits[i+j] : 1'b0;
      expw[b].push_back(w);
    end
    if (n % 32 != 0) m_partial++;
    if (bits[0]) m_id1++; else m_id0++;
    de[b] = 1;
    #(half_ns);
    for (int i = 0; i < n; i++) begin
      dd[b] = bits[i];
      #(half_ns); dc[b] = 1;
      #(half_ns); dc[b] = 0;
    end
    #(half_ns);
    de[b] = 0; dd[b] = 0;
    #(30 * 50);
  endtask

  task automatic forget(input int b);
    expw[b].delete(); expn[b].delete(); expp[b].delete(); expid[b].delete();
  endtask

  task automatic swap(input int b);
    logic [31:0] s;
    vwrite(b, 32'h8, 32'h1);
    do vread(b, 32'h4, s); while (s[26]);
    check(s[29] == !cur_buf[b] && s[25] == cur_buf[b], $sformatf("board %0d swapped", b));
    vread(b, 32'hC, s);
    check(s == {16'(expw[b].size()), 16'(expn[b].size())},
          $sformatf("board %0d closed buffer %h", b, s));
    cur_buf[b] = !cur_buf[b];
    m_swap++;
  endtask

  // read back the closed buffer and compare
  task automatic verify(input int b);
    logic [31:0] d;
    logic bf = !cur_buf[b];
    for (int p = 0; p < expn[b].size(); p++) begin
      vread(b, sram_off(bf, 1'b0, 2 * p), d);
      check(d == {expid[b][p], 15'b0, 16'(expn[b][p])},
            $sformatf("board %0d size word %0d: %h", b, p, d));
      vread(b, sram_off(bf, 1'b0, 2 * p + 1), d);
      check(d == 32'(expp[b][p]), $sformatf("board %0d pointer %0d: %h", b, p, d));
    end
    for (int i = 0; i < expw[b].size(); i++) begin
      vread(b, sram_off(bf, 1'b1, i), d);
      check(d == expw[b][i], $sformatf("board %0d data word %0d", b, i));
    end
    forget(b);
  endtask

  task automatic pile(input int p, input int dt_clk10);
    @(negedge clk10); trig[p] = 1; @(negedge clk10); trig[p] = 0;
    if (dt_clk10 > 0) begin
      repeat (dt_clk10 - 1) @(negedge clk10);
      trig[p] = 1; @(negedge clk10); trig[p] = 0;
    end
  endtask

  int ndone = 0, phase = 0;
  localparam int SLOW = 3815;          // half of the 7.63 us data Clock, ns

  for (genvar b = 0; b < NB; b++) begin : g_send
    initial begin
      wait (phase == 1);
      send(b, 128, SLOW, 0);
      if (b >= 4 && b < 8) send(b, 96, SLOW, 1);
      ndone++;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_pile
    initial begin
      wait (phase == 2);
      pile(p, 0);
      repeat (120) @(negedge clk10);
      pile(p, 20 + 4 * p);
      repeat (120) @(negedge clk10);
      ndone++;
    end
  end

  initial begin
    logic [31:0] s;
    int nbad;
    foreach (cur_buf[b]) begin cur_buf[b] = 0; rx_n[b] = 0; nact[b] = 0; cont[b] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. commands
    for (int b = 0; b < NB; b++) command(b, 16'(16'h2000 + b * 16'h0123), 0);
    command(ACU, 16'h8005, 1);
    check(g_b[ACU].rx.act_len == 600000 * 50.0,
          $sformatf("Act lasted %0t ns", g_b[ACU].rx.act_len));

    // 2. packets from all boards at once
    phase = 1;
    wait (ndone == NB);

    // 3. swap and read back
    for (int b = 0; b < NB; b++) begin swap(b); verify(b); end

    // 4. fill board 5's data block
    for (int k = 0; k < 256; k++) send(5, 8192, 200);
    vread(5, 32'h4, s);
    check(!s[28] && s[15:0] == 256, $sformatf("board 5 full, status %h", s));
    vread(5, 32'h10, s);
    check(s[15:0] == 16'd0, "word pointer at the block end");
    send(5, 64, 150);
    vread(5, 32'h4, s);
    check(s[28] && s[15:0] == 256, $sformatf("board 5 data overflow %h", s));
    if (s[28]) m_overflow_data++;
    repeat (2) void'(expw[5].pop_back());
    void'(expn[5].pop_back()); void'(expp[5].pop_back()); void'(expid[5].pop_back());
    nbad = 0;
    for (int i = 0; i < DW; i++)
      if (g_b[5].ram.mem[{cur_buf[5], 1'b1, 16'(i)}] != expw[5][i]) nbad++;
    for (int p = 0; p < 256; p++) begin
      if (g_b[5].ram.mem[{cur_buf[5], 1'b0, 16'(2 * p)}] !=
          {expid[5][p], 15'b0, 16'(expn[5][p])}) nbad++;
      if (g_b[5].ram.mem[{cur_buf[5], 1'b0, 16'(2 * p + 1)}] != 32'(expp[5][p])) nbad++;
    end
    check(nbad == 0, $sformatf("board 5: %0d SRAM words differ", nbad));
    vread(5, sram_off(cur_buf[5], 1'b1, DW - 1), s);
    check(s == expw[5][DW - 1], "last data word read over VME");
    forget(5);

    // 5. fill board 6's index block
    for (int k = 0; k < IW / 2; k++) send(6, 1, 150);
    vread(6, 32'h4, s);
    check(!s[28] && s[15:0] == 16'((IW / 2) % 65536), $sformatf("board 6 index full, status %h", s));
    send(6, 1, 150);
    vread(6, 32'h4, s);
    check(s[28], $sformatf("board 6 index overflow %h", s));
    if (s[28]) m_overflow_index++;
    vread(6, sram_off(cur_buf[6], 1'b0, IW - 1), s);
    check(s == 32'(IW / 2 - 1), $sformatf("last packet pointer %h", s));
    forget(6);

    // 6. pile-up detectors
    phase = 2;
    wait (ndone == NB + NP);
    check(m_single == NP && m_dbl == NP,
          $sformatf("pile-up: %0d single, %0d flagged", m_single, m_dbl));

    $display("mechanisms: cmd=%0d act=%0d stored=%0d partial=%0d id0=%0d id1=%0d swap=%0d ovf_data=%0d ovf_index=%0d vme_reads=%0d concurrent=%0d single=%0d dbl=%0d",
             m_cmd, m_act, m_stored, m_partial, m_id0, m_id1, m_swap,
             m_overflow_data, m_overflow_index, m_vme_read,
             m_concurrent, m_single, m_dbl);
    check(m_cmd > 0, "commands happened");
    check(m_act > 0, "Act happened");
    check(m_stored > 0, "packets stored");
    check(m_id0 > 0 && m_id1 > 0, "both data kinds happened");
    check(m_swap > 0, "swap happened");
    check(m_overflow_data > 0, "data overflow happened");
    check(m_overflow_index > 0, "index overflow happened");
    check(m_vme_read > 0, "SRAM read over VME happened");
    check(m_concurrent > 0, "concurrent packets happened");
    check(m_single > 0 && m_dbl > 0, "pile-up cases happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
