// tb_vme_addr_ctrl: self-checking test of the VME address decoder and cycle
// sequencer.
//
// A VME master model runs cycles against a board with board_id 3. The bench
// answers SRAM requests from a small memory model. Checked: register writes
// give one reg_wr pulse with the right index, within two clocks of the
// strobe falling; SRAM reads request the word address A[19:2] and latch the
// data; writes to the SRAM window make no request; cycles for other boards
// or another base get no DTACK; DTACK and data enable end with the strobe.
// Then every register index is written and read back with the unused
// address bits set at random, and every other board number is tried.
`timescale 1ns/1ps
module tb_vme_addr_ctrl;
  import gse_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:2] addr; logic ds_n, write_n, dtack_n;
  logic [31:0] wdata;
  logic reg_wr, sel_mem, rd_latch, data_oe;
  reg_idx_e reg_idx;
  mem_req_t mreq; mem_rsp_t mrsp;
  int checks = 0, failures = 0;

  vme_addr_ctrl #(.BASE_HI(4'h1)) dut (
    .clk, .rst_n, .board_id(4'd3), .vme_addr(addr), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_dtack_n(dtack_n), .reg_wr, .reg_idx,
    .sel_mem, .rd_latch, .data_oe, .mem_req(mreq), .mem_rsp(mrsp));

  // read data path as vme_data_ctrl would latch it
  logic [31:0] latched;
  always @(posedge clk) if (rd_latch) latched <= sel_mem ? mrsp.rdata : {29'b0, reg_idx};

  vme_master_model host (.addr, .ds_n, .write_n, .wdata,
                         .rdata(data_oe ? latched : 32'h0), .dtack_n);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model: word = ~address
  int nreq = 0; logic [17:0] last_addr;
  initial mrsp = '0;
  always begin
    @(posedge clk);
    if (rst_n && mreq.req && !mrsp.ack) begin
      nreq++; last_addr = mreq.addr;
      repeat (3) @(posedge clk);
      mrsp <= '{ack: 1'b1, rdata: {14'h3fff, ~mreq.addr}};
      @(posedge clk);
      while (mreq.req) @(posedge clk);
      mrsp.ack <= 1'b0;
    end
  end

  // reg_wr pulses and their delay from the strobe
  int nwr = 0, wr_delay = 0; reg_idx_e wr_idx; realtime ds_fall;
  always @(negedge ds_n) ds_fall = $realtime;
  always @(posedge clk) if (rst_n && reg_wr) begin
    nwr++; wr_idx = reg_idx; wr_delay = int'(($realtime - ds_fall) / 50.0);
  end

  initial begin
    bit ok; logic [31:0] rd;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // register write, index 0 and 2
    host.write32(32'h1300_0000, 32'h1234, ok);
    check(ok && nwr == 1 && wr_idx == REG_CMD, "write to CMD");
    check(wr_delay <= 2, $sformatf("reg_wr %0d clocks after strobe", wr_delay));
    host.write32(32'h1300_0008, 32'h1, ok);
    check(ok && nwr == 2 && wr_idx == REG_CTRL, "write to CTRL");
    check(dtack_n && !data_oe, "DTACK released with the strobe");
    // register read returns the latched index
    host.read32(32'h1300_000C, rd, ok);
    check(ok && rd == 32'd3 && nwr == 2, $sformatf("register read %h", rd));
    // SRAM reads
    for (int i = 0; i < 6; i++) begin
      logic [17:0] wa;
      wa = 18'($urandom);
      host.read32(32'h1310_0000 | {12'b0, wa, 2'b0}, rd, ok);
      check(ok && last_addr == wa && rd == {14'h3fff, ~wa},
            $sformatf("SRAM read %h -> %h", wa, rd));
    end
    check(nreq == 6, "one request per SRAM read");
    // SRAM window write: acknowledged, no request
    host.write32(32'h1310_0040, 32'hDEAD, ok);
    check(ok && nreq == 6 && nwr == 2, "SRAM writes ignored");
    // other board, other base: no DTACK
    host.write32(32'h1400_0000, 32'h1, ok);
    check(!ok && nwr == 2, "board 4 not selected");
    host.read32(32'h2310_0000, rd, ok);
    check(!ok && nreq == 6, "other base not selected");
    // random register writes and reads: every index, unused address bits
    // (A[23:21], A[19:5]) set at random
    for (int i = 0; i < 24; i++) begin
      logic [2:0] idx; logic [31:0] a; int n0;
      idx = 3'(i % 8);
      a = 32'h1300_0000 | {8'b0, 3'($urandom), 1'b0, 15'($urandom), idx, 2'b0};
      n0 = nwr;
      host.write32(a, 32'h5A5A, ok);
      check(ok && nwr == n0 + 1 && wr_idx == reg_idx_e'(idx),
            $sformatf("write to index %0d at %h", idx, a));
      host.read32(a ^ 32'h0000_0020, rd, ok);
      check(ok && rd == {29'b0, idx} && nwr == n0 + 1,
            $sformatf("read index %0d at %h -> %h", idx, a, rd));
    end
    // every other board number: no DTACK, no strobe, no request
    for (int b = 0; b < 16; b++) begin
      if (b == 3) continue;
      host.write32(32'h1000_0000 | (32'(b) << 24), 32'h1, ok);
      check(!ok && nwr == 26, $sformatf("board %0d not selected on write", b));
      host.read32(32'h1010_0000 | (32'(b) << 24), rd, ok);
      check(!ok && nreq == 6, $sformatf("board %0d not selected on read", b));
    end
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
