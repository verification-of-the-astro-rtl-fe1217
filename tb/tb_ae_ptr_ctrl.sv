// tb_ae_ptr_ctrl: self-checking test of pointer handling and the A/B buffer.
//
// A memory model in the bench acknowledges requests after a random delay and
// keeps every write. A reference model in the bench tracks where each word,
// size and packet pointer should go: words one after another in the data
// block, size at index word 2n, start pointer at 2n+1. Small blocks (16 data
// words, 8 index words) let the bench reach both overflow cases. Checked:
// memory contents, counters, the swap (deferred while a packet is active),
// the overflow flag and that nothing is written past a full block.
`timescale 1ns/1ps
module tb_ae_ptr_ctrl;
  import gse_pkg::*;
  localparam int DW = 16, IW = 8;
  logic clk = 0, rst_n = 0;
  logic word_done = 0, pkt_done = 0, pkt_id = 0, pkt_active = 0;
  logic swap_req = 0, clr_ovf = 0;
  logic [31:0] word = '0;
  logic [15:0] pkt_bits = '0;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic wr_buf, overflow, swap_pending, pkt_stored;
  logic [15:0] pkt_count, word_count, closed_pkts, closed_words;
  logic closed_buf;
  int checks = 0, failures = 0;

  ae_ptr_ctrl #(.DATA_WORDS(DW), .INDEX_WORDS(IW)) dut (
    .clk, .rst_n, .word_done, .word, .pkt_done, .pkt_bits, .pkt_id,
    .pkt_active, .swap_req, .clr_ovf, .mem_req(mreq), .mem_rsp(mrsp),
    .wr_buf, .overflow, .swap_pending, .pkt_stored, .pkt_count, .word_count,
    .closed_buf, .closed_pkts, .closed_words);

  always #25 clk = ~clk;

  // memory model with random acknowledge delay
  logic [31:0] mem [logic [17:0]];
  int bad_writes = 0;
  initial mrsp = '0;
  always begin
    @(posedge clk);
    if (rst_n && mreq.req && !mrsp.ack) begin
      repeat ($urandom_range(1, 4)) @(posedge clk);
      if (mreq.we) begin
        mem[mreq.addr] = mreq.wdata;
        if (mreq.addr[16] && mreq.addr[15:0] >= DW) bad_writes++;
        if (!mreq.addr[16] && mreq.addr[15:0] >= IW) bad_writes++;
      end
      mrsp.ack <= 1'b1;
      @(posedge clk);
      while (mreq.req) @(posedge clk);
      mrsp.ack <= 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  int rb = 0, rw = 0, ri = 0, rstart = 0, rpkts = 0;
  bit rbad = 0, rovf = 0;

  task automatic send_packet(input int nwords, input bit id);
    logic [31:0] w;
    pkt_active = 1;
    for (int i = 0; i < nwords; i++) begin
      w = $urandom;
      @(negedge clk); word = w; word_done = 1;
      @(negedge clk); word_done = 0;
      if (rw < DW) begin
        repeat (12) @(negedge clk);
        check(mem.exists({1'(rb), 1'b1, 16'(rw)}) && mem[{1'(rb), 1'b1, 16'(rw)}] == w,
              $sformatf("data word buf %0d word %0d", rb, rw));
        rw++;
      end else begin
        rbad = 1; rovf = 1;
        repeat (12) @(negedge clk);
      end
    end
    @(negedge clk); pkt_done = 1; pkt_bits = 16'(nwords * 32); pkt_id = id;
    pkt_active = 0;
    @(negedge clk); pkt_done = 0;
    repeat (20) @(negedge clk);
    if (rbad || ri + 2 > IW) begin
      rovf = 1; rbad = 0;
    end else begin
      check(mem[{1'(rb), 1'b0, 16'(ri)}] == {id, 15'b0, 16'(nwords * 32)},
            $sformatf("size word at index %0d", ri));
      check(mem[{1'(rb), 1'b0, 16'(ri + 1)}] == 32'(rstart),
            $sformatf("pointer word at index %0d", ri + 1));
      ri += 2; rpkts++;
    end
    rstart = rw;
    check(overflow == rovf, $sformatf("overflow flag %0b", overflow));
    check(pkt_count == 16'(rpkts) && word_count == 16'(rw),
          $sformatf("counters %0d/%0d expected %0d/%0d", pkt_count, word_count, rpkts, rw));
  endtask

  task automatic swap();
    @(negedge clk); swap_req = 1;
    @(negedge clk); swap_req = 0;
    repeat (4) @(negedge clk);
    check(closed_buf == 1'(rb) && closed_pkts == 16'(rpkts) && closed_words == 16'(rw),
          "closed buffer summary");
    rb ^= 1; rw = 0; ri = 0; rstart = 0; rpkts = 0; rovf = 0;
    check(wr_buf == 1'(rb) && !overflow && !swap_pending, "swapped");
  endtask

  int nst = 0;
  always @(posedge clk) if (rst_n && pkt_stored) nst++;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    check(wr_buf == 0 && pkt_count == 0, "reset state");
    send_packet(2, 0);
    send_packet(4, 1);
    send_packet(1, 0);
    swap();                              // A -> B
    send_packet(3, 0);
    // swap request during an active packet must wait for its end
    pkt_active = 1;
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    repeat (10) @(negedge clk);
    check(swap_pending && wr_buf == 1, "swap deferred while packet active");
    pkt_active = 0;
    repeat (4) @(negedge clk);
    check(!swap_pending && wr_buf == 0, "deferred swap done");
    rb = 0; rw = 0; ri = 0; rstart = 0; rpkts = 0; rovf = 0;
    // data block overflow: 16 words fit, the rest is dropped
    send_packet(6, 0);
    send_packet(6, 1);
    send_packet(6, 0);                   // loses 2 words: no index entry
    send_packet(1, 0);                   // data full: dropped
    check(bad_writes == 0, "no write past a block end");
    @(negedge clk); clr_ovf = 1; @(negedge clk); clr_ovf = 0; rovf = 0;
    @(negedge clk);
    check(!overflow, "overflow cleared");
    swap();                              // A -> B
    // index overflow: 8 index words hold 4 packets
    for (int k = 0; k < 5; k++) send_packet(1, 1);
    check(bad_writes == 0, "no write past the index block");
    check(nst == 13, $sformatf("%0d packet-stored pulses", nst));
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
