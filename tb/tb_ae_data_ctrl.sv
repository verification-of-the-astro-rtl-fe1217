// tb_ae_data_ctrl: self-checking test of the packet deserialiser.
//
// An analog-board model sends packets of various lengths: 2 bits (the bench
// test), 16 bytes (an observational event), 32 and 33 bits, and random
// lengths up to 1 kbyte. The expected words are packed independently from the
// same bit array, MSB first, with the last word left-aligned. Checked: every
// word, the word count, the bit count, the identification bit, and that
// packet done comes within 8 clocks of Enable falling.
`timescale 1ns/1ps
module tb_ae_data_ctrl;
  logic clk = 0, rst_n = 0;
  logic d, en, ck;
  logic word_done, pkt_done, pkt_id, pkt_active;
  logic [31:0] word;
  logic [15:0] pkt_bits;
  int checks = 0, failures = 0;

  ae_data_ctrl dut (.clk, .rst_n, .ae_data(d), .ae_enable(en), .ae_clock(ck),
                    .word_done, .word, .pkt_done, .pkt_bits, .pkt_id,
                    .pkt_active);
  ae_tx_model tx (.data(d), .enable(en), .clock(ck));

  always #25 clk = ~clk;

  logic [31:0] got [$];
  int cyc = 0, done_cyc = -1, en_fall_cyc = -1;
  logic en_q = 0;
  logic [15:0] got_bits; logic got_id;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    en_q <= en;
    if (!en && en_q) en_fall_cyc = cyc;
    if (word_done) got.push_back(word);
    if (pkt_done) begin done_cyc = cyc; got_bits = pkt_bits; got_id = pkt_id; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic bits [8192];

  task automatic run(input int n, input int half_ns, input int id = -1);
    logic [31:0] exp [$];
    logic [31:0] w;
    for (int i = 0; i < n; i++) bits[i] = 1'($urandom);
    if (id >= 0) bits[0] = 1'(id);
    for (int i = 0; i < n; i += 32) begin
      w = '0;
      for (int j = 0; j < 32; j++) w[31-j] = (i + j < n) ? bits[i+j] : 1'b0;
      exp.push_back(w);
    end
    got.delete(); done_cyc = -1;
    tx.send(bits, n, half_ns);
    repeat (12) @(posedge clk);
    check(got.size() == exp.size(),
          $sformatf("n=%0d: %0d words, expected %0d", n, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("n=%0d word %0d: %h expected %h",
                                         n, i, got[i], exp[i]));
    check(done_cyc > 0 && done_cyc - en_fall_cyc <= 8,
          $sformatf("n=%0d: packet done %0d cycles after Enable", n,
                    done_cyc - en_fall_cyc));
    check(got_bits == 16'(n), $sformatf("n=%0d: bit count %0d", n, got_bits));
    check(n == 0 || got_id == bits[0], "identification bit");
    check(!pkt_active, "back in Idle");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    run(2, 500);          // bench test: 1 MHz Clock, 2-bit Enable
    run(128, 200);        // 16-byte observational event
    run(32, 200);
    run(33, 200);
    run(64, 150, 1);      // monitor data: identification bit high
    run(64, 150, 0);      // observational data: identification bit low
    for (int k = 0; k < 5; k++) run(1 + int'($urandom_range(0, 299)), 150);
    run(8192, 150);       // largest packet, 1 kbyte
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
