// tb_mem_ctrl: self-checking test of the SRAM sequencer.
//
// Two requester processes (port 0 = AE path, port 1 = VME) write and read
// random words through mem_ctrl into the SRAM model. Checked: read data
// equals what was written last, ack comes SETUP + ACTIVE + 1 clocks after
// the request when the controller is free, port 0 goes first when both ask
// at once, and WE stays low for exactly ACTIVE_CYCLES clocks.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import gse_pkg::*;
  localparam int SU = 1, AC = 2;
  logic clk = 0, rst_n = 0;
  mem_req_t req [2];
  mem_rsp_t rsp [2];
  logic m_sel;
  mem_addr_t a; mem_word_t dout, din; logic oe, ce_n, we_n, oe_n;
  int checks = 0, failures = 0;

  mem_ctrl #(.SETUP_CYCLES(SU), .ACTIVE_CYCLES(AC)) dut (
    .clk, .rst_n, .req, .rsp, .m_sel, .sram_addr(a), .sram_dq_out(dout),
    .sram_dq_oe(oe), .sram_dq_in(din), .sram_ce_n(ce_n), .sram_we_n(we_n),
    .sram_oe_n(oe_n));
  sram_model #(.AW(18)) ram (.addr(a), .dq_out(dout), .dq_oe(oe), .dq_in(din),
                             .ce_n, .we_n, .oe_n);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // WE low width
  int we_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (!we_n) we_len++;
    else if (we_len != 0) begin
      check(we_len == AC, $sformatf("WE low for %0d cycles", we_len));
      we_len = 0;
    end
  end

  int order [$];

  task automatic access(input int p, input bit we, input mem_addr_t ad,
                        input mem_word_t wd, output mem_word_t rd, output int lat);
    int t0;
    @(negedge clk);
    req[p] = '{req: 1'b1, we: we, addr: ad, wdata: wd};
    t0 = cyc;
    do @(posedge clk); while (!rsp[p].ack);
    lat = cyc - t0;
    rd = rsp[p].rdata;
    order.push_back(p);
    @(negedge clk);
    req[p].req = 1'b0;
  endtask

  mem_word_t model [mem_addr_t];

  initial begin
    mem_word_t rd, wd; mem_addr_t ad; int lat;
    req[0] = '0; req[1] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      int p = int'($urandom_range(0, 1));
      ad = mem_addr_t'($urandom_range(0, 63));
      if ($urandom_range(0, 1) == 1 || !model.exists(ad)) begin
        wd = $urandom;
        access(p, 1'b1, ad, wd, rd, lat);
        model[ad] = wd;
      end else begin
        access(p, 1'b0, ad, '0, rd, lat);
        check(rd == model[ad], $sformatf("read %h: %h expected %h", ad, rd, model[ad]));
      end
      check(lat == SU + AC + 1, $sformatf("latency %0d", lat));
      repeat (2) @(negedge clk);
    end
    // both ports at once: port 0 first
    order.delete();
    fork
      begin mem_word_t r; int l; access(1, 1'b0, 18'd5, '0, r, l); end
      begin mem_word_t r; int l; access(0, 1'b1, 18'd7, 32'hCAFE0007, r, l); end
    join
    check(order.size() == 2 && order[0] == 0 && order[1] == 1, "port 0 has priority");
    check(ram.mem[7] == 32'hCAFE0007, "priority write landed");
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
