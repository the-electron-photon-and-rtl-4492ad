// slink_src_fpga_tb - sends blocks from a RAM model to an S-link receiver
// model that raises link-full at random: every word arrives once and in
// order, only the first and last are control words, nothing is written while
// the link is full or down, and with the link free the rate is one word per
// clock.
`timescale 1ns / 1ps
module slink_src_fpga_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n, go, ram_en, uctrl_n, uwen_n, lff_n, ldown_n, busy;
  logic [RAM_AW-1:0] last_addr, ram_addr;
  logic [RAM_DW-1:0] ram_rdata;
  logic [31:0] ud;
  logic [31:0] mem [128];
  logic [31:0] rx[$];
  bit rxc[$];
  int checks = 0, failures = 0, bad_write, pc, first_edge, last_edge;
  bit random_full;

  always #5 clk = !clk;

  slink_src_fpga dut (.*);

  always @(posedge clk) if (ram_en) ram_rdata <= mem[ram_addr[6:0]];

  // receiver: the link-full flag as seen by the sender when it wrote
  logic lff_q, ldown_q;
  always @(posedge clk) begin
    if (!uwen_n) begin
      if (!lff_q || !ldown_q) bad_write++;
      if (rx.size() == 0) first_edge = pc;
      last_edge = pc;
      rx.push_back(ud); rxc.push_back(!uctrl_n);
    end
    lff_q <= lff_n; ldown_q <= ldown_n;
    pc++;
  end
  always @(negedge clk) lff_n <= random_full ? ($urandom % 3 != 0) : 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int last);
    rx.delete(); rxc.delete(); bad_write = 0;
    last_addr = RAM_AW'(last);
    go = 1; @(negedge clk); go = 0;
    repeat (4 * (last + 1) + 20) @(negedge clk);
    check(!busy, "busy after the block");
    check(rx.size() == last + 1, $sformatf("received %0d words", rx.size()));
    foreach (rx[i]) begin
      check(rx[i] == mem[i], $sformatf("word %0d = %h", i, rx[i]));
      check(rxc[i] == (i == 0 || i == last), $sformatf("control flag of word %0d", i));
    end
    check(bad_write == 0, "write while link full");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) mem[i] = $urandom;
    rst_n = 0; go = 0; ldown_n = 1; random_full = 0; last_addr = '0; pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(49);
    check(last_edge - first_edge == 49, $sformatf("full rate: 50 words in %0d clocks", last_edge - first_edge + 1));
    random_full = 1;
    send(99);
    random_full = 0;
    // link down holds the data back
    ldown_n = 0;
    rx.delete(); last_addr = 15'd9; go = 1; @(negedge clk); go = 0;
    repeat (30) @(negedge clk);
    check(rx.size() == 0, "sent while link down");
    ldown_n = 1;
    repeat (30) @(negedge clk);
    check(rx.size() == 10 && rx[9] == mem[9], "block sent after link up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
