// slink_dst_fpga_tb - an S-link sender model that pauses on XOFF after a
// link delay delivers words into the destination FPGA: words land at
// consecutive RAM addresses, data and control words are counted, XOFF rises
// before the memory is full so no word is lost, a sender that ignores XOFF
// causes an overflow, forced XOFF and clear work.
`timescale 1ns / 1ps
module slink_dst_fpga_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n, en, force_xoff, clr, lctrl_n, lwen_n, uxoff_n, ram_en, ram_we, full, overflow;
  logic [RAM_AW-1:0] last_addr, ram_addr;
  logic [31:0] ld;
  logic [RAM_DW-1:0] ram_wdata;
  logic [15:0] word_count, ctrl_count;
  logic [31:0] mem [64];
  logic [2:0] xoff_pipe;     // XOFF reaches the sender 3 clocks late
  int checks = 0, failures = 0, sent;
  bit obey;

  always #5 clk = !clk;

  slink_dst_fpga #(.XOFF_MARGIN(4)) dut (.*);

  always @(posedge clk) if (ram_en && ram_we) mem[ram_addr[5:0]] <= ram_wdata;

  // sender: one word per clock unless it sees XOFF
  always @(posedge clk) begin
    xoff_pipe <= {xoff_pipe[1:0], !uxoff_n};
    if (en && (!obey || !xoff_pipe[2]) && sent < 60) begin
      lwen_n  <= 1'b0;
      ld      <= 32'hA000_0000 + 32'(sent);
      lctrl_n <= !(sent == 0);
      sent++;
    end else begin
      lwen_n  <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; force_xoff = 0; clr = 0; last_addr = 15'd31; obey = 1; sent = 0;
    lwen_n = 1; lctrl_n = 1; ld = '0; xoff_pipe = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. a sender obeying XOFF fills exactly 32 words, no loss
    en = 1;
    repeat (100) @(negedge clk);
    check(full && !uxoff_n, "full with XOFF asserted");
    check(!overflow, "overflow although sender obeyed XOFF");
    check(word_count == 31 && ctrl_count == 1, $sformatf("counts %0d/%0d", word_count, ctrl_count));
    for (int i = 0; i < 32; i++) check(mem[i] == 32'hA000_0000 + 32'(i), $sformatf("word %0d", i));
    check(sent == 32 + 0 || sent <= 32 + 3, $sformatf("sender stopped after %0d", sent));
    // 2. clear, sender ignoring XOFF overflows
    en = 0; clr = 1; @(negedge clk); clr = 0;
    check(uxoff_n && word_count == 0 && !full, "clear");
    sent = 0; obey = 0; en = 1;
    repeat (100) @(negedge clk);
    check(overflow && full, "overflow when XOFF ignored");
    // 3. forced XOFF on an empty memory
    en = 0; clr = 1; @(negedge clk); clr = 0;
    force_xoff = 1; @(negedge clk); @(negedge clk);
    check(!uxoff_n, "forced XOFF");
    force_xoff = 0; @(negedge clk); @(negedge clk);
    check(uxoff_n, "XOFF released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
