// fpga_config_port_tb - a slave-serial receiver model captures DIN on rising
// CCLK: bytes arrive MSB first, eight clocks per byte, busy covers the byte,
// PROG* goes low for the set time, INIT*/DONE are passed back, and the
// motherboard EEPROM is disabled for a site whose card has its own.
`timescale 1ns / 1ps
module fpga_config_port_tb;
  logic clk = 1'b0;
  logic rst_n, wr, prog_req, cclk, din, prog_n, init_n, done, busy, init_n_q, done_q;
  logic [7:0] wdata;
  logic [1:0] dc_prom_present_n, mb_prom_ce_n;
  logic [7:0] shreg;
  int nbits, checks = 0, failures = 0, prog_low;

  always #5 clk = !clk;

  fpga_config_port #(.PROG_CYCLES(16)) dut (.*);

  always @(posedge cclk) begin shreg = {shreg[6:0], din}; nbits++; end
  always @(posedge clk) if (!prog_n) prog_low++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] bytes [4] = '{8'hA5, 8'h3C, 8'hFF, 8'h01};
    rst_n = 0; wr = 0; prog_req = 0; wdata = '0; init_n = 0; done = 0; dc_prom_present_n = 2'b10;
    repeat (3) @(negedge clk);
    rst_n = 1; nbits = 0; prog_low = 0;
    check(mb_prom_ce_n == 2'b01, "site 1 card EEPROM disables the board EEPROM");
    dc_prom_present_n = 2'b11; #1;
    check(mb_prom_ce_n == 2'b00, "board EEPROMs enabled without card EEPROMs");
    prog_req = 1; @(negedge clk); prog_req = 0;
    repeat (30) @(negedge clk);
    check(prog_low == 16, $sformatf("PROG* low for %0d clocks", prog_low));
    init_n = 1; done = 0; repeat (2) @(negedge clk);
    check(init_n_q && !done_q, "INIT* read back");
    foreach (bytes[b]) begin
      nbits = 0;
      wdata = bytes[b]; wr = 1; @(negedge clk); wr = 0;
      check(busy, "busy while shifting");
      wr = 1; wdata = 8'h00; @(negedge clk); wr = 0;   // ignored while busy
      repeat (15) @(negedge clk);
      check(!busy, "busy ends after 16 clocks");
      repeat (2) @(negedge clk);
      check(nbits == 8 && shreg == bytes[b], $sformatf("byte %0d received %h bits %0d", b, shreg, nbits));
    end
    done = 1; repeat (2) @(negedge clk);
    check(done_q, "DONE read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
