// run_control_tb - start and stop pulses from each source: VME run bit edges,
// timing card start/stop edges (only when enabled, after synchronisation)
// and TTC broadcast commands (only matching codes, only when enabled).
`timescale 1ns / 1ps
module run_control_tb;
  logic clk = 1'b0;
  logic rst_n, sw_run, ttc_en, ext_en, ttc_brcst_str, ext_start_stop, start, stop;
  logic [5:0] ttc_brcst, start_code, stop_code;
  int checks = 0, failures = 0, nstart, nstop, last_start_edge, pc;

  always #5 clk = !clk;

  run_control dut (.*);

  always @(posedge clk) begin
    if (start) begin nstart++; last_start_edge = pc - 1; end
    if (stop) nstop++;
    pc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_counts(input int s, input int p, input string what);
    repeat (5) @(negedge clk);
    check(nstart == s && nstop == p, $sformatf("%s: starts %0d stops %0d", what, nstart, nstop));
    nstart = 0; nstop = 0;
  endtask

  task automatic brcst(input logic [5:0] code);
    int e;
    ttc_brcst = code; ttc_brcst_str = 1; e = pc; @(negedge clk); ttc_brcst_str = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    rst_n = 0; sw_run = 0; ttc_en = 0; ext_en = 0; ttc_brcst_str = 0; ext_start_stop = 0;
    ttc_brcst = '0; start_code = 6'h11; stop_code = 6'h22; pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; nstart = 0; nstop = 0;
    @(negedge clk);
    sw_run = 1; expect_counts(1, 0, "VME run set");
    sw_run = 0; expect_counts(0, 1, "VME run cleared");
    // timing card, disabled then enabled
    ext_start_stop = 1; expect_counts(0, 0, "external start while disabled");
    ext_start_stop = 0; repeat (4) @(negedge clk); ext_en = 1;
    ext_start_stop = 1; expect_counts(1, 0, "external start");
    ext_start_stop = 0; expect_counts(0, 1, "external stop");
    // TTC broadcast
    brcst(6'h11); expect_counts(0, 0, "broadcast while disabled");
    ttc_en = 1;
    e = pc; brcst(6'h11); repeat (5) @(negedge clk);
    check(nstart == 1 && last_start_edge == e, $sformatf("broadcast start latency %0d", last_start_edge - e));
    nstart = 0;
    brcst(6'h12); expect_counts(0, 0, "other broadcast command");
    brcst(6'h22); expect_counts(0, 1, "broadcast stop");
    ttc_brcst = 6'h11; @(negedge clk); expect_counts(0, 0, "command without strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
