// ctp_emulator_tb - trigger period, no triggers while disabled, and triggers
// withheld and counted as vetoed while the ROD is busy.
`timescale 1ns / 1ps
module ctp_emulator_tb;
  logic clk = 1'b0;
  logic rst_n, en, rod_busy, l1a;
  logic [15:0] period;
  logic [31:0] l1a_count, veto_count;
  int checks = 0, failures = 0, seen, last_edge, pc, gap_bad;

  always #5 clk = !clk;

  ctp_emulator dut (.*);

  always @(posedge clk) begin
    if (l1a) begin
      if (seen > 0 && !rod_busy && (pc - last_edge) != int'(period)) gap_bad++;
      seen++; last_edge = pc;
    end
    pc++;
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
    rst_n = 0; en = 0; rod_busy = 0; period = 16'd10; pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; seen = 0; gap_bad = 0;
    repeat (50) @(negedge clk);
    check(seen == 0 && l1a_count == 0, "trigger while disabled");
    en = 1;
    repeat (101) @(negedge clk);
    check(seen == 10 && l1a_count == 10, $sformatf("10 triggers in 100 clocks, got %0d", seen));
    check(gap_bad == 0, "trigger spacing");
    rod_busy = 1;
    repeat (3) @(negedge clk);
    seen = 0;
    repeat (100) @(negedge clk);
    check(seen == 0, "trigger sent while busy");
    check(veto_count >= 9 && veto_count <= 11, $sformatf("vetoed %0d", veto_count));
    rod_busy = 0;
    repeat (100) @(negedge clk);
    check(seen >= 9 && seen <= 11, $sformatf("triggers after busy %0d", seen));
    check(l1a_count == 32'(10 + seen), "L1A count");
    period = 16'd0; seen = 0;
    repeat (20) @(negedge clk);
    check(seen >= 18, "period 0 triggers every clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
