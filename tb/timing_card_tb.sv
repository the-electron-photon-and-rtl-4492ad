// timing_card_tb - measures the timing card model: 25 ns clock from the
// on-card oscillator, the two de-skewed copies trailing by their delays,
// switching to the front-panel clock and start/stop.
`timescale 1ns / 1ps
module timing_card_tb;
  logic sel_ext, ext_clk, ext_start_stop, int_start_stop;
  logic clk, deskew_clk1, deskew_clk2, start_stop;
  int checks = 0, failures = 0;
  realtime t_clk [$], t_d1 [$], t_d2 [$];

  timing_card #(.PERIOD_NS(25.0), .DESKEW1_NS(5.0), .DESKEW2_NS(10.0)) dut (.*);

  always @(posedge clk) t_clk.push_back($realtime);
  always @(posedge deskew_clk1) t_d1.push_back($realtime);
  always @(posedge deskew_clk2) t_d2.push_back($realtime);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_ext = 0; ext_clk = 0; ext_start_stop = 0; int_start_stop = 0;
    #1000;
    check(t_clk.size() >= 39 && t_clk.size() <= 41, $sformatf("%0d rising edges in 1 us", t_clk.size()));
    check(t_clk[10] - t_clk[9] == 25.0, "25 ns period");
    check(t_d1[t_d1.size()-1] - t_clk[t_clk.size()-1] == 5.0, "first de-skew delay");
    check(t_d2[t_d2.size()-1] - t_clk[t_clk.size()-1] == 10.0, "second de-skew delay");
    int_start_stop = 1; #1;
    check(start_stop, "internal start/stop");
    sel_ext = 1; #1;
    check(!start_stop, "external start/stop selected");
    ext_start_stop = 1; #1;
    check(start_stop, "external start/stop");
    t_clk.delete();
    repeat (10) begin #50 ext_clk = 1; #50 ext_clk = 0; end
    check(t_clk.size() == 10, $sformatf("external clock edges %0d", t_clk.size()));
    check(t_clk[5] - t_clk[4] == 100.0, "external clock period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
