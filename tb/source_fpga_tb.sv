// source_fpga_tb - runs the source function of a data FPGA with a RAM model:
// pseudo-random pattern (against a bit-serial reference), ramp, RAM playback
// with wrap-around, the OR of RAM and readout words, a stop in mid-run, one
// word per clock and the two-clock start latency.
`timescale 1ns / 1ps
module source_fpga_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  dfpga_cfg_t cfg;
  logic start, stop;
  logic ram_en;
  logic [RAM_AW-1:0] ram_addr, addr;
  logic [DATA_W-1:0] ram_rdata, ro_data, dout;
  logic dout_valid, running;
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] mem [64];

  always #5 clk = !clk;

  source_fpga dut (.clk, .rst_n, .cfg, .start, .stop, .ram_en, .ram_addr, .ram_rdata,
                   .ro_data, .dout, .dout_valid, .running, .addr);

  // RAM model, one clock read latency
  always_ff @(posedge clk) if (ram_en) ram_rdata <= mem[ram_addr[5:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[$];
  function automatic logic [19:0] prbs_word();
    logic [19:0] w;
    for (int i = 19; i >= 0; i--) begin
      bit b = hist[hist.size()-15] ^ hist[hist.size()-14];
      hist.push_back(b); w[i] = b;
    end
    while (hist.size() > 64) void'(hist.pop_front());
    return w;
  endfunction

  // collected output words, sampled at each clock edge (values of the edge before)
  logic [DATA_W-1:0] got[$];
  int pc, start_edge, first_edge;
  bit gap, gap_err, seen_valid;
  always @(posedge clk) begin
    if (start) start_edge = pc;
    if (dout_valid) begin
      if (!seen_valid) first_edge = pc - 1;
      if (gap) gap_err = 1;
      seen_valid = 1;
      got.push_back(dout);
    end else if (seen_valid) gap = 1;
    pc++;
  end

  task automatic run(input int words_to_wait);
    got.delete(); seen_valid = 0; gap = 0; gap_err = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (words_to_wait) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 20'($urandom);
    rst_n = 0; start = 0; stop = 0; ro_data = 20'hA_0005; cfg = '0; pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. PRBP, 100 words, no loop
    cfg.en_gen = 1; cfg.pattern = PAT_PRBP; cfg.last_addr = 15'd99;
    run(110);
    check(got.size() == 100, $sformatf("PRBP run length %0d", got.size()));
    check(!gap_err, "PRBP words not one per clock");
    check(first_edge - start_edge == 2, $sformatf("start latency %0d", first_edge - start_edge));
    hist.delete(); repeat (15) hist.push_back(1'b1);
    for (int i = 0; i < got.size(); i++) begin
      logic [19:0] w;
      w = prbs_word();
      check(got[i] === w, $sformatf("PRBP word %0d got %h exp %h", i, got[i], w));
    end
    check(!running && dout === '0, "source idle after run");

    // 2. ramp, 20 words
    cfg.pattern = PAT_RAMP; cfg.last_addr = 15'd19;
    run(30);
    check(got.size() == 20, "ramp length");
    foreach (got[i]) check(got[i] === 20'(i), $sformatf("ramp word %0d = %h", i, got[i]));

    // 3. RAM playback with loop over 10 addresses, stopped after 25 words
    cfg = '0; cfg.en_ram = 1; cfg.loop = 1; cfg.last_addr = 15'd9;
    got.delete(); seen_valid = 0; gap = 0; gap_err = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (25) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    repeat (5) @(negedge clk);
    check(got.size() >= 25 && got.size() <= 28, $sformatf("loop words before stop %0d", got.size()));
    foreach (got[i]) check(got[i] === mem[i % 10], $sformatf("RAM word %0d got %h", i, got[i]));
    check(!running, "stop ends the run");

    // 4. RAM OR readout word
    cfg.en_ro = 1; cfg.loop = 0; cfg.last_addr = 15'd4;
    run(10);
    check(got.size() == 5, "OR run length");
    foreach (got[i]) check(got[i] === (mem[i] | ro_data), $sformatf("OR word %0d", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
