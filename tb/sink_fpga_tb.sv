// sink_fpga_tb - drives the sink function of a data FPGA with a RAM model:
// pseudo-random data with injected bit errors (lock, error counts, first
// error address and word, flagged RAM record), comparison with pre-loaded
// RAM data (RAM left intact), plain recording with gaps in the input, the
// stop at the last address, clearing the errors and the error latency.
`timescale 1ns / 1ps
module sink_fpga_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  dfpga_cfg_t cfg;
  logic start, stop, clear_err;
  logic [DATA_W-1:0] din;
  logic din_valid;
  logic ram_en, ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [RAM_DW-1:0] ram_wdata;
  logic [DATA_W-1:0] ram_rdata;
  logic bit_error;
  dfpga_stat_t stat;
  int checks = 0, failures = 0;
  logic [RAM_DW-1:0] mem [256];

  always #5 clk = !clk;

  sink_fpga dut (.clk, .rst_n, .cfg, .start, .stop, .clear_err, .din, .din_valid,
                 .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata, .bit_error, .stat);

  always_ff @(posedge clk)
    if (ram_en) begin
      if (ram_we) mem[ram_addr[7:0]] <= ram_wdata;
      ram_rdata <= mem[ram_addr[7:0]][DATA_W-1:0];
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[$];
  function automatic logic [19:0] prbs_word();
    logic [19:0] w;
    for (int i = 19; i >= 0; i--) begin
      bit b;
      b = hist[hist.size()-15] ^ hist[hist.size()-14];
      hist.push_back(b); w[i] = b;
    end
    while (hist.size() > 64) void'(hist.pop_front());
    return w;
  endfunction

  int pc, err_pulses, err_edge, send_edge;
  always @(posedge clk) begin
    if (bit_error) begin err_pulses++; err_edge = pc - 1; end
    pc++;
  end

  task automatic pulse_start();
    start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] w, bad;
    rst_n = 0; start = 0; stop = 0; clear_err = 0; din = '0; din_valid = 0; cfg = '0; pc = 0;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. PRBP check, 50 words from an arbitrary point of the sequence, 2 bits wrong in word 30
    cfg.sink = 1; cfg.sink_mode = SINK_PRBP; cfg.last_addr = 15'd255;
    pulse_start();
    for (int i = 0; i < 15; i++) hist.push_back(1'(i % 3 == 0));
    err_pulses = 0;
    din = '0; din_valid = 1; repeat (3) @(negedge clk);   // idle words before the pattern
    check(!stat.synced, "checker locked on idle words");
    for (int i = 0; i < 50; i++) begin
      w = prbs_word();
      din = (i == 30) ? (w ^ 20'h0_0101) : w;
      if (i == 30) begin bad = din; send_edge = pc; end
      din_valid = 1; @(negedge clk);
    end
    din_valid = 0; repeat (4) @(negedge clk);
    check(stat.synced, "PRBP checker did not lock");
    check(err_pulses == 1, $sformatf("bit_error pulses %0d", err_pulses));
    check(stat.err_count == 1, $sformatf("err_count %0d", stat.err_count));
    check(stat.bit_errors == 2, $sformatf("bit_errors %0d", stat.bit_errors));
    check(stat.err_valid && stat.err_addr == 15'd33, $sformatf("err_addr %0d", stat.err_addr));
    check(stat.err_data == bad, "err_data");
    check(err_edge - send_edge == 1, $sformatf("error latency %0d", err_edge - send_edge));
    check(stat.addr == 15'd53, "address counter after 3 idle and 50 words");
    check(mem[33] == {11'b0, 1'b1, bad}, "flagged record of the bad word");
    check(mem[32][20] == 1'b0 && mem[34][20] == 1'b0, "neighbours not flagged");
    check(mem[0] == 32'd0 && (mem[3][19:0] != 20'b0 || mem[4][19:0] != 20'b0), "idle and PRBP data recorded");

    // 2. clear errors
    clear_err = 1; @(negedge clk); clear_err = 0; @(negedge clk);
    check(!stat.err_valid && stat.err_count == 0 && stat.bit_errors == 0, "clear_err");

    // 3. compare with pre-loaded RAM data, word 7 wrong
    for (int i = 0; i < 20; i++) mem[i] = 32'($urandom) & 32'h000F_FFFF;
    cfg.sink_mode = SINK_RAM; cfg.last_addr = 15'd19;
    pulse_start();
    for (int i = 0; i < 20; i++) begin
      din = (i == 7) ? (mem[i][19:0] ^ 20'h8_0000) : mem[i][19:0];
      din_valid = 1; @(negedge clk);
      din_valid = 0; if (i % 4 == 3) @(negedge clk);   // gaps in the input
    end
    repeat (4) @(negedge clk);
    check(stat.err_count == 1 && stat.err_addr == 15'd7, $sformatf("RAM compare errors %0d at %0d", stat.err_count, stat.err_addr));
    check(stat.err_data == (mem[7][19:0] ^ 20'h8_0000), "RAM compare err_data");
    check(mem[7][19:0] != stat.err_data, "reference RAM overwritten");
    check(!stat.running, "run stops at last address");

    // 4. record only, stops after last_addr + 1 words
    clear_err = 1; @(negedge clk); clear_err = 0;
    cfg.sink_mode = SINK_RECORD; cfg.last_addr = 15'd9;
    pulse_start();
    for (int i = 0; i < 15; i++) begin
      din = 20'h1_0000 + 20'(i); din_valid = 1; @(negedge clk);
    end
    din_valid = 0; repeat (4) @(negedge clk);
    for (int i = 0; i < 10; i++) check(mem[i] == 32'h1_0000 + 32'(i), $sformatf("record %0d = %h", i, mem[i]));
    check(mem[10] == 32'h1_0000 + 32'(10) ? 1'b0 : 1'b1, "recorded past last address");
    check(stat.err_count == 0, "record mode compares");
    check(!stat.running, "record run ended");

    // 5. stop pulse ends a run at once
    cfg.last_addr = 15'd200;
    pulse_start();
    din_valid = 1; repeat (5) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    repeat (5) @(negedge clk); din_valid = 0;
    check(stat.addr == 15'd6 && !stat.running, $sformatf("stop: address %0d", stat.addr));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
