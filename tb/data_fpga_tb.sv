// data_fpga_tb - two data FPGAs, each with its dual-port RAM, connected back
// to back as on a link test: a pseudo-random source into a checking sink
// with one corrupted word, then the modes swapped so the former sink plays
// back what it recorded and the former source records it again.
`timescale 1ns / 1ps
module data_fpga_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  dfpga_cfg_t cfg [2];
  logic start, stop, clear_err;
  logic [DATA_W-1:0] conn_out [2];
  logic [DATA_W-1:0] conn_in [2];
  logic conn_oe [2], conn_txv [2], bit_error [2];
  logic ram_en [2], ram_we [2];
  logic [RAM_AW-1:0] ram_addr [2];
  logic [RAM_DW-1:0] ram_wdata [2], ram_rdata [2];
  dfpga_stat_t stat [2];
  logic a_en [2];
  logic [RAM_AW-1:0] a_addr;
  logic [RAM_DW-1:0] a_rdata [2];
  logic [DATA_W-1:0] flip;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  // back-to-back cabling, one with an error injector
  assign conn_in[1] = conn_out[0] ^ flip;
  assign conn_in[0] = conn_out[1];

  for (genvar k = 0; k < 2; k++) begin : g
    data_fpga dut (.clk, .rst_n, .cfg(cfg[k]), .start, .stop, .clear_err,
                   .conn_in(conn_in[k]), .conn_valid(conn_txv[1-k]), .conn_out(conn_out[k]),
                   .conn_oe(conn_oe[k]), .conn_tx_valid(conn_txv[k]), .ro_data('0),
                   .ram_en(ram_en[k]), .ram_we(ram_we[k]), .ram_addr(ram_addr[k]),
                   .ram_wdata(ram_wdata[k]), .ram_rdata(ram_rdata[k]),
                   .bit_error(bit_error[k]), .stat(stat[k]));
    dpram ram (.clk, .a_en(a_en[k]), .a_we(1'b0), .a_addr, .a_wdata('0), .a_rdata(a_rdata[k]),
               .b_en(ram_en[k]), .b_we(ram_we[k]), .b_addr(ram_addr[k]),
               .b_wdata(ram_wdata[k]), .b_rdata(ram_rdata[k]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_ram(input int k, input int addr, output logic [31:0] d);
    a_en[k] = 1; a_addr = RAM_AW'(addr); @(negedge clk); a_en[k] = 0; d = a_rdata[k];
  endtask

  int flips_done;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d0, d1;
    rst_n = 0; start = 0; stop = 0; clear_err = 0; flip = '0; a_en[0] = 0; a_en[1] = 0; a_addr = '0;
    cfg[0] = '0; cfg[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. FPGA 0 source PRBP, FPGA 1 sink PRBP, 200 words
    cfg[0].en_gen = 1; cfg[0].last_addr = 15'd199;
    cfg[1].sink = 1; cfg[1].sink_mode = SINK_PRBP; cfg[1].last_addr = 15'd199;
    @(negedge clk);
    check(conn_oe[0] && !conn_oe[1] && conn_out[1] == '0, "connector directions");
    start = 1; @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    flip = 20'h0_4000; @(negedge clk); flip = '0;
    repeat (120) @(negedge clk);
    check(stat[1].synced, "sink locked");
    check(stat[1].err_count == 1 && stat[1].bit_errors == 1, $sformatf("errors %0d", stat[1].err_count));
    check(stat[1].addr == 15'd0 && !stat[1].running, "sink took 200 words");
    check(!stat[0].running && stat[0].err_count == 0, "source status");
    // 2. swap: FPGA 1 plays back its RAM, FPGA 0 records it
    cfg[0] = '0; cfg[0].sink = 1; cfg[0].sink_mode = SINK_RECORD; cfg[0].last_addr = 15'd199;
    cfg[1] = '0; cfg[1].en_ram = 1; cfg[1].last_addr = 15'd199;
    @(negedge clk);
    check(conn_oe[1] && !conn_oe[0], "directions after swap");
    start = 1; @(negedge clk); start = 0;
    repeat (220) @(negedge clk);
    for (int i = 0; i < 200; i += 7) begin
      read_ram(0, i, d0); read_ram(1, i, d1);
      check(d0[19:0] == d1[19:0] && d0[31:20] == '0, $sformatf("played back word %0d: %h vs %h", i, d0, d1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
