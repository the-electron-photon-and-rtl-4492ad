// lvds_link_test_tb - the LVDS link test for which the module was first
// used: site 1 of the DSS sends pseudo-random patterns over eight 10-bit
// 480 Mbaud serial links (two per data FPGA) into site 2, where the sinks
// check every word. Random single-bit errors are injected on the serial
// lines while the links run continuously; the bit error counters read over
// VME must equal the number injected on each FPGA's pair of links, and the
// serial bit period must be 1/480 MHz.
`timescale 1ns / 1ps
module lvds_link_test_tb;
  import dss_pkg::*;

  localparam logic [9:0] BASE = 10'h0F0;
  localparam int RUN_CLOCKS = 20000;

  logic tc_sel_ext, tc_ext_clk, tc_ext_start_stop, tc_int_start_stop, rst_n;
  logic [1:0] tc_deskew_clk;
  logic [31:1] vme_a;
  logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_d_oe, vme_dtack_n;
  logic [1:0] vme_ds_n;
  logic [31:0] vme_d_in, vme_d_out;
  logic [9:0] base_sw;
  logic ttc_brcst_str;
  logic [5:0] ttc_brcst;
  logic [1:0][3:0][DATA_W-1:0] cmc_in, cmc_out, ro_data;
  logic [1:0][3:0] cmc_valid, cmc_oe, cmc_tx_valid, cmc_bit_error;
  logic [31:0] sls_ud, sld_ld;
  logic sls_uctrl_n, sls_uwen_n, sls_lff_n, sls_ldown_n, sld_lctrl_n, sld_lwen_n, sld_uxoff_n;
  logic rod_busy, ctp_l1a;
  logic cfg_cclk, cfg_din, cfg_prog_n, cfg_init_n, cfg_done;
  logic [1:0] dc_prom_present_n, mb_prom_ce_n;

  dss_top dut (.*);

  int checks = 0, failures = 0;

  initial tc_ext_clk = 1'b0;
  always #12.5 tc_ext_clk = !tc_ext_clk;
  wire clk = tc_ext_clk;

  // eight serial links: FPGA f of site 1, bits 9:0 and 19:10
  logic [7:0]       inject;
  logic [3:0]       inject_bit [8];
  logic [9:0]       rx [8];
  logic [7:0]       lock;
  logic [7:0]       line;
  for (genvar l = 0; l < 8; l++) begin : g_link
    lvds_link_model u_link (
      .clk(clk), .tx_data(cmc_out[0][l / 2][(l % 2) * 10 +: 10]),
      .inject(inject[l]), .inject_bit(inject_bit[l]),
      .rx_data(rx[l]), .lock(lock[l]), .line(line[l]));
  end
  always_comb begin
    for (int f = 0; f < 4; f++) begin
      cmc_in[1][f]    = {rx[2 * f + 1], rx[2 * f]};
      cmc_valid[1][f] = lock[2 * f] && lock[2 * f + 1];
      cmc_in[0][f]    = '0;
      cmc_valid[0][f] = 1'b0;
    end
  end

  // error injection window and bookkeeping
  bit inject_on;
  int injected [4];
  always @(negedge clk) begin
    inject <= '0;
    if (inject_on && ($urandom % 400 == 0)) begin
      automatic int l = $urandom % 8;
      inject[l]     <= 1'b1;
      inject_bit[l] <= 4'($urandom % 10);
      injected[l / 2]++;
    end
  end

  // serial bit period
  realtime t_last, t_min;
  always @(line[0]) begin
    if ($realtime - t_last < t_min && $realtime > 1000) t_min = $realtime - t_last;
    t_last = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme(input bit write, input logic [LB_AW-1:0] lba, input logic [31:0] wd,
                     output logic [31:0] rd);
    bit acked;
    vme_a = {BASE, lba, 1'b0}; vme_am = 6'h0D; vme_write_n = !write; vme_lword_n = 0; vme_d_in = wd;
    #15 vme_as_n = 0;
    #15 vme_ds_n = 2'b00;
    acked = 0;
    for (int t = 0; t < 200 && !acked; t++) begin
      #5;
      if (!vme_dtack_n) acked = 1;
    end
    rd = vme_d_out;
    #5 vme_ds_n = 2'b11; vme_as_n = 1;
    wait (vme_dtack_n);
    #20;
    if (!acked) begin failures++; $display("FAIL: no DTACK for %h", lba); end
  endtask
  task automatic wr(input logic [LB_AW-1:0] a, input logic [31:0] d);
    logic [31:0] r; vme(1, a, d, r);
  endtask
  function automatic logic [LB_AW-1:0] fpga_a(input int i, input logic [2:0] k);
    return LB_AW'(32'h40 + 8 * i + int'(k));
  endfunction

  initial begin
    #2ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    dfpga_cfg_t c;
    tc_sel_ext = 1; tc_ext_start_stop = 0; tc_int_start_stop = 0; rst_n = 1;
    #1 rst_n = 0;
    vme_a = '0; vme_am = '0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0; vme_d_in = '0;
    base_sw = BASE; ttc_brcst_str = 0; ttc_brcst = '0; ro_data = '0; sls_ldown_n = 1; rod_busy = 0;
    cfg_init_n = 1; cfg_done = 1; dc_prom_present_n = 2'b11; sls_lff_n = 1;
    sld_ld = '0; sld_lctrl_n = 1; sld_lwen_n = 1;
    inject_on = 0; foreach (injected[i]) injected[i] = 0;
    foreach (inject_bit[i]) inject_bit[i] = '0;
    t_last = 0; t_min = 1.0e9;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    // sources: continuous pattern; sinks: continuous check
    c = '0; c.en_gen = 1; c.pattern = PAT_PRBP; c.loop = 1; c.last_addr = '1;
    for (int i = 0; i < 4; i++) wr(fpga_a(i, RF_CFG), 32'(c));
    c = '0; c.sink = 1; c.sink_mode = SINK_PRBP; c.loop = 1; c.last_addr = '1;
    for (int i = 4; i < 8; i++) wr(fpga_a(i, RF_CFG), 32'(c));
    wr(LB_AW'(R_CTRL), 32'(1 << C_SINK1));
    wr(LB_AW'(R_CTRL), 32'((1 << C_SINK1) | (1 << C_RUN)));
    repeat (100) @(posedge clk);
    vme(0, LB_AW'(R_STATUS), '0, r);
    check(r[23:16] == 8'hF0, $sformatf("all four checkers locked, status %h", r));
    check(lock == 8'hFF, "all links locked");

    inject_on = 1;
    repeat (RUN_CLOCKS) @(posedge clk);
    inject_on = 0;
    repeat (20) @(posedge clk);
    wr(LB_AW'(R_CTRL), 32'(1 << C_SINK1));

    for (int i = 0; i < 4; i++) begin
      vme(0, fpga_a(4 + i, RF_BITERR), '0, r);
      check(r == 32'(injected[i]), $sformatf("FPGA %0d: %0d bit errors counted, %0d injected", 5 + i, r, injected[i]));
      vme(0, fpga_a(4 + i, RF_ERRCNT), '0, r);
      check(r <= 32'(injected[i]) && r > 0, $sformatf("FPGA %0d: %0d words in error", 5 + i, r));
    end
    check(t_min > 2.08 && t_min < 2.09, $sformatf("serial bit period %f ns", t_min));
    $display("serial rate %0.1f Mbaud, %0d words per link checked, bit errors injected %0d/%0d/%0d/%0d",
             1000.0 / t_min, RUN_CLOCKS, injected[0], injected[1], injected[2], injected[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
