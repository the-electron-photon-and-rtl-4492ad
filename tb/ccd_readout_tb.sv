// ccd_readout_tb - the DSS used as a CCD readout module: one daughter card
// site carries a clock sequencer, the other a card of eight 10-bit ADCs.
//
// Site 2 runs as a source and plays an eight-word clock sequence from its
// first RAM in a loop: bit 0 resets the output node, bit 1 transfers a pixel,
// bit 2 starts a conversion, so one pixel takes eight 40 MHz clocks. The ADC
// card is a behavioural model in this file: on each conversion strobe it
// samples eight channels of a synthetic CCD image and presents the eight
// 10-bit results on the 80 connector bits of site 1 (two channels per data
// FPGA, channel 2f in bits 9:0), marked valid for one clock. Site 1 runs as
// a sink in record mode, stores one sample word per conversion and stops
// after PIXELS samples, its address counter back at 0. The test reads every stored sample over VME and
// compares it with the image; it also checks that the sinks stopped by
// themselves while the sequencer kept running.
`timescale 1ns / 1ps
module ccd_readout_tb;
  import dss_pkg::*;

  localparam logic [9:0] BASE = 10'h2A5;
  localparam int PIXELS = 256;

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

  // synthetic image: a ramp across the pixels plus a different offset and
  // a bright spot per channel
  function automatic logic [9:0] image(input int pixel, input int ch);
    int v = (pixel * 3 + ch * 97) % 900;
    if (pixel % 64 == ch * 7) v = 1023;
    return 10'(v);
  endfunction

  // ADC card model, working on the falling edge between the DSS register
  // updates
  int conversions = 0, resets = 0, transfers = 0;
  always @(negedge clk) begin
    for (int f = 0; f < 4; f++) cmc_valid[0][f] <= 1'b0;
    if (cmc_oe[1][0] && cmc_out[1][0][0]) resets++;
    if (cmc_oe[1][0] && cmc_out[1][0][1]) transfers++;
    if (cmc_oe[1][0] && cmc_out[1][0][2]) begin
      for (int f = 0; f < 4; f++) begin
        cmc_in[0][f]    <= {image(conversions, 2 * f + 1), image(conversions, 2 * f)};
        cmc_valid[0][f] <= 1'b1;
      end
      conversions++;
    end
  end
  always_comb begin
    for (int f = 0; f < 4; f++) begin
      cmc_in[1][f]    = '0;
      cmc_valid[1][f] = 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme(input bit write, input logic [LB_AW-1:0] lba, input logic [31:0] wd,
                     output logic [31:0] rd);
    bit acked;
    vme_a = {BASE, lba, 1'b0}; vme_am = 6'h09; vme_write_n = !write; vme_lword_n = 0; vme_d_in = wd;
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
  function automatic logic [LB_AW-1:0] ram_a(input int r, input int w);
    return LB_AW'((1 << 19) | (r << 15) | w);
  endfunction

  initial begin
    #3ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    dfpga_cfg_t c;
    int bad;
    tc_sel_ext = 1; tc_ext_start_stop = 0; tc_int_start_stop = 0; rst_n = 1;
    #1 rst_n = 0;
    vme_a = '0; vme_am = '0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0; vme_d_in = '0;
    base_sw = BASE; ttc_brcst_str = 0; ttc_brcst = '0; ro_data = '0; sls_ldown_n = 1; sls_lff_n = 1;
    cfg_init_n = 1; cfg_done = 1; dc_prom_present_n = 2'b11;
    sld_ld = '0; sld_lctrl_n = 1; sld_lwen_n = 1; rod_busy = 0;
    for (int f = 0; f < 4; f++) begin cmc_in[0][f] = '0; cmc_valid[0][f] = 1'b0; end
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    // clock sequence in the RAM of data FPGA 5 (first FPGA of site 2)
    for (int k = 0; k < 8; k++)
      wr(ram_a(4, k), 32'({k == 5, k == 2, k == 0}));
    c = '0; c.en_ram = 1; c.loop = 1; c.last_addr = RAM_AW'(7);
    wr(LB_AW'(32'h40 + 8 * 4), 32'(c));
    // ADC samples into data FPGAs 1-4, record mode, PIXELS words, no loop
    c = '0; c.sink = 1; c.sink_mode = SINK_RECORD; c.last_addr = RAM_AW'(PIXELS - 1);
    for (int f = 0; f < 4; f++) wr(LB_AW'(32'h40 + 8 * f), 32'(c));
    wr(LB_AW'(R_CTRL), 32'(1 << C_SINK0));
    wr(LB_AW'(R_CTRL), 32'((1 << C_SINK0) | (1 << C_RUN)));

    repeat (8 * PIXELS + 200) @(posedge clk);
    vme(0, LB_AW'(R_STATUS), '0, r);
    check(r[3:0] == 4'h0, $sformatf("sinks stopped after %0d samples, status %h", PIXELS, r));
    check(r[4], "sequencer still running");
    check(conversions > PIXELS, $sformatf("%0d conversions", conversions));
    check(resets == conversions || resets == conversions + 1, "one reset per pixel");
    check(transfers == conversions || transfers == conversions + 1, "one transfer per pixel");
    wr(LB_AW'(R_CTRL), 32'(1 << C_SINK0));

    for (int f = 0; f < 4; f++) begin
      vme(0, LB_AW'(32'h40 + 8 * f + int'(RF_ADDR)), '0, r);
      check(r == 32'd0, $sformatf("FPGA %0d address counter %0d, not back at 0", f + 1, r));
      bad = 0;
      for (int p = 0; p < PIXELS; p++) begin
        vme(0, ram_a(f, p), '0, r);
        if (r != {12'b0, image(p, 2 * f + 1), image(p, 2 * f)}) begin
          if (bad < 3) $display("FPGA %0d pixel %0d: %h", f + 1, p, r);
          bad++;
        end
      end
      check(bad == 0, $sformatf("FPGA %0d: %0d samples wrong", f + 1, bad));
    end
    $display("%0d pixels x 8 channels recorded, pixel period 8 clocks (5 MHz)", PIXELS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
