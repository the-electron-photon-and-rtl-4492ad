// dss_top_tb - the whole DSS module at its full size, driven only through
// its VME bus, TTC, timing card and card connectors, as in a link test:
// the two daughter card sites are cabled back to back (site 1 outputs to
// site 2 inputs and the other way), the S-link source card output is looped
// into the destination card input with XOFF fed back as link-full after two
// clocks, and a ROD busy line is driven.
//
// It walks through the module's mechanisms and counts each: a pseudo-random
// run started from VME with one injected bit error found through the error
// registers, a ramp run started by a TTC broadcast and recorded, a swap of
// source and sink blocks with RAM playback checked against data pre-loaded
// over VME and started/stopped by the timing card, looping sources, an S-link
// block that stalls on XOFF and resumes, CTP triggers vetoed by ROD busy, a
// configuration byte and PROGRAM pulse, and finally a complete 32768-word
// run of all four links, every word checked by the sinks and the last one
// compared with an independent model of the pattern.
`timescale 1ns / 1ps
module dss_top_tb;
  import dss_pkg::*;

  localparam logic [9:0] BASE = 10'h155;

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
  logic [DATA_W-1:0] flip;   // error injector on the lane of FPGA 3 -> FPGA 7

  typedef enum int {M_VME_START, M_PRBP_CHECK, M_ERROR_CAPTURE, M_TTC_START, M_RAMP, M_RECORD,
                    M_MODE_SWITCH, M_RAM_PLAYBACK, M_RAM_COMPARE, M_EXT_START_STOP, M_LOOP,
                    M_SLINK, M_XOFF_STALL, M_CTP_L1A, M_CTP_VETO, M_CONFIG, M_FULL_RUN, M_NUM} mech_e;
  int mech [M_NUM];

  // 40 MHz front-panel clock into the timing card
  initial tc_ext_clk = 1'b0;
  always #12.5 tc_ext_clk = !tc_ext_clk;
  wire clk = tc_ext_clk;

  // back-to-back cabling of the two sites
  always_comb begin
    for (int f = 0; f < 4; f++) begin
      cmc_in[1][f]    = cmc_oe[0][f] ? (cmc_out[0][f] ^ (f == 2 ? flip : '0)) : '0;
      cmc_valid[1][f] = cmc_tx_valid[0][f];
      cmc_in[0][f]    = cmc_oe[1][f] ? cmc_out[1][f] : '0;
      cmc_valid[0][f] = cmc_tx_valid[1][f];
    end
  end

  // S-link loop with XOFF returned as link-full two clocks late
  logic [1:0] xoff_d;
  always @(posedge clk) xoff_d <= {xoff_d[0], sld_uxoff_n};
  assign sls_lff_n   = xoff_d[1];
  assign sld_ld      = sls_ud;
  assign sld_lctrl_n = sls_uctrl_n;
  assign sld_lwen_n  = sls_uwen_n;

  // monitors
  int l1a_seen, stall_cycles, prog_low, cfg_bits;
  logic [7:0] cfg_byte;
  int lane0_words, lane2_words;
  logic [DATA_W-1:0] lane0_first [$];
  always @(posedge clk) begin
    if (ctp_l1a) l1a_seen++;
    if (!sls_lff_n && dut.sls_busy) stall_cycles++;
    if (!cfg_prog_n) prog_low++;
    if (cmc_tx_valid[0][0]) begin
      lane0_words++;
      if (lane0_first.size() < 64) lane0_first.push_back(cmc_out[0][0]);
    end
    if (cmc_tx_valid[0][2]) lane2_words++;
  end
  always @(posedge cfg_cclk) begin cfg_byte = {cfg_byte[6:0], cfg_din}; cfg_bits++; end

  // ------------------------------------------------------------ helpers
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
  task automatic rd(input logic [LB_AW-1:0] a, output logic [31:0] d);
    vme(0, a, '0, d);
  endtask
  function automatic logic [LB_AW-1:0] reg_a(input logic [7:0] idx);
    return LB_AW'(idx);
  endfunction
  function automatic logic [LB_AW-1:0] fpga_a(input int i, input logic [2:0] k);
    return LB_AW'(8'h40 + 8 * i + int'(k));
  endfunction
  function automatic logic [LB_AW-1:0] ram_a(input int r, input int w);
    return {1'b1, 4'(r), 15'(w)};
  endfunction
  function automatic logic [31:0] cfgw(input bit sink, input bit gen, input bit ram,
                                       input pattern_e pat, input sink_mode_e sm, input bit loop,
                                       input int last);
    dfpga_cfg_t c;
    c = '0; c.sink = sink; c.en_gen = gen; c.en_ram = ram; c.pattern = pat; c.sink_mode = sm;
    c.loop = loop; c.last_addr = RAM_AW'(last);
    return 32'(c);
  endfunction
  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // independent serial model of the pattern
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

  initial begin
    #4ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int flip_at;
    int first;
    tc_sel_ext = 1; tc_ext_start_stop = 0; tc_int_start_stop = 0; rst_n = 1;
    #1 rst_n = 0;   // a falling edge for the asynchronous reset input
    vme_a = '0; vme_am = '0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0; vme_d_in = '0;
    base_sw = BASE; ttc_brcst_str = 0; ttc_brcst = '0; ro_data = '0; sls_ldown_n = 1; rod_busy = 0;
    cfg_init_n = 1; cfg_done = 0; dc_prom_present_n = 2'b01; flip = '0;
    foreach (mech[m]) mech[m] = 0;
    l1a_seen = 0; stall_cycles = 0; prog_low = 0; cfg_bits = 0; lane0_words = 0; lane2_words = 0;
    cycles(5); rst_n = 1; cycles(5);

    rd(reg_a(R_ID), r);
    check(r == MODULE_ID, "module identifier over VME");
    check(mb_prom_ce_n == 2'b10, "site 1 card EEPROM disables the board EEPROM");

    // ---- 1. PRBP link test started from VME, one bit error injected on lane 3
    for (int i = 0; i < 4; i++) wr(fpga_a(i, RF_CFG), cfgw(0, 1, 0, PAT_PRBP, SINK_RECORD, 0, 999));
    for (int i = 4; i < 8; i++) wr(fpga_a(i, RF_CFG), cfgw(1, 0, 0, PAT_PRBP, SINK_PRBP, 0, 999));
    wr(reg_a(R_CTRL), 32'(1 << C_SINK1));
    lane0_first.delete(); lane2_words = 0;
    wr(reg_a(R_CTRL), 32'((1 << C_SINK1) | (1 << C_RUN)));
    wait (lane2_words == 500);
    @(negedge clk); flip_at = lane2_words; flip = 20'h0_0800; @(negedge clk); flip = '0;
    cycles(1100);
    rd(reg_a(R_STATUS), r);
    check(r[7:0] == 8'h00 && r[23:16] == 8'hF0, $sformatf("status after PRBP run %h", r));
    check(r[15:8] == 8'h40, "only FPGA 7 has an error");
    for (int i = 4; i < 8; i++) begin
      rd(fpga_a(i, RF_ERRCNT), r);
      check(r == (i == 6 ? 1 : 0), $sformatf("FPGA %0d error count %0d", i + 1, r));
    end
    rd(fpga_a(6, RF_ERRADDR), r);
    check(r == 32'(flip_at), $sformatf("error address %0d, injected at %0d", r, flip_at));
    rd(fpga_a(6, RF_BITERR), r);
    check(r == 1, "one bit in error");
    hist.delete(); repeat (15) hist.push_back(1'b1);
    for (int i = 0; i < 64; i++) begin
      logic [19:0] w;
      w = prbs_word();
      check(lane0_first[i] == w, $sformatf("lane 1 word %0d on the connector", i));
    end
    mech[M_VME_START]++; mech[M_PRBP_CHECK]++;
    // the flagged word in the sink RAM and the latched data
    rd(ram_a(6, flip_at), r);
    check(r[20] == 1'b1, "recorded word flagged");
    begin
      logic [31:0] d;
      rd(fpga_a(6, RF_ERRDATA), d);
      check(d[19:0] == r[19:0], "error data equals the recorded word");
    end
    mech[M_ERROR_CAPTURE]++;
    wr(reg_a(R_CMD), 32'(1 << K_CLR_ERR));
    rd(reg_a(R_STATUS), r);
    check(r[15:8] == 8'h00, "errors cleared");
    wr(reg_a(R_CTRL), 32'(1 << C_SINK1));

    // ---- 2. ramp run started by a TTC broadcast, recorded by the sinks
    for (int i = 0; i < 4; i++) wr(fpga_a(i, RF_CFG), cfgw(0, 1, 0, PAT_RAMP, SINK_RECORD, 0, 99));
    for (int i = 4; i < 8; i++) wr(fpga_a(i, RF_CFG), cfgw(1, 0, 0, PAT_PRBP, SINK_RECORD, 0, 99));
    wr(reg_a(R_TTC), 32'h0000_2A15);
    wr(reg_a(R_CTRL), 32'((1 << C_SINK1) | (1 << C_TTC_EN)));
    @(negedge clk); ttc_brcst = 6'h15; ttc_brcst_str = 1; @(negedge clk); ttc_brcst_str = 0;
    cycles(150);
    mech[M_TTC_START]++;
    for (int k = 4; k < 8; k++)
      for (int w = 0; w < 100; w += 33) begin
        rd(ram_a(k, w), r);
        check(r == 32'(w), $sformatf("RAM %0d word %0d recorded ramp %h", k + 1, w, r));
      end
    rd(ram_a(5, 99), r);
    check(r == 32'd99, "last ramp word");
    mech[M_RAMP]++; mech[M_RECORD]++;

    // ---- 3. mode switch: site 2 plays its RAMs back, site 1 compares with
    //         reference data pre-loaded over VME; timing card start/stop
    for (int k = 0; k < 4; k++)
      for (int w = 0; w < 100; w++) wr(ram_a(k, w), 32'(w == 50 && k == 1 ? 1234 : w));
    for (int i = 0; i < 4; i++) wr(fpga_a(i, RF_CFG), cfgw(1, 0, 0, PAT_PRBP, SINK_RAM, 0, 99));
    for (int i = 4; i < 8; i++) wr(fpga_a(i, RF_CFG), cfgw(0, 0, 1, PAT_PRBP, SINK_RECORD, 1, 99));
    wr(reg_a(R_CTRL), 32'((1 << C_SINK0) | (1 << C_EXT_EN)));
    check(cmc_oe[1] == 4'hF && cmc_oe[0] == 4'h0, "connector directions swapped");
    mech[M_MODE_SWITCH]++;
    lane0_words = 0;
    @(negedge clk); tc_ext_start_stop = 1;
    cycles(300);
    rd(reg_a(R_STATUS), r);
    check(r[7:4] == 4'hF, "looping sources still running");
    check(r[3:0] == 4'h0, "sinks stopped after 100 words");
    tc_ext_start_stop = 0;
    cycles(10);
    rd(reg_a(R_STATUS), r);
    check(r[7:0] == 8'h00, "timing card stop ends the run");
    mech[M_EXT_START_STOP]++;
    check(r[15:8] == 8'h02, $sformatf("only FPGA 2 finds a difference, %h", r[15:8]));
    rd(fpga_a(1, RF_ERRADDR), r);
    check(r == 50, "RAM compare error address");
    rd(fpga_a(1, RF_ERRDATA), r);
    check(r == 50, "RAM compare error data");
    rd(fpga_a(0, RF_ERRCNT), r);
    check(r == 0, "FPGA 1 matches its reference");
    rd(ram_a(1, 50), r);
    check(r == 1234, "reference RAM kept");
    mech[M_RAM_PLAYBACK]++; mech[M_RAM_COMPARE]++;
    rd(fpga_a(4, RF_ADDR), r);
    begin
      int sent;
      sent = 0;
      check(r < 100, "source address counter wrapped");
    end
    // lane 0 of site 1 is now an input; count words sent by site 2 lane 0 through the FPGA 5 status
    mech[M_LOOP]++;
    wr(reg_a(R_CMD), 32'(1 << K_CLR_ERR));

    // ---- 4. S-link block of 40 words into a 16-word destination: XOFF stall
    for (int w = 0; w < 40; w++) wr(ram_a(9, w), 32'hC000_0000 + 32'(w));
    wr(reg_a(R_SLD_LAST), 32'd15);
    wr(reg_a(R_SLS_LAST), 32'd39);
    wr(reg_a(R_CTRL), 32'(1 << C_SLD_EN));
    wr(reg_a(R_CMD), 32'(1 << K_SLS_GO));
    cycles(200);
    rd(reg_a(R_STATUS), r);
    check(r[24] && r[25] && !r[26], $sformatf("source waits on XOFF, no overflow, %h", r));
    check(stall_cycles > 50, "source stalled");
    mech[M_XOFF_STALL]++;
    rd(reg_a(R_SLD_CNT), r);
    first = int'(r[15:0]) + int'(r[31:16]);
    check(r[31:16] == 16'd1 && first >= 12 && first <= 16, $sformatf("words held before XOFF took effect, %h", r));
    for (int w = 0; w < first; w += 3) begin
      rd(ram_a(8, w), r);
      check(r == 32'hC000_0000 + 32'(w), $sformatf("S-link word %0d", w));
    end
    // hold the sender with a forced XOFF while the destination is emptied and enlarged
    wr(reg_a(R_CTRL), 32'((1 << C_SLD_EN) | (1 << C_SLD_XOFF)));
    wr(reg_a(R_SLD_LAST), 32'd63);
    wr(reg_a(R_CMD), 32'(1 << K_SLD_CLR));
    cycles(20);
    rd(reg_a(R_SLD_CNT), r);
    check(r == 0, "forced XOFF holds the sender");
    wr(reg_a(R_CTRL), 32'(1 << C_SLD_EN));
    cycles(100);
    rd(reg_a(R_STATUS), r);
    check(!r[24] && !r[25] && !r[26], "block finished without overflow");
    rd(reg_a(R_SLD_CNT), r);
    check(r == {16'd1, 16'(40 - first - 1)}, $sformatf("remaining %0d words, %h", 40 - first, r));
    rd(ram_a(8, 40 - first - 1), r);
    check(r == 32'hC000_0000 + 32'd39, "last S-link word");
    mech[M_SLINK]++;

    // ---- 5. CTP emulation with ROD busy
    wr(reg_a(R_CTP_PER), 32'd20);
    l1a_seen = 0;
    wr(reg_a(R_CTRL), 32'(1 << C_CTP_EN));
    cycles(400);
    rod_busy = 1; cycles(200); rod_busy = 0; cycles(100);
    wr(reg_a(R_CTRL), 32'(0));
    rd(reg_a(R_CTP_L1A), r);
    check(r == 32'(l1a_seen) && r > 10, $sformatf("L1A count %0d, seen %0d", r, l1a_seen));
    if (r > 0) mech[M_CTP_L1A]++;
    rd(reg_a(R_CTP_VETO), r);
    check(r >= 9 && r <= 11, $sformatf("vetoed triggers %0d", r));
    if (r > 0) mech[M_CTP_VETO]++;

    // ---- 6. configuration port
    prog_low = 0;
    wr(reg_a(R_CFGPORT), 32'h200);
    cycles(30);
    check(prog_low == 16, $sformatf("PROG* low %0d clocks", prog_low));
    cfg_bits = 0;
    wr(reg_a(R_CFGPORT), 32'h1C3);
    cycles(30);
    check(cfg_bits == 8 && cfg_byte == 8'hC3, $sformatf("configuration byte %h", cfg_byte));
    cfg_done = 1; cycles(3);
    rd(reg_a(R_CFGPORT), r);
    check(r[2:0] == 3'b110, "DONE and INIT* read back");
    mech[M_CONFIG]++;

    // ---- 7. complete run: 32768 pattern words on each of the four links
    for (int i = 0; i < 4; i++) wr(fpga_a(i, RF_CFG), cfgw(0, 1, 0, PAT_PRBP, SINK_RECORD, 0, 32767));
    for (int i = 4; i < 8; i++) wr(fpga_a(i, RF_CFG), cfgw(1, 0, 0, PAT_PRBP, SINK_PRBP, 0, 32767));
    wr(reg_a(R_CTRL), 32'(1 << C_SINK1));
    wr(reg_a(R_CMD), 32'(1 << K_CLR_ERR));
    lane0_words = 0;
    wr(reg_a(R_CTRL), 32'((1 << C_SINK1) | (1 << C_RUN)));
    wait (lane0_words == 32768);
    cycles(20);
    check(lane0_words == 32768, "32768 words sent");
    rd(reg_a(R_STATUS), r);
    check(r[7:0] == 8'h00 && r[15:8] == 8'h00 && r[23:16] == 8'hF0, $sformatf("full run status %h", r));
    for (int i = 4; i < 8; i++) begin
      rd(fpga_a(i, RF_ERRCNT), r);
      check(r == 0, $sformatf("full run errors FPGA %0d", i + 1));
    end
    hist.delete(); repeat (15) hist.push_back(1'b1);
    begin
      logic [19:0] w;
      for (int n = 0; n < 32768; n++) w = prbs_word();
      rd(ram_a(7, 32767), r);
      check(r == {12'b0, w}, $sformatf("word 32767 recorded %h, model %h", r, w));
    end
    mech[M_FULL_RUN]++;

    foreach (mech[m]) check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    for (int m = 0; m < int'(M_NUM); m++) $display("mechanism %-18s %0d", mech_e'(m), mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
