// rod_test_tb - the read-out driver (ROD) prototype test set-up: one DSS
// stands in for a cluster processor module (CPM) and for the read-out buffer
// around a ROD under test.
//
// Site 1 of the DSS plays a read-out pattern from its RAMs onto four 20-bit
// links (a G-link transmitter card). The CTP emulator sends level-1 accepts.
// The ROD is a behavioural model in this file: on every L1A it takes the word
// then on each of the four links, formats an event (header control word,
// four data words, trailer control word with the event number) and sends it
// over S-link into the DSS S-link destination, which stores it in RAM 9. The
// model sends faster than events arrive, except while the DSS holds XOFF,
// which the test forces for a while: the model's queue then fills, it raises
// ROD busy, and the CTP emulator withholds triggers.
//
// Checks: every stored word equals the event the test expects for the
// triggers actually sent; the data and control word counts; L1A plus vetoed
// equals the triggers that fell due; vetoes and XOFF both happened.
`timescale 1ns / 1ps
module rod_test_tb;
  import dss_pkg::*;

  localparam logic [9:0] BASE = 10'h155;
  localparam int PERIOD = 30;       // clocks between triggers
  localparam int RAM_WORDS = 64;    // read-out pattern length per link
  localparam int BUSY_EVENTS = 4;   // ROD busy above this many queued events

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

  assign cmc_in = '0;
  assign cmc_valid = '0;

  // ---------------- ROD model ----------------
  logic [31:0] q_data [$];
  bit          q_ctrl [$];
  logic [31:0] expect_data [$];
  bit          expect_ctrl [$];
  int          events = 0, events_queued = 0, max_queued = 0, xoff_clocks = 0;
  logic [1:0]  xoff_seen;     // UXOFF* as seen by the sender, two clocks late

  // the model works on the falling edge, between the DSS register updates
  always @(negedge clk) begin
    xoff_seen <= {xoff_seen[0], !sld_uxoff_n};
    if (!sld_uxoff_n) xoff_clocks++;
    if (ctp_l1a) begin
      automatic logic [31:0] w;
      w = {8'hB0, 8'(events), 16'h0000};
      q_data.push_back(w); q_ctrl.push_back(1'b1);
      expect_data.push_back(w); expect_ctrl.push_back(1'b1);
      for (int f = 0; f < 4; f++) begin
        w = {10'(f), cmc_out[0][f], 2'b00};
        q_data.push_back(w); q_ctrl.push_back(1'b0);
        expect_data.push_back(w); expect_ctrl.push_back(1'b0);
      end
      w = {8'hE0, 8'(events), 16'h0006};
      q_data.push_back(w); q_ctrl.push_back(1'b1);
      expect_data.push_back(w); expect_ctrl.push_back(1'b1);
      events++;
    end
  end
  always @(negedge clk) begin
    events_queued = (q_data.size() + 5) / 6;
    if (events_queued > max_queued) max_queued = events_queued;
    rod_busy <= events_queued > BUSY_EVENTS;
    if (q_data.size() > 0 && !xoff_seen[1] && rst_n) begin
      sld_ld      <= q_data.pop_front();
      sld_lctrl_n <= !q_ctrl.pop_front();
      sld_lwen_n  <= 1'b0;
    end else begin
      sld_lwen_n  <= 1'b1;
      sld_lctrl_n <= 1'b1;
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
    #5ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, l1a_n, veto_n, ctrl;
    dfpga_cfg_t c;
    int due, stored;
    tc_sel_ext = 1; tc_ext_start_stop = 0; tc_int_start_stop = 0; rst_n = 1;
    #1 rst_n = 0;
    vme_a = '0; vme_am = '0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0; vme_d_in = '0;
    base_sw = BASE; ttc_brcst_str = 0; ttc_brcst = '0; ro_data = '0; sls_ldown_n = 1; sls_lff_n = 1;
    cfg_init_n = 1; cfg_done = 1; dc_prom_present_n = 2'b11;
    sld_ld = '0; sld_lctrl_n = 1; sld_lwen_n = 1; rod_busy = 0; xoff_seen = '0;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    // read-out pattern of the emulated CPM: RAM f, word w
    for (int f = 0; f < 4; f++)
      for (int w = 0; w < RAM_WORDS; w++)
        wr(ram_a(f, w), 32'((f << 16) | (w * 37 + 5)));
    c = '0; c.en_ram = 1; c.loop = 1; c.last_addr = RAM_AW'(RAM_WORDS - 1);
    for (int f = 0; f < 4; f++) wr(LB_AW'(32'h40 + 8 * f), 32'(c));
    wr(LB_AW'(R_SLD_LAST), 32'(RAM_AW'('1)));
    wr(LB_AW'(R_CTP_PER), PERIOD);
    wr(LB_AW'(R_CMD), 32'(1 << K_SLD_CLR));
    ctrl = (1 << C_SLD_EN) | (1 << C_RUN);
    wr(LB_AW'(R_CTRL), ctrl);
    repeat (20) @(posedge clk);

    // triggers on; hold XOFF for a while in the middle
    wr(LB_AW'(R_CTRL), ctrl | (1 << C_CTP_EN));
    repeat (3000) @(posedge clk);
    wr(LB_AW'(R_CTRL), ctrl | (1 << C_CTP_EN) | (1 << C_SLD_XOFF));
    repeat (1500) @(posedge clk);
    wr(LB_AW'(R_CTRL), ctrl | (1 << C_CTP_EN));
    repeat (3000) @(posedge clk);
    wr(LB_AW'(R_CTRL), ctrl);
    wait (q_data.size() == 0);
    repeat (20) @(posedge clk);

    vme(0, LB_AW'(R_CTP_L1A), '0, l1a_n);
    vme(0, LB_AW'(R_CTP_VETO), '0, veto_n);
    check(l1a_n == 32'(events), $sformatf("L1A count %0d, ROD saw %0d", l1a_n, events));
    due = int'(l1a_n + veto_n);
    check(due >= 7500 / PERIOD - 4 && due <= 7600 / PERIOD + 4, $sformatf("%0d triggers due", due));
    check(veto_n > 0, "ROD busy vetoed triggers");
    check(max_queued > BUSY_EVENTS, $sformatf("ROD queue reached %0d events", max_queued));
    check(xoff_clocks > 1000, $sformatf("XOFF held %0d clocks", xoff_clocks));

    vme(0, LB_AW'(R_SLD_CNT), '0, r);
    stored = int'(r[15:0]) + int'(r[31:16]);
    check(stored == expect_data.size(), $sformatf("%0d words stored, %0d sent", stored, expect_data.size()));
    check(int'(r[31:16]) == 2 * events, $sformatf("%0d control words", r[31:16]));
    vme(0, LB_AW'(R_STATUS), '0, r);
    check(!r[26], "no S-link overflow");

    // stored events against the expected ones, and the link data against the pattern
    begin
      automatic int bad = 0, bad_pat = 0;
      for (int i = 0; i < stored && i < expect_data.size(); i++) begin
        vme(0, ram_a(8, i), '0, r);
        if (r != expect_data[i]) bad++;
        if (!expect_ctrl[i]) begin
          automatic int f = int'(expect_data[i][31:22]);
          automatic logic [19:0] d = expect_data[i][21:2];
          if (d[19:16] != 4'(f) || (int'(d[15:0]) - 5) % 37 != 0 || (int'(d[15:0]) - 5) / 37 >= RAM_WORDS) bad_pat++;
        end
      end
      check(bad == 0, $sformatf("%0d stored words differ", bad));
      check(bad_pat == 0, $sformatf("%0d link words not from the read-out pattern", bad_pat));
    end

    $display("events %0d, triggers vetoed %0d, words stored %0d, XOFF %0d clocks, ROD queue max %0d events",
             events, veto_n, stored, xoff_clocks, max_queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
