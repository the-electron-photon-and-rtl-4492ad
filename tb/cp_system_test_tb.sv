// cp_system_test_tb - several DSS modules in one test system, as in a test
// of the cluster processor crate: four modules play the pre-processor
// modules (PPMs) that feed the processors, and a fifth plays the central
// trigger processor (CTP) that receives the hit multiplicities.
//
// All five share one VME bus (each with its own base address, read data and
// DTACK* combined as on a backplane), one 40 MHz clock and one TTC broadcast
// channel. Each PPM board plays a 64-word pattern from its first RAM onto
// site 1 in a loop. The processors and the hit counting module are replaced
// by a behavioural stand-in in this file: for each of 16 thresholds it
// counts how many PPM words have the corresponding bit set, and sends the
// sixteen 3-bit counts (48 bits) over a parallel link to site 1 of the CTP
// board, one clock later. The CTP board's sinks compare them with
// multiplicities pre-loaded into their RAMs.
//
// Checks: one TTC broadcast starts all five boards in the same clock (every
// PPM sends its first word in the same clock, so the CTP sees no error over
// many pattern loops); a single corrupted word is caught by the CTP board
// with its word address; a second broadcast stops every board.
`timescale 1ns / 1ps
module cp_system_test_tb;
  import dss_pkg::*;

  localparam int NB = 5;            // boards 0-3 PPM, board 4 CTP
  localparam int CTP = 4;
  localparam int WORDS = 64;
  localparam logic [5:0] START_CODE = 6'h21, STOP_CODE = 6'h22;
  localparam int BAD_WORD = 37;

  logic clk, rst_n;
  logic [31:1] vme_a;
  logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_lword_n;
  logic [1:0] vme_ds_n;
  logic [31:0] vme_d_in;
  logic ttc_brcst_str;
  logic [5:0] ttc_brcst;

  logic [31:0] d_out [NB];
  logic [NB-1:0] d_oe, dtack_n;
  logic [1:0][3:0][DATA_W-1:0] cmc_in [NB];
  logic [1:0][3:0] cmc_valid [NB];
  logic [1:0][3:0][DATA_W-1:0] cmc_out [NB];
  logic [1:0][3:0] cmc_oe [NB], cmc_tx_valid [NB], cmc_bit_error [NB];

  for (genvar b = 0; b < NB; b++) begin : g_board
    logic [1:0] deskew, prom_ce_n;
    logic [31:0] sls_ud;
    logic sls_uctrl_n, sls_uwen_n, sld_uxoff_n, ctp_l1a, cfg_cclk, cfg_din, cfg_prog_n;
    dss_top u_dss (
      .tc_sel_ext(1'b1), .tc_ext_clk(clk), .tc_ext_start_stop(1'b0), .tc_int_start_stop(1'b0),
      .tc_deskew_clk(deskew), .rst_n(rst_n),
      .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_d_in,
      .vme_d_out(d_out[b]), .vme_d_oe(d_oe[b]), .vme_dtack_n(dtack_n[b]),
      .base_sw(10'(10'h100 + b)), .ttc_brcst_str, .ttc_brcst,
      .cmc_in(cmc_in[b]), .cmc_valid(cmc_valid[b]), .cmc_out(cmc_out[b]), .cmc_oe(cmc_oe[b]),
      .cmc_tx_valid(cmc_tx_valid[b]), .cmc_bit_error(cmc_bit_error[b]), .ro_data('0),
      .sls_ud, .sls_uctrl_n, .sls_uwen_n, .sls_lff_n(1'b1), .sls_ldown_n(1'b1),
      .sld_ld('0), .sld_lctrl_n(1'b1), .sld_lwen_n(1'b1), .sld_uxoff_n,
      .rod_busy(1'b0), .ctp_l1a, .cfg_cclk, .cfg_din, .cfg_prog_n, .cfg_init_n(1'b1),
      .cfg_done(1'b1), .dc_prom_present_n(2'b11), .mb_prom_ce_n(prom_ce_n));
  end

  // backplane: wired DTACK* and read data
  wire vme_dtack_n = &dtack_n;
  logic [31:0] vme_d;
  always_comb begin
    vme_d = '0;
    for (int b = 0; b < NB; b++) if (d_oe[b]) vme_d |= d_out[b];
  end

  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #12.5 clk = !clk;

  // PPM pattern: board b, word w
  function automatic logic [19:0] ppm_word(input int b, input int w);
    return 20'((w * 40503 + b * 7919) ^ (w << (b + 3)));
  endfunction
  // multiplicities for word w: 16 x 3 bits
  function automatic logic [47:0] mult_word(input int w);
    logic [47:0] m = '0;
    for (int t = 0; t < 16; t++) begin
      automatic int n = 0;
      for (int b = 0; b < 4; b++) n += int'(ppm_word(b, w)[t]);
      m[3 * t +: 3] = 3'(n);
    end
    return m;
  endfunction

  // processor + hit counter stand-in
  logic [47:0] hits;
  logic        hits_valid;
  bit          corrupt;
  int          word_count = 0, skew = 0, valid_clocks = 0, corrupted = 0;
  // works between clock edges, away from the boards' register updates
  always @(negedge clk) begin
    automatic logic [47:0] m = '0;
    for (int t = 0; t < 16; t++) begin
      automatic int n = 0;
      for (int b = 0; b < 4; b++) n += int'(cmc_out[b][0][0][t]);
      m[3 * t +: 3] = 3'(n);
    end
    hits_valid <= cmc_tx_valid[0][0][0];
    if (cmc_tx_valid[0][0][0]) begin
      if (corrupt && word_count % WORDS == BAD_WORD && corrupted == 0) begin
        m[5] = !m[5];
        corrupted++;
      end
      word_count++;
      valid_clocks++;
    end
    hits <= m;
    if ($realtime > 100.0)
      for (int b = 1; b < 4; b++) if (cmc_tx_valid[b][0][0] != cmc_tx_valid[0][0][0]) skew++;
  end
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      cmc_in[b] = '0;
      cmc_valid[b] = '0;
    end
    cmc_in[CTP][0][0] = hits[19:0];
    cmc_in[CTP][0][1] = hits[39:20];
    cmc_in[CTP][0][2] = {12'b0, hits[47:40]};
    for (int f = 0; f < 3; f++) cmc_valid[CTP][0][f] = hits_valid;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme(input int board, input bit write, input logic [LB_AW-1:0] lba,
                     input logic [31:0] wd, output logic [31:0] rd);
    bit acked;
    vme_a = {10'(10'h100 + board), lba, 1'b0}; vme_am = 6'h09; vme_write_n = !write;
    vme_lword_n = 0; vme_d_in = wd;
    #15 vme_as_n = 0;
    #15 vme_ds_n = 2'b00;
    acked = 0;
    for (int t = 0; t < 200 && !acked; t++) begin
      #5;
      if (!vme_dtack_n) acked = 1;
    end
    rd = vme_d;
    #5 vme_ds_n = 2'b11; vme_as_n = 1;
    wait (vme_dtack_n);
    #20;
    if (!acked) begin failures++; $display("FAIL: no DTACK from board %0d at %h", board, lba); end
  endtask
  task automatic wr(input int board, input logic [LB_AW-1:0] a, input logic [31:0] d);
    logic [31:0] r; vme(board, 1, a, d, r);
  endtask
  function automatic logic [LB_AW-1:0] ram_a(input int r, input int w);
    return LB_AW'((1 << 19) | (r << 15) | w);
  endfunction
  function automatic logic [LB_AW-1:0] fpga_a(input int i, input logic [2:0] k);
    return LB_AW'(32'h40 + 8 * i + int'(k));
  endfunction

  task automatic broadcast(input logic [5:0] code);
    @(negedge clk); ttc_brcst = code; ttc_brcst_str = 1;
    @(negedge clk); ttc_brcst_str = 0;
  endtask

  initial begin
    #4ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    dfpga_cfg_t c;
    rst_n = 1;
    #1 rst_n = 0;
    vme_a = '0; vme_am = '0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0;
    vme_d_in = '0; ttc_brcst_str = 0; ttc_brcst = '0; corrupt = 0;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    for (int b = 0; b < NB; b++) begin
      vme(b, 0, LB_AW'(R_ID), '0, r);
      check(r == MODULE_ID, $sformatf("board %0d answers at its own base address", b));
    end

    // PPM boards: pattern in RAM 1, played in a loop, started by TTC
    c = '0; c.en_ram = 1; c.loop = 1; c.last_addr = RAM_AW'(WORDS - 1);
    for (int b = 0; b < 4; b++) begin
      for (int w = 0; w < WORDS; w++) wr(b, ram_a(0, w), 32'(ppm_word(b, w)));
      wr(b, fpga_a(0, RF_CFG), 32'(c));
    end
    // CTP board: expected multiplicities in RAMs 1-3, compared on receipt
    for (int w = 0; w < WORDS; w++) begin
      automatic logic [47:0] m = mult_word(w);
      wr(CTP, ram_a(0, w), 32'(m[19:0]));
      wr(CTP, ram_a(1, w), 32'(m[39:20]));
      wr(CTP, ram_a(2, w), 32'(m[47:40]));
    end
    c = '0; c.sink = 1; c.sink_mode = SINK_RAM; c.loop = 1; c.last_addr = RAM_AW'(WORDS - 1);
    for (int f = 0; f < 3; f++) wr(CTP, fpga_a(f, RF_CFG), 32'(c));
    for (int b = 0; b < NB; b++) begin
      wr(b, LB_AW'(R_TTC), 32'({STOP_CODE, 2'b00, START_CODE}));
      wr(b, LB_AW'(R_CTRL), 32'((b == CTP ? (1 << C_SINK0) : 0) | (1 << C_TTC_EN)));
    end

    broadcast(START_CODE);
    repeat (20 * WORDS) @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      vme(CTP, 0, fpga_a(f, RF_ERRCNT), '0, r);
      check(r == 0, $sformatf("CTP FPGA %0d: %0d errors with all boards in step", f + 1, r));
    end
    check(skew == 0, $sformatf("PPM boards out of step in %0d clocks", skew));
    check(valid_clocks >= 19 * WORDS, $sformatf("%0d words sent", valid_clocks));

    corrupt = 1;
    repeat (2 * WORDS) @(posedge clk);
    vme(CTP, 0, fpga_a(0, RF_ERRCNT), '0, r);
    check(r == 1 && corrupted == 1, $sformatf("one corrupted word, %0d counted", r));
    vme(CTP, 0, fpga_a(0, RF_ERRADDR), '0, r);
    check(r == BAD_WORD, $sformatf("error at word %0d, expected %0d", r, BAD_WORD));
    vme(CTP, 0, fpga_a(0, RF_ERRDATA), '0, r);
    check(r == 32'(mult_word(BAD_WORD)[19:0] ^ 20'h20), $sformatf("error data %h", r));
    vme(CTP, 0, fpga_a(1, RF_ERRCNT), '0, r);
    check(r == 0, "other CTP FPGAs see no error");

    broadcast(STOP_CODE);
    repeat (10) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      vme(b, 0, LB_AW'(R_STATUS), '0, r);
      check(r[7:0] == 8'h00, $sformatf("board %0d stopped by the broadcast, status %h", b, r));
    end
    $display("%0d boards, %0d words in step, one error found at word %0d", NB, valid_clocks, BAD_WORD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
