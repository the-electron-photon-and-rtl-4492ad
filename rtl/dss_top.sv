// dss_top - the data source and sink (DSS) motherboard, a VME test module
// that feeds programmable test patterns into trigger hardware under test and
// records and checks what comes back, at 40 MHz.
//
// Eight data FPGAs, each with a 32K x 32 dual-port RAM, serve the two
// daughter card sites in two blocks of four: FPGAs 1-4 drive or receive the
// 80 connector bits of site 1 (20 bits each), FPGAs 5-8 those of site 2.
// Each block is a source or a sink. A source plays RAM contents, a
// pseudo-random pattern or a ramp onto the connector; a sink records the
// connector into its RAM and checks it against its own pattern generator or
// against data pre-loaded into the RAM, latching the first error. Two S-link
// FPGAs with RAMs 9 and 10 receive and send S-link data. All RAMs and
// registers are reached over an A32/A24 D32 VME interface. Runs are started
// and stopped together from VME, from the timing card's start/stop signal or
// by TTC broadcast commands. A CTP emulator issues triggers gated by a ROD
// busy signal, and a configuration port loads FPGAs over VME.
//
// The timing card is a behavioural model: the system clock is its output,
// taken from its oscillator or from the front-panel clock tc_ext_clk.
// Parts that are not designed here (TTCrx, S-link cards, link daughter
// cards, the CPM serialiser readout logic) connect through ports: connector
// pins appear as separate in/out/enable arrays indexed [site][fpga].
//
// The block structure follows the board's block diagram; register map,
// handshakes and pattern details are this design's choices (see each module).
`timescale 1ns / 1ps

module dss_top
  import dss_pkg::*;
(
  // timing card
  input  logic              tc_sel_ext,
  input  logic              tc_ext_clk,
  input  logic              tc_ext_start_stop,
  input  logic              tc_int_start_stop,
  output logic [1:0]        tc_deskew_clk,
  input  logic              rst_n,
  // VME
  input  logic [31:1]       vme_a,
  input  logic [5:0]        vme_am,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic [31:0]       vme_d_in,
  output logic [31:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  input  logic [9:0]        base_sw,
  // TTCrx
  input  logic              ttc_brcst_str,
  input  logic [5:0]        ttc_brcst,
  // daughter card connectors
  input  logic [1:0][3:0][DATA_W-1:0] cmc_in,
  input  logic [1:0][3:0]             cmc_valid,
  output logic [1:0][3:0][DATA_W-1:0] cmc_out,
  output logic [1:0][3:0]             cmc_oe,
  output logic [1:0][3:0]             cmc_tx_valid,
  output logic [1:0][3:0]             cmc_bit_error,
  input  logic [1:0][3:0][DATA_W-1:0] ro_data,
  // S-link source card
  output logic [31:0]       sls_ud,
  output logic              sls_uctrl_n,
  output logic              sls_uwen_n,
  input  logic              sls_lff_n,
  input  logic              sls_ldown_n,
  // S-link destination card
  input  logic [31:0]       sld_ld,
  input  logic              sld_lctrl_n,
  input  logic              sld_lwen_n,
  output logic              sld_uxoff_n,
  // CTP emulation
  input  logic              rod_busy,
  output logic              ctp_l1a,
  // FPGA configuration
  output logic              cfg_cclk,
  output logic              cfg_din,
  output logic              cfg_prog_n,
  input  logic              cfg_init_n,
  input  logic              cfg_done,
  input  logic [1:0]        dc_prom_present_n,
  output logic [1:0]        mb_prom_ce_n
);

  logic clk;
  logic start_stop;
  logic rst_q1, rst_q2;   // reset synchroniser

  timing_card u_tc (
    .sel_ext       (tc_sel_ext),
    .ext_clk       (tc_ext_clk),
    .ext_start_stop(tc_ext_start_stop),
    .int_start_stop(tc_int_start_stop),
    .clk           (clk),
    .deskew_clk1   (tc_deskew_clk[0]),
    .deskew_clk2   (tc_deskew_clk[1]),
    .start_stop    (start_stop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rst_q2, rst_q1} <= 2'b00;
    else        {rst_q2, rst_q1} <= {rst_q1, 1'b1};
  end

  // ---------------------------------------------------------------- VME
  logic              lb_req, lb_we, lb_ack;
  logic [LB_AW-1:0]  lb_addr;
  logic [31:0]       lb_wdata, lb_rdata;

  vme_slave u_vme (
    .clk(clk), .rst_n(rst_q2),
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n, .base_sw,
    .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata
  );

  logic [N_RAM-1:0]  a_en;
  logic              a_we;
  logic [RAM_AW-1:0] a_addr;
  logic [RAM_DW-1:0] a_wdata;
  logic [RAM_DW-1:0] a_rdata [N_RAM];
  logic              b_en    [N_RAM];
  logic              b_we    [N_RAM];
  logic [RAM_AW-1:0] b_addr  [N_RAM];
  logic [RAM_DW-1:0] b_wdata [N_RAM];
  logic [RAM_DW-1:0] b_rdata [N_RAM];

  dfpga_cfg_t  dcfg  [N_DFPGA];
  dfpga_stat_t dstat [N_DFPGA];
  logic        clear_err, sw_run, ttc_en, ext_en;
  logic [5:0]  start_code, stop_code;
  logic        sls_go, sls_busy;
  logic [RAM_AW-1:0] sls_last, sld_last;
  logic        sld_en, sld_force_xoff, sld_clr, sld_full, sld_overflow;
  logic [15:0] sld_words, sld_ctrls;
  logic        ctp_en;
  logic [15:0] ctp_period;
  logic [31:0] ctp_l1a_count, ctp_veto_count;
  logic        cfg_wr, cfg_prog, cfg_busy, cfg_init_q, cfg_done_q;
  logic [7:0]  cfg_wdata;
  logic        run_start, run_stop;

  control_logic u_ctl (
    .clk(clk), .rst_n(rst_q2),
    .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata,
    .ram_en(a_en), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_rdata(a_rdata),
    .dcfg, .dstat, .clear_err,
    .sw_run, .ttc_en, .ext_en, .start_code, .stop_code,
    .sls_go, .sls_last, .sls_busy,
    .sld_en, .sld_force_xoff, .sld_clr, .sld_last, .sld_words, .sld_ctrls,
    .sld_xoff(!sld_uxoff_n), .sld_overflow, .sld_full,
    .ctp_en, .ctp_period, .ctp_l1a_count, .ctp_veto_count, .rod_busy,
    .cfg_wr, .cfg_wdata, .cfg_prog, .cfg_busy, .cfg_init_n(cfg_init_q), .cfg_done(cfg_done_q)
  );

  run_control u_run (
    .clk(clk), .rst_n(rst_q2),
    .sw_run, .ttc_en, .ext_en, .ttc_brcst_str, .ttc_brcst, .start_code, .stop_code,
    .ext_start_stop(start_stop), .start(run_start), .stop(run_stop)
  );

  // ---------------------------------------------------------------- RAMs
  for (genvar r = 0; r < int'(N_RAM); r++) begin : g_ram
    dpram #(.AW(RAM_AW), .DW(RAM_DW)) u_ram (
      .clk    (clk),
      .a_en   (a_en[r]), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata[r]),
      .b_en   (b_en[r]), .b_we(b_we[r]), .b_addr(b_addr[r]), .b_wdata(b_wdata[r]), .b_rdata(b_rdata[r])
    );
  end

  // ---------------------------------------------------------------- data FPGAs
  for (genvar i = 0; i < int'(N_DFPGA); i++) begin : g_dfpga
    localparam int S = i / 4;   // daughter card site
    localparam int F = i % 4;   // FPGA within the block
    data_fpga u_df (
      .clk       (clk),
      .rst_n     (rst_q2),
      .cfg       (dcfg[i]),
      .start     (run_start),
      .stop      (run_stop),
      .clear_err (clear_err),
      .conn_in   (cmc_in[S][F]),
      .conn_valid(cmc_valid[S][F]),
      .conn_out  (cmc_out[S][F]),
      .conn_oe   (cmc_oe[S][F]),
      .conn_tx_valid(cmc_tx_valid[S][F]),
      .ro_data   (ro_data[S][F]),
      .ram_en    (b_en[i]),
      .ram_we    (b_we[i]),
      .ram_addr  (b_addr[i]),
      .ram_wdata (b_wdata[i]),
      .ram_rdata (b_rdata[i]),
      .bit_error (cmc_bit_error[S][F]),
      .stat      (dstat[i])
    );
  end

  // ---------------------------------------------------------------- S-link
  slink_dst_fpga u_sld (
    .clk(clk), .rst_n(rst_q2),
    .en(sld_en), .force_xoff(sld_force_xoff), .clr(sld_clr), .last_addr(sld_last),
    .ld(sld_ld), .lctrl_n(sld_lctrl_n), .lwen_n(sld_lwen_n), .uxoff_n(sld_uxoff_n),
    .ram_en(b_en[8]), .ram_we(b_we[8]), .ram_addr(b_addr[8]), .ram_wdata(b_wdata[8]),
    .word_count(sld_words), .ctrl_count(sld_ctrls), .full(sld_full), .overflow(sld_overflow)
  );

  assign b_we[9]    = 1'b0;
  assign b_wdata[9] = '0;

  slink_src_fpga u_sls (
    .clk(clk), .rst_n(rst_q2),
    .go(sls_go), .last_addr(sls_last),
    .ram_en(b_en[9]), .ram_addr(b_addr[9]), .ram_rdata(b_rdata[9]),
    .ud(sls_ud), .uctrl_n(sls_uctrl_n), .uwen_n(sls_uwen_n),
    .lff_n(sls_lff_n), .ldown_n(sls_ldown_n), .busy(sls_busy)
  );

  // ---------------------------------------------------------------- CTP, config
  ctp_emulator u_ctp (
    .clk(clk), .rst_n(rst_q2),
    .en(ctp_en), .period(ctp_period), .rod_busy(rod_busy),
    .l1a(ctp_l1a), .l1a_count(ctp_l1a_count), .veto_count(ctp_veto_count)
  );

  fpga_config_port u_cfg (
    .clk(clk), .rst_n(rst_q2),
    .wr(cfg_wr), .wdata(cfg_wdata), .prog_req(cfg_prog),
    .cclk(cfg_cclk), .din(cfg_din), .prog_n(cfg_prog_n),
    .init_n(cfg_init_n), .done(cfg_done), .busy(cfg_busy),
    .init_n_q(cfg_init_q), .done_q(cfg_done_q),
    .dc_prom_present_n, .mb_prom_ce_n
  );

endmodule
