// data_fpga - one of the eight data FPGAs of the DSS motherboard.
//
// It owns 20 bits of a daughter card connector and one dual-port RAM (port
// B). It holds both the source function (pattern and RAM playback onto the
// connector) and the sink function (recording and checking what the
// connector delivers); cfg.sink, set for a whole block of four FPGAs, picks
// which one runs, drives the RAM port and the connector direction. On the
// real board the choice is made by loading a source or a sink configuration;
// keeping both here makes the mode a register setting.
//
// Interface: the bidirectional connector pins appear as conn_in, conn_out and
// conn_oe (high while a source). conn_tx_valid marks the words a source
// sends and conn_valid is the daughter card's "data valid" status for
// received words (daughter card controls and status). start/stop/clear_err
// are one-clock pulses. Timing is that of
// source_fpga or sink_fpga.
`timescale 1ns / 1ps

module data_fpga
  import dss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  dfpga_cfg_t        cfg,
  input  logic              start,
  input  logic              stop,
  input  logic              clear_err,
  input  logic [DATA_W-1:0] conn_in,
  input  logic              conn_valid,
  output logic [DATA_W-1:0] conn_out,
  output logic              conn_oe,
  output logic              conn_tx_valid,
  input  logic [DATA_W-1:0] ro_data,
  output logic              ram_en,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [RAM_DW-1:0] ram_wdata,
  input  logic [RAM_DW-1:0] ram_rdata,
  output logic              bit_error,
  output dfpga_stat_t       stat
);

  logic              src_ram_en;
  logic [RAM_AW-1:0] src_ram_addr;
  logic [DATA_W-1:0] src_dout;
  logic              src_valid;
  logic              src_running;
  logic [RAM_AW-1:0] src_addr;
  logic              snk_ram_en;
  logic              snk_ram_we;
  logic [RAM_AW-1:0] snk_ram_addr;
  logic [RAM_DW-1:0] snk_ram_wdata;
  logic              snk_bit_error;
  dfpga_stat_t       snk_stat;

  source_fpga u_src (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (cfg),
    .start     (start && !cfg.sink),
    .stop      (stop || cfg.sink),
    .ram_en    (src_ram_en),
    .ram_addr  (src_ram_addr),
    .ram_rdata (ram_rdata[DATA_W-1:0]),
    .ro_data   (ro_data),
    .dout      (src_dout),
    .dout_valid(src_valid),
    .running   (src_running),
    .addr      (src_addr)
  );

  sink_fpga u_snk (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg      (cfg),
    .start    (start && cfg.sink),
    .stop     (stop || !cfg.sink),
    .clear_err(clear_err),
    .din      (conn_in),
    .din_valid(conn_valid),
    .ram_en   (snk_ram_en),
    .ram_we   (snk_ram_we),
    .ram_addr (snk_ram_addr),
    .ram_wdata(snk_ram_wdata),
    .ram_rdata(ram_rdata[DATA_W-1:0]),
    .bit_error(snk_bit_error),
    .stat     (snk_stat)
  );

  assign conn_oe  = !cfg.sink;
  assign conn_tx_valid = !cfg.sink && src_valid;
  assign conn_out = cfg.sink ? '0 : src_dout;

  always_comb begin
    if (cfg.sink) begin
      ram_en    = snk_ram_en;
      ram_we    = snk_ram_we;
      ram_addr  = snk_ram_addr;
      ram_wdata = snk_ram_wdata;
      bit_error = snk_bit_error;
      stat      = snk_stat;
    end else begin
      ram_en    = src_ram_en;
      ram_we    = 1'b0;
      ram_addr  = src_ram_addr;
      ram_wdata = '0;
      bit_error = 1'b0;
      stat      = '0;
      stat.running = src_running;
      stat.addr    = src_addr;
    end
  end

  // The source output register only holds data while a word is valid.
  always_ff @(posedge clk)
    if (rst_n && !src_valid) assert (src_dout == '0) else $error("source idle word not zero %h %b %b", src_dout, src_valid, cfg.sink);

endmodule
