// control_logic - register decoding, control/status registers and VME access
// to the dual-port RAMs of the DSS motherboard.
//
// It answers the local bus of vme_slave. Word addresses with bit 19 set
// (byte offset bit 21) reach the RAMs: bits 18:15 choose one of the ten RAMs
// (0-7 belong to data FPGAs 1-8, 8 is RAM 9 of the S-link destination, 9 is
// RAM 10 of the S-link source) and bits 14:0 the word, through the RAM's
// port A. Other addresses reach the registers listed in dss_pkg: the control
// register (block modes, run, start-source enables, S-link and CTP enables),
// the status register, a command register whose bits act once when written,
// TTC command codes, CTP, S-link and configuration port registers, an
// identifier, and for every data FPGA its configuration, error count, first
// error address and data, bit error count and address counter.
//
// The source/sink choice is made for each block of four data FPGAs by
// control bits 0 and 1 and overrides bit 0 of the FPGAs' own registers.
//
// The document names the control, status and "other" registers and says
// the RAMs and error registers are read over VME; the map is this design's.
//
// Timing: every access is acknowledged one clock after lb_req, with the RAM
// word or register value on lb_rdata in that clock.
`timescale 1ns / 1ps

module control_logic
  import dss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // local bus
  input  logic              lb_req,
  input  logic              lb_we,
  input  logic [LB_AW-1:0]  lb_addr,
  input  logic [31:0]       lb_wdata,
  output logic              lb_ack,
  output logic [31:0]       lb_rdata,
  // port A of the RAMs
  output logic [N_RAM-1:0]  ram_en,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [RAM_DW-1:0] ram_wdata,
  input  logic [RAM_DW-1:0] ram_rdata [N_RAM],
  // data FPGAs
  output dfpga_cfg_t        dcfg  [N_DFPGA],
  input  dfpga_stat_t       dstat [N_DFPGA],
  output logic              clear_err,
  // run control
  output logic              sw_run,
  output logic              ttc_en,
  output logic              ext_en,
  output logic [5:0]        start_code,
  output logic [5:0]        stop_code,
  // S-link
  output logic              sls_go,
  output logic [RAM_AW-1:0] sls_last,
  input  logic              sls_busy,
  output logic              sld_en,
  output logic              sld_force_xoff,
  output logic              sld_clr,
  output logic [RAM_AW-1:0] sld_last,
  input  logic [15:0]       sld_words,
  input  logic [15:0]       sld_ctrls,
  input  logic              sld_xoff,
  input  logic              sld_overflow,
  input  logic              sld_full,
  // CTP emulation
  output logic              ctp_en,
  output logic [15:0]       ctp_period,
  input  logic [31:0]       ctp_l1a_count,
  input  logic [31:0]       ctp_veto_count,
  input  logic              rod_busy,
  // configuration port
  output logic              cfg_wr,
  output logic [7:0]        cfg_wdata,
  output logic              cfg_prog,
  input  logic              cfg_busy,
  input  logic              cfg_init_n,
  input  logic              cfg_done
);

  logic [7:0]        ctrl;
  logic [13:0]       ttc_codes;
  dfpga_cfg_t        cfg_q [N_DFPGA];
  logic              is_ram;
  logic [3:0]        ram_sel;
  logic [7:0]        ridx;
  logic              pend;
  logic              pend_ram;
  logic [3:0]        pend_sel;
  logic [31:0]       reg_rdata;
  logic [31:0]       reg_q;
  logic [31:0]       status;

  assign is_ram  = lb_addr[19];
  assign ram_sel = lb_addr[18:15];
  assign ridx    = lb_addr[7:0];

  // RAM port A follows the request directly.
  always_comb begin
    ram_en = '0;
    if (lb_req && is_ram && ram_sel < 4'(N_RAM)) ram_en[ram_sel] = 1'b1;
  end
  assign ram_we    = lb_we;
  assign ram_addr  = lb_addr[RAM_AW-1:0];
  assign ram_wdata = lb_wdata;

  assign sw_run         = ctrl[C_RUN];
  assign ttc_en         = ctrl[C_TTC_EN];
  assign ext_en         = ctrl[C_EXT_EN];
  assign sld_en         = ctrl[C_SLD_EN];
  assign sld_force_xoff = ctrl[C_SLD_XOFF];
  assign ctp_en         = ctrl[C_CTP_EN];
  assign start_code     = ttc_codes[5:0];
  assign stop_code      = ttc_codes[13:8];

  always_comb begin
    for (int i = 0; i < int'(N_DFPGA); i++) begin
      dcfg[i]      = cfg_q[i];
      dcfg[i].sink = (i < int'(N_DFPGA) / 2) ? ctrl[C_SINK0] : ctrl[C_SINK1];
    end
  end

  always_comb begin
    status = '0;
    for (int i = 0; i < int'(N_DFPGA); i++) begin
      status[i]      = dstat[i].running;
      status[8 + i]  = dstat[i].err_valid;
      status[16 + i] = dstat[i].synced;
    end
    status[24] = sls_busy;
    status[25] = sld_xoff;
    status[26] = sld_overflow;
    status[27] = cfg_busy;
    status[28] = cfg_init_n;
    status[29] = cfg_done;
    status[30] = rod_busy;
    status[31] = sld_full;
  end

  // Register read mux.
  always_comb begin
    reg_rdata = '0;
    if (ridx[7:6] == 2'b01) begin
      unique case (ridx[2:0])
        RF_CFG:     reg_rdata = 32'(dcfg[ridx[5:3]]);
        RF_ERRCNT:  reg_rdata = 32'(dstat[ridx[5:3]].err_count);
        RF_ERRADDR: reg_rdata = 32'(dstat[ridx[5:3]].err_addr);
        RF_ERRDATA: reg_rdata = 32'(dstat[ridx[5:3]].err_data);
        RF_BITERR:  reg_rdata = dstat[ridx[5:3]].bit_errors;
        RF_ADDR:    reg_rdata = 32'(dstat[ridx[5:3]].addr);
        default:    reg_rdata = '0;
      endcase
    end else begin
      unique case (ridx)
        R_CTRL:     reg_rdata = 32'(ctrl);
        R_STATUS:   reg_rdata = status;
        R_TTC:      reg_rdata = 32'(ttc_codes);
        R_CTP_PER:  reg_rdata = 32'(ctp_period);
        R_CTP_L1A:  reg_rdata = ctp_l1a_count;
        R_CTP_VETO: reg_rdata = ctp_veto_count;
        R_SLS_LAST: reg_rdata = 32'(sls_last);
        R_SLD_LAST: reg_rdata = 32'(sld_last);
        R_SLD_CNT:  reg_rdata = {sld_ctrls, sld_words};
        R_CFGPORT:  reg_rdata = {29'b0, cfg_done, cfg_init_n, cfg_busy};
        R_ID:       reg_rdata = MODULE_ID;
        default:    reg_rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl       <= '0;
      ttc_codes  <= '0;
      ctp_period <= 16'd100;
      sls_last   <= '0;
      sld_last   <= '1;
      cfg_wdata  <= '0;
      for (int i = 0; i < int'(N_DFPGA); i++) cfg_q[i] <= '0;
      clear_err  <= 1'b0;
      sls_go     <= 1'b0;
      sld_clr    <= 1'b0;
      cfg_wr     <= 1'b0;
      cfg_prog   <= 1'b0;
      pend       <= 1'b0;
      pend_ram   <= 1'b0;
      pend_sel   <= '0;
      reg_q      <= '0;
    end else begin
      clear_err <= 1'b0;
      sls_go    <= 1'b0;
      sld_clr   <= 1'b0;
      cfg_wr    <= 1'b0;
      cfg_prog  <= 1'b0;
      pend      <= lb_req;
      if (lb_req) begin
        pend_ram <= is_ram;
        pend_sel <= ram_sel;
        reg_q    <= reg_rdata;
      end
      if (lb_req && lb_we && !is_ram) begin
        if (ridx[7:6] == 2'b01) begin
          if (ridx[2:0] == RF_CFG) cfg_q[ridx[5:3]] <= dfpga_cfg_t'(lb_wdata[$bits(dfpga_cfg_t)-1:0]);
        end else begin
          unique case (ridx)
            R_CTRL:     ctrl <= lb_wdata[7:0];
            R_CMD: begin
              clear_err <= lb_wdata[K_CLR_ERR];
              sls_go    <= lb_wdata[K_SLS_GO];
              sld_clr   <= lb_wdata[K_SLD_CLR];
            end
            R_TTC:      ttc_codes  <= {lb_wdata[13:8], 2'b00, lb_wdata[5:0]};
            R_CTP_PER:  ctp_period <= lb_wdata[15:0];
            R_SLS_LAST: sls_last   <= lb_wdata[RAM_AW-1:0];
            R_SLD_LAST: sld_last   <= lb_wdata[RAM_AW-1:0];
            R_CFGPORT: begin
              cfg_wdata <= lb_wdata[7:0];
              cfg_wr    <= lb_wdata[8];
              cfg_prog  <= lb_wdata[9];
            end
            default: ;
          endcase
        end
      end
    end
  end

  assign lb_ack   = pend;
  assign lb_rdata = !pend_ram ? reg_q
                  : (pend_sel < 4'(N_RAM)) ? ram_rdata[pend_sel] : '0;

endmodule
