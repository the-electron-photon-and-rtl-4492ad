// control_logic_tb - local bus accesses to the register file and the RAM
// windows: control, TTC, CTP, S-link and per data FPGA registers read back,
// block mode overriding the FPGAs' sink bit, status and error registers
// showing their inputs, command bits giving single pulses, RAM words
// reaching the right RAM port A, and the one-clock acknowledge.
`timescale 1ns / 1ps
module control_logic_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  logic lb_req, lb_we, lb_ack;
  logic [LB_AW-1:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;
  logic [N_RAM-1:0] ram_en;
  logic ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [RAM_DW-1:0] ram_wdata;
  logic [RAM_DW-1:0] ram_rdata [N_RAM];
  dfpga_cfg_t dcfg [N_DFPGA];
  dfpga_stat_t dstat [N_DFPGA];
  logic clear_err, sw_run, ttc_en, ext_en, sls_go, sls_busy, sld_en, sld_force_xoff, sld_clr;
  logic [5:0] start_code, stop_code;
  logic [RAM_AW-1:0] sls_last, sld_last;
  logic [15:0] sld_words, sld_ctrls, ctp_period;
  logic sld_xoff, sld_overflow, sld_full, ctp_en, rod_busy;
  logic [31:0] ctp_l1a_count, ctp_veto_count;
  logic cfg_wr, cfg_prog, cfg_busy, cfg_init_n, cfg_done;
  logic [7:0] cfg_wdata;
  int checks = 0, failures = 0;
  int pulses_clr, pulses_go, pulses_sldclr, pulses_wr, pulses_prog;
  logic [31:0] mem [N_RAM][64];

  always #5 clk = !clk;

  control_logic dut (.*);

  for (genvar r = 0; r < int'(N_RAM); r++) begin : g_ram
    always @(posedge clk)
      if (ram_en[r]) begin
        if (ram_we) mem[r][ram_addr[5:0]] <= ram_wdata;
        ram_rdata[r] <= mem[r][ram_addr[5:0]];
      end
  end

  always @(posedge clk) begin
    pulses_clr += int'(clear_err); pulses_go += int'(sls_go); pulses_sldclr += int'(sld_clr);
    pulses_wr += int'(cfg_wr); pulses_prog += int'(cfg_prog);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lb(input bit we, input logic [LB_AW-1:0] a, input logic [31:0] wd, output logic [31:0] rd);
    lb_req = 1; lb_we = we; lb_addr = a; lb_wdata = wd;
    @(negedge clk); lb_req = 0;
    check(lb_ack, "acknowledge one clock after the request");
    rd = lb_rdata;
    @(negedge clk);
  endtask

  function automatic logic [LB_AW-1:0] fr(input int i, input logic [2:0] k);
    return LB_AW'(8'h40 + 8 * i + int'(k));
  endfunction
  function automatic logic [LB_AW-1:0] ra(input int r, input int w);
    return {1'b1, 4'(r), 15'(w)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    dfpga_cfg_t c;
    rst_n = 0; lb_req = 0; lb_we = 0; lb_addr = '0; lb_wdata = '0;
    sls_busy = 0; sld_words = 16'd33; sld_ctrls = 16'd2; sld_xoff = 1; sld_overflow = 0; sld_full = 0;
    ctp_l1a_count = 32'd77; ctp_veto_count = 32'd5; rod_busy = 1; cfg_busy = 0; cfg_init_n = 1; cfg_done = 1;
    for (int i = 0; i < int'(N_DFPGA); i++) begin
      dstat[i] = '0;
      dstat[i].running = (i % 2 == 1);
      dstat[i].err_valid = (i == 5);
      dstat[i].err_count = 16'(100 + i);
      dstat[i].err_addr = 15'(200 + i);
      dstat[i].err_data = 20'(300 + i);
      dstat[i].bit_errors = 32'(400 + i);
      dstat[i].addr = 15'(500 + i);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulses_clr = 0; pulses_go = 0; pulses_sldclr = 0; pulses_wr = 0; pulses_prog = 0;
    lb(0, LB_AW'(R_ID), '0, r); check(r == MODULE_ID, "identifier");
    // control register
    lb(1, LB_AW'(R_CTRL), 32'h0000_00AE, r);
    lb(0, LB_AW'(R_CTRL), '0, r); check(r == 32'hAE, $sformatf("control read back %h", r));
    check(!dcfg[0].sink && dcfg[4].sink, "block modes from control bits");
    check(sw_run && ttc_en && !ext_en && sld_en && !sld_force_xoff && ctp_en, "control outputs");
    // per FPGA configuration, sink bit forced by block mode
    c = '0; c.en_gen = 1; c.pattern = PAT_RAMP; c.loop = 1; c.last_addr = 15'h1234; c.sink = 1;
    lb(1, fr(2, RF_CFG), 32'(c), r);
    check(dcfg[2].last_addr == 15'h1234 && dcfg[2].loop && dcfg[2].pattern == PAT_RAMP && !dcfg[2].sink,
          "FPGA 3 configuration");
    lb(0, fr(2, RF_CFG), '0, r); check(r[22:1] == 22'(32'(c) >> 1) && !r[0], "configuration read back");
    // error and status registers
    lb(0, fr(5, RF_ERRCNT), '0, r);  check(r == 105, "error count FPGA 6");
    lb(0, fr(5, RF_ERRADDR), '0, r); check(r == 205, "error address FPGA 6");
    lb(0, fr(5, RF_ERRDATA), '0, r); check(r == 305, "error data FPGA 6");
    lb(0, fr(7, RF_BITERR), '0, r);  check(r == 407, "bit errors FPGA 8");
    lb(0, fr(0, RF_ADDR), '0, r);    check(r == 500, "address FPGA 1");
    lb(0, LB_AW'(R_STATUS), '0, r);
    check(r[7:0] == 8'hAA && r[15:8] == 8'h20 && r[25] && r[29] && r[30] && !r[24], $sformatf("status %h", r));
    lb(0, LB_AW'(R_SLD_CNT), '0, r); check(r == {16'd2, 16'd33}, "S-link destination counts");
    lb(0, LB_AW'(R_CTP_L1A), '0, r); check(r == 77, "L1A count");
    lb(0, LB_AW'(R_CTP_VETO), '0, r); check(r == 5, "veto count");
    // other registers
    lb(1, LB_AW'(R_TTC), 32'h0000_2A15, r); check(start_code == 6'h15 && stop_code == 6'h2A, "TTC codes");
    lb(1, LB_AW'(R_CTP_PER), 32'd40, r); check(ctp_period == 16'd40, "CTP period");
    lb(1, LB_AW'(R_SLS_LAST), 32'd63, r); check(sls_last == 15'd63, "S-link source last");
    lb(1, LB_AW'(R_SLD_LAST), 32'd31, r); check(sld_last == 15'd31, "S-link dest last");
    // command pulses
    lb(1, LB_AW'(R_CMD), 32'h7, r);
    repeat (3) @(negedge clk);
    check(pulses_clr == 1 && pulses_go == 1 && pulses_sldclr == 1, "command pulses");
    lb(1, LB_AW'(R_CFGPORT), 32'h3A5, r);
    repeat (2) @(negedge clk);
    check(pulses_wr == 1 && pulses_prog == 1 && cfg_wdata == 8'hA5, "configuration port write");
    // RAM windows: write RAM 0, 3, 8, 9 and read back
    foreach (mem[k, w]) mem[k][w] = 32'hFFFF_FFFF;
    for (int k = 0; k < int'(N_RAM); k += 3) begin
      for (int w = 0; w < 4; w++) lb(1, ra(k, w), 32'(k * 16 + w), r);
    end
    for (int k = 0; k < int'(N_RAM); k += 3) begin
      for (int w = 0; w < 4; w++) begin
        lb(0, ra(k, w), '0, r);
        check(r == 32'(k * 16 + w) && mem[k][w] == 32'(k * 16 + w), $sformatf("RAM %0d word %0d = %h", k, w, r));
      end
    end
    check(mem[1][0] == 32'hFFFF_FFFF && mem[2][0] == 32'hFFFF_FFFF, "other RAMs untouched");
    lb(0, ra(12, 0), '0, r); check(r == 0, "unfitted RAM reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
