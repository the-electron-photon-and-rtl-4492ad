// vme_slave_tb - a VME master model runs A32 and A24 D32 cycles against the
// slave, whose local bus is answered by a small register model with a
// varying delay. Checks: data in both directions, the local word address,
// DTACK* release after the strobes, and no DTACK* for another board's base,
// a non-data address modifier or a D16 transfer.
`timescale 1ns / 1ps
module vme_slave_tb;
  import dss_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  logic [31:1] vme_a;
  logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_lword_n;
  logic [1:0] vme_ds_n;
  logic [31:0] vme_d_in, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [9:0] base_sw;
  logic lb_req, lb_we, lb_ack;
  logic [LB_AW-1:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;
  logic [31:0] regs [16];
  int checks = 0, failures = 0, nreq = 0;
  logic [LB_AW-1:0] last_lb_addr;

  always #12.5 clk = !clk;   // 40 MHz

  vme_slave dut (.*);

  // local bus model: answers after 1 to 3 clocks
  int delay;
  always @(posedge clk) begin
    lb_ack <= 1'b0;
    if (lb_req) begin
      nreq++;
      last_lb_addr = lb_addr;
      delay = 1 + ($urandom % 3);
      if (lb_we) regs[lb_addr[3:0]] <= lb_wdata;
      fork begin
        repeat (delay - 1) @(posedge clk);
        lb_rdata <= regs[lb_addr[3:0]];
        lb_ack   <= 1'b1;
      end join_none
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme_cycle(input logic [31:0] addr, input logic [5:0] am, input bit write,
                           input logic [31:0] wdata, input bit d16,
                           output logic [31:0] rdata, output bit acked);
    vme_a = addr[31:1]; vme_am = am; vme_write_n = !write; vme_lword_n = d16; vme_d_in = wdata;
    #20 vme_as_n = 0;
    #15 vme_ds_n = 2'b00;
    acked = 0;
    for (int t = 0; t < 100; t++) begin
      #10;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    rdata = vme_d_oe ? vme_d_out : 32'hx;
    #10 vme_ds_n = 2'b11; vme_as_n = 1;
    if (acked) begin
      for (int t = 0; t < 20 && !vme_dtack_n; t++) #10;
      check(vme_dtack_n, "DTACK* not released");
    end
    #30;
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    bit ack;
    int n0;
    rst_n = 0; vme_as_n = 1; vme_ds_n = 2'b11; vme_write_n = 1; vme_lword_n = 0;
    vme_a = '0; vme_am = '0; vme_d_in = '0; base_sw = 10'h2A5; lb_ack = 0; lb_rdata = '0;
    for (int i = 0; i < 16; i++) regs[i] = 32'h100 + 32'(i);
    repeat (4) @(posedge clk);
    rst_n = 1;
    // A32 writes and reads
    for (int i = 0; i < 8; i++) begin
      vme_cycle({10'h2A5, 20'(i), 2'b00}, 6'h09, 1, 32'hCAFE_0000 + 32'(i), 0, r, ack);
      check(ack, "A32 write acknowledged");
      check(last_lb_addr == LB_AW'(i), $sformatf("local address %0d", last_lb_addr));
    end
    for (int i = 0; i < 8; i++) begin
      vme_cycle({10'h2A5, 20'(i), 2'b00}, 6'h0D, 0, '0, 0, r, ack);
      check(ack && r == 32'hCAFE_0000 + 32'(i), $sformatf("A32 read %0d = %h", i, r));
    end
    // A24 with the two low switch bits (01) and a high local address
    vme_cycle({8'h00, 2'b01, 20'h8_0009, 2'b00}, 6'h39, 0, '0, 0, r, ack);
    check(ack && r == regs[9], "A24 read");
    check(last_lb_addr == 20'h8_0009, "A24 local address");
    vme_cycle({8'hFF, 2'b01, 20'h0_000A, 2'b00}, 6'h3D, 1, 32'h1234_5678, 0, r, ack);
    check(ack && regs[10] == 32'h1234_5678, "A24 write ignores A31..A24");
    // cycles that must not be answered
    n0 = nreq;
    vme_cycle({10'h2A4, 20'd1, 2'b00}, 6'h09, 0, '0, 0, r, ack);
    check(!ack, "other board's A32 base answered");
    vme_cycle({8'h00, 2'b10, 20'd1, 2'b00}, 6'h39, 0, '0, 0, r, ack);
    check(!ack, "other board's A24 base answered");
    vme_cycle({10'h2A5, 20'd1, 2'b00}, 6'h2D, 0, '0, 0, r, ack);
    check(!ack, "short I/O modifier answered");
    vme_cycle({10'h2A5, 20'd1, 2'b00}, 6'h09, 0, '0, 1, r, ack);
    check(!ack, "D16 transfer answered");
    check(nreq == n0, "local requests for ignored cycles");
    // the slave recovers after ignored cycles
    vme_cycle({10'h2A5, 20'd3, 2'b00}, 6'h09, 0, '0, 0, r, ack);
    check(ack && r == 32'hCAFE_0003, "read after ignored cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
