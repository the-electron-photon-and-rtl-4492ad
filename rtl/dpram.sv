// dpram - true dual-port RAM, 32K words of 32 bits by default, as fitted
// next to every data FPGA and S-link FPGA on the DSS motherboard.
//
// Port A serves the VME control logic, port B the FPGA. Each port reads or
// writes one word per clock; reads are synchronous with one clock of latency
// (rdata shows the word addressed in the previous enabled cycle). If both
// ports write the same address in one cycle, port B's value is kept. Both
// ports share one clock here; the contents are not reset.
`timescale 1ns / 1ps

module dpram #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
