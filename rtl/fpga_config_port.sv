// fpga_config_port - the VME path for loading configurations into the FPGAs,
// and the choice between motherboard and daughter card configuration EEPROM.
//
// A byte written over VME is shifted out serially, MSB first, on DIN with a
// configuration clock CCLK: DIN is set up while CCLK is low and taken by the
// FPGAs on the rising edge (slave-serial loading), two system clocks per bit.
// A PROGRAM request drives PROG* low for PROG_CYCLES clocks to clear the
// FPGAs before loading. INIT* and DONE from the FPGAs are passed back for
// reading. When a daughter card carries its own EEPROM (present input low)
// the motherboard EEPROM for that site is disabled.
//
// The document states that the FPGAs can be loaded through a VME register
// and that a daughter card EEPROM disables the motherboard one; the serial
// protocol is the slave-serial mode of the FPGA family, the rest is this
// design's choice. Loading the EEPROMs themselves through VME is not built.
//
// Timing: `busy` rises the clock after `wr` and falls after the 16 clocks of
// the byte; a write while busy is ignored.
`timescale 1ns / 1ps

module fpga_config_port #(
  parameter int unsigned PROG_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wdata,
  input  logic       prog_req,
  output logic       cclk,
  output logic       din,
  output logic       prog_n,
  input  logic       init_n,
  input  logic       done,
  output logic       busy,
  output logic       init_n_q,
  output logic       done_q,
  input  logic [1:0] dc_prom_present_n,
  output logic [1:0] mb_prom_ce_n
);

  logic [7:0] sh;
  logic [3:0] bits_left;
  logic       phase;
  logic [$clog2(PROG_CYCLES+1)-1:0] prog_cnt;

  assign busy         = (bits_left != 0);
  assign mb_prom_ce_n = ~dc_prom_present_n;   // card EEPROM present -> board EEPROM off

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh        <= '0;
      bits_left <= '0;
      phase     <= 1'b0;
      cclk      <= 1'b0;
      din       <= 1'b0;
      prog_n    <= 1'b1;
      prog_cnt  <= '0;
      init_n_q  <= 1'b1;
      done_q    <= 1'b0;
    end else begin
      init_n_q <= init_n;
      done_q   <= done;
      if (busy) begin
        phase <= !phase;
        if (!phase) begin
          cclk <= 1'b0;
          din  <= sh[7];
        end else begin
          cclk      <= 1'b1;
          sh        <= {sh[6:0], 1'b0};
          bits_left <= bits_left - 1'b1;
        end
      end else begin
        cclk <= 1'b0;
        if (wr) begin
          sh        <= wdata;
          bits_left <= 4'd8;
          phase     <= 1'b0;
        end
      end
      if (prog_req) begin
        prog_cnt <= ($bits(prog_cnt))'(PROG_CYCLES);
        prog_n   <= 1'b0;
      end else if (prog_cnt != 0) begin
        prog_cnt <= prog_cnt - 1'b1;
        if (prog_cnt == 1) prog_n <= 1'b1;
      end
    end
  end

endmodule
