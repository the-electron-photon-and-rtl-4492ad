// source_fpga - the source function of a DSS data FPGA.
//
// On `start` an address counter runs from 0 to cfg.last_addr, one address per
// clock, reading the dual-port RAM, and then stops or wraps to 0 (cfg.loop).
// For every address a pattern word is also produced: the next word of the
// pseudo-random bit pattern, or a ramp counting up from 0 (cfg.pattern). The
// connector word is the OR of the RAM word, the pattern word and the word
// from the serialiser readout logic, each gated by its enable bit, so one
// source can be chosen or several merged. `stop` ends the run at once.
//
// The three sources and the OR follow the source block diagram of the board;
// the enables, the ramp, the run length and the two-stage pipeline are this
// design's choices.
//
// Timing: a word per clock. `start` at edge 0 makes `running` high; address n
// is issued in the cycle after edge n, and word n appears on `dout` with
// `dout_valid` two edges later. Between runs `dout` is 0.
`timescale 1ns / 1ps

module source_fpga
  import dss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  dfpga_cfg_t        cfg,
  input  logic              start,
  input  logic              stop,
  output logic              ram_en,
  output logic [RAM_AW-1:0] ram_addr,
  input  logic [DATA_W-1:0] ram_rdata,
  input  logic [DATA_W-1:0] ro_data,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic              running,
  output logic [RAM_AW-1:0] addr
);

  logic [DATA_W-1:0] prbp_word;
  logic [DATA_W-1:0] ramp;
  logic [DATA_W-1:0] s1_gen;
  logic              s1_valid;

  prbp_gen #(.WIDTH(DATA_W)) u_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (start),
    .seed   ('1),
    .advance(running && !start),
    .word   (prbp_word)
  );

  assign ram_en   = running;
  assign ram_addr = addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      addr       <= '0;
      ramp       <= '0;
      s1_gen     <= '0;
      s1_valid   <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      s1_valid <= running;
      if (running) begin
        s1_gen <= (cfg.pattern == PAT_RAMP) ? ramp : prbp_word;
        ramp   <= ramp + 1'b1;
        if (addr == cfg.last_addr) begin
          addr <= '0;
          if (!cfg.loop) running <= 1'b0;
        end else begin
          addr <= addr + 1'b1;
        end
      end
      if (start) begin
        running <= 1'b1;
        addr    <= '0;
        ramp    <= '0;
      end
      if (stop) running <= 1'b0;

      dout_valid <= s1_valid;
      if (s1_valid)
        dout <= (cfg.en_ram ? ram_rdata : '0)
              | (cfg.en_gen ? s1_gen    : '0)
              | (cfg.en_ro  ? ro_data   : '0);
      else
        dout <= '0;
    end
  end

endmodule
