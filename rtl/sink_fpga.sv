// sink_fpga - the sink function of a DSS data FPGA.
//
// Words from the daughter card connector are registered (comparator input A)
// while the sink runs and the card marks them valid. Each accepted word is
// given the current value of an address counter, which runs from 0 to
// cfg.last_addr and then stops or wraps (cfg.loop). The reference (input B)
// is the OR of the internal pattern generator and the word pre-loaded in the
// dual-port RAM; cfg.sink_mode enables one of them or neither:
//   SINK_RECORD  words are written to the RAM, nothing is compared;
//   SINK_PRBP    the first word after start whose low 15 bits are not all
//                zero (idle words are) seeds the internal generator, and
//                every later word is compared with it; all words are
//                written to the RAM, bit 20 marking a word in error;
//   SINK_RAM     every word is compared with the RAM word at its address;
//                the RAM is only read, so the reference survives.
// A mismatch pulses `bit_error`, counts the word and its wrong bits, and the
// first mismatch after `clear_err` is kept with its address until cleared.
//
// The comparator, the two references joined by an OR, the "data in error"
// register and the address counter follow the sink block diagram of the
// board; how the checker locks, which error is kept and the counters are this
// design's choices.
//
// Timing: one word per clock. A word accepted at edge n is compared in the
// next cycle; `bit_error`, the counters and the RAM write take effect at
// edge n+1.
`timescale 1ns / 1ps

module sink_fpga
  import dss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  dfpga_cfg_t        cfg,
  input  logic              start,
  input  logic              stop,
  input  logic              clear_err,
  input  logic [DATA_W-1:0] din,
  input  logic              din_valid,
  output logic              ram_en,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [RAM_DW-1:0] ram_wdata,
  input  logic [DATA_W-1:0] ram_rdata,
  output logic              bit_error,
  output dfpga_stat_t       stat
);

  logic              running;
  logic              synced;
  logic [RAM_AW-1:0] addr;
  logic              accept;
  logic [DATA_W-1:0] a_q;        // received word, comparator input A
  logic              a_v;
  logic [RAM_AW-1:0] a_addr;
  logic [DATA_W-1:0] gen_word;
  logic [DATA_W-1:0] ref_b;      // comparator input B
  logic              checking;
  logic              mismatch;
  logic [DATA_W-1:0] diff;
  logic [5:0]        nbits;
  logic              mode_prbp;
  logic              mode_ram;
  logic              lock_now;

  assign mode_prbp = (cfg.sink_mode == SINK_PRBP);
  // zero is not a state of the pattern, so idle all-zero words are skipped
  assign lock_now  = a_v && mode_prbp && !synced && (a_q[14:0] != '0);
  assign mode_ram  = (cfg.sink_mode == SINK_RAM);
  assign accept    = running && din_valid;

  prbp_gen #(.WIDTH(DATA_W)) u_ref (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (lock_now),
    .seed   (a_q[14:0]),
    .advance(a_v && mode_prbp && synced),
    .word   (gen_word)
  );

  assign ref_b    = ((mode_prbp && synced) ? gen_word : '0) | (mode_ram ? ram_rdata : '0);
  assign checking = a_v && (mode_ram || (mode_prbp && synced));
  assign diff     = a_q ^ ref_b;
  assign mismatch = checking && (diff != '0);

  always_comb begin
    nbits = '0;
    for (int i = 0; i < int'(DATA_W); i++) nbits += 6'(diff[i]);
  end

  // RAM port: read ahead of the comparison in SINK_RAM mode, otherwise
  // write the compared word.
  always_comb begin
    if (mode_ram) begin
      ram_en    = accept;
      ram_we    = 1'b0;
      ram_addr  = addr;
      ram_wdata = '0;
    end else begin
      ram_en    = a_v;
      ram_we    = a_v;
      ram_addr  = a_addr;
      ram_wdata = RAM_DW'({mismatch, a_q});
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      synced    <= 1'b0;
      addr      <= '0;
      a_q       <= '0;
      a_v       <= 1'b0;
      a_addr    <= '0;
      bit_error <= 1'b0;
      stat.err_valid  <= 1'b0;
      stat.err_count  <= '0;
      stat.bit_errors <= '0;
      stat.err_addr   <= '0;
      stat.err_data   <= '0;
    end else begin
      a_q    <= din;
      a_v    <= accept;
      a_addr <= addr;
      if (accept) begin
        if (addr == cfg.last_addr) begin
          addr <= '0;
          if (!cfg.loop) running <= 1'b0;
        end else begin
          addr <= addr + 1'b1;
        end
      end
      if (lock_now) synced <= 1'b1;

      bit_error <= mismatch;
      if (mismatch) begin
        if (stat.err_count != '1) stat.err_count <= stat.err_count + 1'b1;
        if (stat.bit_errors <= 32'hFFFF_FFFF - 32'(nbits))
          stat.bit_errors <= stat.bit_errors + 32'(nbits);
        else
          stat.bit_errors <= '1;
        if (!stat.err_valid) begin
          stat.err_valid <= 1'b1;
          stat.err_addr  <= a_addr;
          stat.err_data  <= a_q;
        end
      end
      if (clear_err) begin
        stat.err_valid  <= 1'b0;
        stat.err_count  <= '0;
        stat.bit_errors <= '0;
      end

      if (start) begin
        running <= 1'b1;
        synced  <= 1'b0;
        addr    <= '0;
        a_v     <= 1'b0;
      end
      if (stop) running <= 1'b0;
    end
  end

  assign stat.running = running;
  assign stat.synced  = synced;
  assign stat.addr    = addr;

endmodule
