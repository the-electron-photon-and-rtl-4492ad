// slink_dst_fpga - the S-link destination FPGA of the DSS motherboard.
//
// With a DSS acting as a read-out buffer, every word the S-link destination
// card delivers (LWEN* low) is written to the next address of its dual-port
// RAM, from 0 up to last_addr; data and control words (LCTRL* low) are
// counted separately. XOFF (UXOFF* low) asks the sender to pause: it is
// raised when fewer than XOFF_MARGIN free words remain, so that words still
// in flight fit, and can also be forced from VME to exercise the sender's
// flow control. A word arriving with the memory full is dropped and sets
// `overflow`. `clr` empties the memory and clears the counts.
//
// The document gives the function (S-link destination data and control into
// a RAM, with XOFF back to the sender); the margin, the counters and the
// overflow rule are this design's choices.
//
// Timing: a word is written in the clock it arrives; UXOFF* is registered
// and changes one clock after the fill level crosses the margin.
`timescale 1ns / 1ps

module slink_dst_fpga
  import dss_pkg::*;
#(
  parameter int unsigned XOFF_MARGIN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              force_xoff,
  input  logic              clr,
  input  logic [RAM_AW-1:0] last_addr,
  input  logic [31:0]       ld,
  input  logic              lctrl_n,
  input  logic              lwen_n,
  output logic              uxoff_n,
  output logic              ram_en,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [RAM_DW-1:0] ram_wdata,
  output logic [15:0]       word_count,
  output logic [15:0]       ctrl_count,
  output logic              full,
  output logic              overflow
);

  logic [RAM_AW:0] fill;      // words stored
  logic            take;
  logic [RAM_AW:0] cap;
  logic [RAM_AW:0] free;

  assign cap       = {1'b0, last_addr} + 1'b1;
  assign free      = cap - fill;
  assign full      = (fill >= cap);
  assign take      = en && !lwen_n && !full;
  assign ram_en    = take;
  assign ram_we    = take;
  assign ram_addr  = fill[RAM_AW-1:0];
  assign ram_wdata = ld;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      fill       <= '0;
      word_count <= '0;
      ctrl_count <= '0;
      overflow   <= 1'b0;
      uxoff_n    <= !(rst_n && force_xoff);
    end else begin
      if (take) begin
        fill <= fill + 1'b1;
        if (!lctrl_n) ctrl_count <= ctrl_count + 1'b1;
        else          word_count <= word_count + 1'b1;
      end
      if (en && !lwen_n && full) overflow <= 1'b1;
      uxoff_n <= !(force_xoff || (free <= (RAM_AW+1)'(XOFF_MARGIN) + (RAM_AW+1)'(take)));
    end
  end

endmodule
