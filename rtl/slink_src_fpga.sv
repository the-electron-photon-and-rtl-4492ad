// slink_src_fpga - the S-link source FPGA of the DSS motherboard.
//
// A `go` pulse sends one block of words, addresses 0 to last_addr of its
// dual-port RAM, to the S-link source card: UD carries the word, UWEN* is low
// for one clock per word and UCTRL* is low on the first and the last word,
// which mark the block as control words. While the link reports full (LFF*
// low) or down (LDOWN* low) nothing is written; the RAM is read ahead into a
// two-word buffer so the flow restarts without a gap.
//
// The document says only that this FPGA handles S-link source data and
// control from its RAM; the block format and buffering are this design's
// choices, and the signal names are those of the S-link interface.
//
// Timing: the first word leaves three clocks after `go`; then one word per
// clock while LFF* is high.
`timescale 1ns / 1ps

module slink_src_fpga
  import dss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [RAM_AW-1:0] last_addr,
  output logic              ram_en,
  output logic [RAM_AW-1:0] ram_addr,
  input  logic [RAM_DW-1:0] ram_rdata,
  output logic [31:0]       ud,
  output logic              uctrl_n,
  output logic              uwen_n,
  input  logic              lff_n,
  input  logic              ldown_n,
  output logic              busy
);

  typedef struct packed {
    logic        ctrl;
    logic [31:0] data;
  } sword_t;

  logic              reading;    // addresses still to be read
  logic [RAM_AW-1:0] addr;
  logic              inflight;   // a RAM read returns this cycle
  logic              inflight_ctrl;
  sword_t            buf_q [2];
  logic [1:0]        cnt;
  logic              pop;
  logic              issue;

  assign pop   = (cnt != 0) && lff_n && ldown_n;
  assign issue = reading && ((32'(cnt) + 32'(inflight) - 32'(pop)) < 2);

  assign ram_en   = issue;
  assign ram_addr = addr;
  assign busy     = reading || inflight || (cnt != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading       <= 1'b0;
      addr          <= '0;
      inflight      <= 1'b0;
      inflight_ctrl <= 1'b0;
      cnt           <= '0;
      buf_q[0]      <= '0;
      buf_q[1]      <= '0;
      ud            <= '0;
      uctrl_n       <= 1'b1;
      uwen_n        <= 1'b1;
    end else begin
      // output stage
      uwen_n  <= !pop;
      uctrl_n <= !(pop && buf_q[0].ctrl);
      if (pop) ud <= buf_q[0].data;

      // buffer: pop from entry 0, push the returning RAM word behind
      unique case ({inflight, pop})
        2'b01: begin buf_q[0] <= buf_q[1]; cnt <= cnt - 1'b1; end
        2'b10: begin buf_q[cnt[0]] <= '{inflight_ctrl, ram_rdata}; cnt <= cnt + 1'b1; end
        2'b11: begin
          if (cnt == 2'd1) buf_q[0] <= '{inflight_ctrl, ram_rdata};
          else begin buf_q[0] <= buf_q[1]; buf_q[1] <= '{inflight_ctrl, ram_rdata}; end
        end
        default: ;
      endcase

      // read side
      inflight      <= issue;
      inflight_ctrl <= (addr == '0) || (addr == last_addr);
      if (issue) begin
        if (addr == last_addr) reading <= 1'b0;
        else addr <= addr + 1'b1;
      end
      if (go && !busy) begin
        reading <= 1'b1;
        addr    <= '0;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(cnt == 2'd2 && inflight && !pop));

endmodule
