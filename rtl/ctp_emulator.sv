// ctp_emulator - stands in for the central trigger processor when a read-out
// driver (ROD) is tested: it issues level-1 accepts (L1A) and respects the
// ROD's busy signal.
//
// While enabled, a trigger falls due every `period` clocks (a period of 0 is
// treated as 1). A due trigger is sent as a one-clock `l1a` pulse unless the
// synchronised ROD busy is high; then it is withheld and counted as vetoed,
// as a real trigger would be lost. Both counts can be read over VME.
//
// The document shows only a block "Emulate CTP" fed by "ROD Busy"; the
// periodic trigger and the veto counting are this design's choices.
//
// Timing: rod_busy passes a two-flop synchroniser, so it acts from the third
// clock after it changes.
`timescale 1ns / 1ps

module ctp_emulator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] period,
  input  logic        rod_busy,
  output logic        l1a,
  output logic [31:0] l1a_count,
  output logic [31:0] veto_count
);

  logic [15:0] cnt;
  logic [1:0]  busy_q;
  logic        due;

  assign due = en && (cnt + 16'd1 >= period);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      busy_q     <= '0;
      l1a        <= 1'b0;
      l1a_count  <= '0;
      veto_count <= '0;
    end else begin
      busy_q <= {busy_q[0], rod_busy};
      l1a    <= 1'b0;
      if (!en) begin
        cnt <= '0;
      end else if (due) begin
        cnt <= '0;
        if (busy_q[1]) veto_count <= veto_count + 1'b1;
        else begin
          l1a       <= 1'b1;
          l1a_count <= l1a_count + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
