// run_control - common start and stop for the data FPGAs.
//
// Three sources can start and stop a pattern run: the run bit of the VME
// control register (a rising edge starts, a falling edge stops), the
// start/stop level from the timing card (same rule, after a two-flop
// synchroniser, enabled by ext_en) and TTCrx broadcast commands (a strobe
// whose 6-bit command equals start_code or stop_code, enabled by ttc_en).
// Because a broadcast reaches every board in the same bunch crossing, several
// DSS modules can start their patterns together.
//
// The three sources come from the document; treating start/stop as a level
// and the programmable command codes are this design's choices.
//
// Timing: start/stop are one-clock pulses, one clock after a VME bit change
// or a broadcast strobe, three clocks after a timing card edge.
`timescale 1ns / 1ps

module run_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sw_run,
  input  logic       ttc_en,
  input  logic       ext_en,
  input  logic       ttc_brcst_str,
  input  logic [5:0] ttc_brcst,
  input  logic [5:0] start_code,
  input  logic [5:0] stop_code,
  input  logic       ext_start_stop,
  output logic       start,
  output logic       stop
);

  logic       sw_q;
  logic [2:0] ext_q;
  logic       ext_rise;
  logic       ext_fall;
  logic       ttc_start;
  logic       ttc_stop;

  assign ext_rise  = ext_en &&  ext_q[1] && !ext_q[2];
  assign ext_fall  = ext_en && !ext_q[1] &&  ext_q[2];
  assign ttc_start = ttc_en && ttc_brcst_str && (ttc_brcst == start_code);
  assign ttc_stop  = ttc_en && ttc_brcst_str && (ttc_brcst == stop_code);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_q  <= 1'b0;
      ext_q <= '0;
      start <= 1'b0;
      stop  <= 1'b0;
    end else begin
      sw_q  <= sw_run;
      ext_q <= {ext_q[1:0], ext_start_stop};
      start <= (sw_run && !sw_q) || ext_rise || ttc_start;
      stop  <= (!sw_run && sw_q) || ext_fall || ttc_stop;
    end
  end

endmodule
