// timing_card - behavioural model (not synthesizable) of the custom timing
// card that plugs into the DSS motherboard.
//
// The card delivers a 40 MHz clock, two de-skewed copies of it and a
// start/stop signal. With sel_ext low the clock comes from an on-card
// oscillator and start/stop from an on-card source (int_start_stop); with
// sel_ext high both are taken from the front-panel inputs. Clock generation
// and de-skewing are analog functions of the real card, so they are modelled
// with delays: DESKEW1_NS and DESKEW2_NS are this model's choices, the 40 MHz
// frequency is the card's.
`timescale 1ns / 1ps

module timing_card #(
  parameter real PERIOD_NS  = 25.0,
  parameter real DESKEW1_NS = 5.0,
  parameter real DESKEW2_NS = 10.0
) (
  input  logic sel_ext,
  input  logic ext_clk,
  input  logic ext_start_stop,
  input  logic int_start_stop,
  output logic clk,
  output logic deskew_clk1,
  output logic deskew_clk2,
  output logic start_stop
);

  logic osc;

  initial osc = 1'b0;
  always #(PERIOD_NS / 2.0) osc = !osc;

  assign clk        = sel_ext ? ext_clk        : osc;
  assign start_stop = sel_ext ? ext_start_stop : int_start_stop;

  always @(clk) deskew_clk1 <= #(DESKEW1_NS) clk;
  always @(clk) deskew_clk2 <= #(DESKEW2_NS) clk;

endmodule
