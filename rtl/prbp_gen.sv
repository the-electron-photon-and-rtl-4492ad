// prbp_gen - parallel pseudo-random bit pattern generator.
//
// A Fibonacci shift register of ORDER bits with feedback taps ORDER and TAP
// (default x^15 + x^14 + 1) is advanced WIDTH serial steps per clock, so
// `word` always shows the next WIDTH pattern bits, the first serial bit in
// the MSB. `advance` moves on to the following word; `load` replaces the
// state with `seed`. After a word has been produced the state equals the
// low ORDER bits of that word, so a checker can lock onto a received stream
// by loading one received word as the seed (this needs WIDTH >= ORDER).
//
// The board uses one such generator in a source FPGA and one as the internal
// reference of a sink FPGA. The 20-bit width is the connector width of a data
// FPGA; the polynomial and bit order are this design's choice.
//
// Timing: `word` is combinational from the state register; load and advance
// take effect at the next clock edge (load has priority). Synchronous reset
// to the all-ones state.
`timescale 1ns / 1ps

module prbp_gen #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned ORDER = 15,
  parameter int unsigned TAP   = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [ORDER-1:0] seed,
  input  logic             advance,
  output logic [WIDTH-1:0] word
);

  logic [ORDER-1:0] state;
  logic [ORDER-1:0] next_state;

  always_comb begin
    logic [ORDER-1:0] s;
    logic             b;
    s = state;
    word = '0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      b = s[ORDER-1] ^ s[TAP-1];
      word[i] = b;
      s = {s[ORDER-2:0], b};
    end
    next_state = s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       state <= '1;
    else if (load)    state <= seed;
    else if (advance) state <= next_state;
  end

endmodule
