// lvds_link_model - behavioural model (simulation only) of one 10-bit LVDS
// serialiser, cable and de-serialiser, as on the link daughter cards.
//
// The parallel word is taken on the falling clock edge, half a clock after
// the logic that drives it changes. At the next rising clock the serialiser
// sends it as a frame of twelve bits on a serial line: a start bit (1), data
// bits D0..D9 and a stop bit (0), each CLK_NS/12 long, so 480 Mbaud at a
// 40 MHz clock. The de-serialiser samples each bit in its middle, checks the
// start and stop bits and presents the ten data bits on the following rising
// clock, with `lock` high when the frame was well formed: one and a half
// clocks from tx_data to rx_data. `inject` flips data bit `inject_bit` of the
// frame sent at this clock, to emulate a bit error on the cable.
`timescale 1ns / 1ps
module lvds_link_model #(
  parameter real CLK_NS = 25.0
) (
  input  logic       clk,
  input  logic [9:0] tx_data,
  input  logic       inject,
  input  logic [3:0] inject_bit,
  output logic [9:0] rx_data,
  output logic       lock,
  output logic       line
);

  localparam real BIT_NS = CLK_NS / 12.0;

  logic [11:0] rx_frame;

  initial begin
    line     = 1'b0;
    rx_data  = '0;
    lock     = 1'b0;
    rx_frame = '0;
  end

  // serialiser: the parallel word is taken half a clock after the edge that
  // produced it, so the model never races the logic driving it
  logic [9:0] tx_hold;
  always @(negedge clk) tx_hold <= tx_data;
  always @(posedge clk) begin
    automatic logic [11:0] fr = {1'b0, tx_hold, 1'b1};
    if (inject) fr[int'(inject_bit) + 1] = !fr[int'(inject_bit) + 1];
    fork
      begin
        for (int k = 0; k < 12; k++) begin
          line = fr[k];
          #(BIT_NS);
        end
      end
    join_none
  end

  // de-serialiser
  always @(posedge clk) begin
    rx_data <= rx_frame[10:1];
    lock    <= rx_frame[0] && !rx_frame[11];
    fork
      begin
        #(BIT_NS / 2.0);
        for (int k = 0; k < 12; k++) begin
          rx_frame[k] = line;
          if (k < 11) #(BIT_NS);
        end
      end
    join_none
  end

endmodule
