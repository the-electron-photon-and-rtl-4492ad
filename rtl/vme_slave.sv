// vme_slave - A32/A24, D32 VME slave interface of the DSS motherboard.
//
// The asynchronous VME strobes AS* and DS0*/DS1* are brought into the 40 MHz
// system clock through two-flop synchronisers. When both data strobes are
// seen low, the address modifier and the address are decoded: A32 data
// cycles (AM 0x09, 0x0D) select the board when A31..A22 equal the base
// switches, A24 data cycles (AM 0x39, 0x3D) when A23..A22 equal the two low
// switches. Only D32 transfers (LWORD* low, A01 low) are answered. A selected
// cycle becomes one local-bus request carrying the word address A21..A2; when
// the local bus acknowledges, DTACK* is driven low (with the read data on
// D31..D0) until the master releases the data strobes. Cycles for another
// board, or of another width, are left without DTACK*.
//
// The document gives the bus type (A32/A24, D32) and that register decoding
// and control/status registers sit in CPLDs; the decoding scheme, the
// address modifiers honoured and the local bus are this design's choices.
//
// Local bus: lb_req is a one-clock pulse with lb_we/lb_addr/lb_wdata stable
// until the next request; lb_ack (one clock, lb_rdata valid) must come at
// least one clock after lb_req. DTACK* follows lb_ack by one clock.
`timescale 1ns / 1ps

module vme_slave
  import dss_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:1]      vme_a,
  input  logic [5:0]       vme_am,
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic             vme_lword_n,
  input  logic [31:0]      vme_d_in,
  output logic [31:0]      vme_d_out,
  output logic             vme_d_oe,
  output logic             vme_dtack_n,
  input  logic [9:0]       base_sw,
  output logic             lb_req,
  output logic             lb_we,
  output logic [LB_AW-1:0] lb_addr,
  output logic [31:0]      lb_wdata,
  input  logic             lb_ack,
  input  logic [31:0]      lb_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_ACK, S_IGNORE} state_e;
  state_e state;

  logic [1:0] as_sync;
  logic [1:0] ds_sync [2];
  logic       as_act;
  logic       ds_both;
  logic       ds_none;
  logic       am_a32;
  logic       am_a24;
  logic       hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_sync    <= '1;
      ds_sync[0] <= '1;
      ds_sync[1] <= '1;
    end else begin
      as_sync    <= {as_sync[0], vme_as_n};
      ds_sync[0] <= {ds_sync[0][0], vme_ds_n[0]};
      ds_sync[1] <= {ds_sync[1][0], vme_ds_n[1]};
    end
  end

  assign as_act  = !as_sync[1];
  assign ds_both = !ds_sync[0][1] && !ds_sync[1][1];
  assign ds_none =  ds_sync[0][1] &&  ds_sync[1][1];

  assign am_a32 = (vme_am == 6'h09) || (vme_am == 6'h0D);
  assign am_a24 = (vme_am == 6'h39) || (vme_am == 6'h3D);
  assign hit    = ((am_a32 && vme_a[31:22] == base_sw) ||
                   (am_a24 && vme_a[23:22] == base_sw[1:0]))
                  && !vme_lword_n && !vme_a[1];

  assign lb_req      = (state == S_REQ);
  assign vme_dtack_n = (state != S_ACK);
  assign vme_d_oe    = (state == S_ACK) && !lb_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lb_we     <= 1'b0;
      lb_addr   <= '0;
      lb_wdata  <= '0;
      vme_d_out <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (as_act && ds_both) begin
            if (hit) begin
              lb_we    <= !vme_write_n;
              lb_addr  <= vme_a[LB_AW+1:2];
              lb_wdata <= vme_d_in;
              state    <= S_REQ;
            end else begin
              state <= S_IGNORE;
            end
          end
        S_REQ:  state <= S_WAIT;
        S_WAIT:
          if (lb_ack) begin
            vme_d_out <= lb_rdata;
            state     <= S_ACK;
          end
        S_ACK, S_IGNORE:
          if (ds_none) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request is a single pulse; DTACK* is only given while the strobes are held.
  a_req_pulse: assert property (@(posedge clk) disable iff (!rst_n) lb_req |=> !lb_req);
  a_no_early_ack: assert property (@(posedge clk) disable iff (!rst_n) lb_req |-> !lb_ack);

endmodule
