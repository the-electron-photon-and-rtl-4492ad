// dss_pkg - types and constants shared by the data source and sink (DSS)
// module: word widths, the data FPGA configuration and status records, the
// sink modes and the VME register map.
//
// The DSS motherboard carries eight data FPGAs, each with a 20-bit share of
// an 80-bit daughter card connector and its own 32K x 32 dual-port RAM, plus
// two S-link FPGAs with two more RAMs. The widths below are those numbers.
// The register map is this design's own: the board is only known to have a
// control register, a status register and "other registers".
`timescale 1ns / 1ps

package dss_pkg;

  localparam int unsigned DATA_W  = 20;  // connector bits per data FPGA (D19:D0)
  localparam int unsigned RAM_AW  = 15;  // 32K words per dual-port RAM
  localparam int unsigned RAM_DW  = 32;  // 32-bit RAM words
  localparam int unsigned N_DFPGA = 8;   // data FPGAs
  localparam int unsigned N_RAM   = 10;  // RAMs 1-8 data, 9 S-link dest, 10 S-link source
  localparam int unsigned LB_AW   = 20;  // local bus word address (byte offsets 21:2)

  // What a sink compares the received words with.
  typedef enum logic [1:0] {
    SINK_RECORD = 2'd0,  // record only
    SINK_PRBP   = 2'd1,  // check against the internal PRBP generator, record
    SINK_RAM    = 2'd2   // check against data pre-loaded in the RAM
  } sink_mode_e;

  // Which pattern the source generator produces.
  typedef enum logic {
    PAT_PRBP = 1'b0,
    PAT_RAMP = 1'b1
  } pattern_e;

  // Per data FPGA configuration (one VME register each, bit layout as packed).
  typedef struct packed {
    logic [RAM_AW-1:0] last_addr;  // [22:8] last address of a run
    logic              loop;       // [7]    wrap to 0 after last_addr
    sink_mode_e        sink_mode;  // [6:5]
    pattern_e          pattern;    // [4]
    logic              en_ro;      // [3]    source: serialiser readout into the OR
    logic              en_ram;     // [2]    source: RAM data into the OR
    logic              en_gen;     // [1]    source: pattern generator into the OR
    logic              sink;       // [0]    0 = source, 1 = sink (set per block of four)
  } dfpga_cfg_t;


  // Per data FPGA status.
  typedef struct packed {
    logic              running;
    logic              synced;      // PRBP checker has locked
    logic              err_valid;   // first-error register holds a word
    logic [15:0]       err_count;   // words in error
    logic [31:0]       bit_errors;  // bits in error
    logic [RAM_AW-1:0] err_addr;    // address counter at the first error
    logic [DATA_W-1:0] err_data;    // received word at the first error
    logic [RAM_AW-1:0] addr;        // current address counter
  } dfpga_stat_t;

  // Register word indices (byte offset = 4 * index) in the register space.
  localparam logic [7:0] R_CTRL     = 8'h00;  // control register
  localparam logic [7:0] R_STATUS   = 8'h01;  // status register (read only)
  localparam logic [7:0] R_CMD      = 8'h02;  // command pulses (write only)
  localparam logic [7:0] R_TTC      = 8'h03;  // TTC start [5:0] and stop [13:8] commands
  localparam logic [7:0] R_CTP_PER  = 8'h04;  // CTP emulator trigger period
  localparam logic [7:0] R_CTP_L1A  = 8'h05;  // triggers sent
  localparam logic [7:0] R_CTP_VETO = 8'h06;  // triggers withheld by busy
  localparam logic [7:0] R_SLS_LAST = 8'h07;  // S-link source last address
  localparam logic [7:0] R_SLD_LAST = 8'h08;  // S-link destination last address
  localparam logic [7:0] R_SLD_CNT  = 8'h09;  // S-link dest words [15:0], control words [31:16]
  localparam logic [7:0] R_CFGPORT  = 8'h0A;  // configuration port
  localparam logic [7:0] R_ID       = 8'h0B;  // module identifier
  // Per data FPGA i: index 8'h40 + 8*i + k
  localparam logic [2:0] RF_CFG     = 3'd0;
  localparam logic [2:0] RF_ERRCNT  = 3'd1;
  localparam logic [2:0] RF_ERRADDR = 3'd2;
  localparam logic [2:0] RF_ERRDATA = 3'd3;
  localparam logic [2:0] RF_BITERR  = 3'd4;
  localparam logic [2:0] RF_ADDR    = 3'd5;

  // Control register bits.
  localparam int unsigned C_SINK0    = 0;  // data FPGAs 1-4 are sinks
  localparam int unsigned C_SINK1    = 1;  // data FPGAs 5-8 are sinks
  localparam int unsigned C_RUN      = 2;  // software start (1) / stop (0)
  localparam int unsigned C_TTC_EN   = 3;  // accept TTC broadcast start/stop
  localparam int unsigned C_EXT_EN   = 4;  // accept timing card start/stop
  localparam int unsigned C_SLD_EN   = 5;  // S-link destination enabled
  localparam int unsigned C_SLD_XOFF = 6;  // force XOFF
  localparam int unsigned C_CTP_EN   = 7;  // CTP emulator enabled

  // Command register bits (write 1 to act).
  localparam int unsigned K_CLR_ERR  = 0;
  localparam int unsigned K_SLS_GO   = 1;
  localparam int unsigned K_SLD_CLR  = 2;

  localparam logic [31:0] MODULE_ID = 32'hD550_0001;

endpackage
