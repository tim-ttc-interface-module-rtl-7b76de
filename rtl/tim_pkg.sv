// tim_pkg: types and constants shared by the TIM (TTC Interface Module) blocks.
//
// The fast commands (L1A, ECR, BCR, CAL, FER and one spare line) travel
// between blocks as the packed struct fast_cmd_t, one bit per command, each
// bit a single-cycle pulse of the BC clock. The event ID widths (24-bit L1ID,
// 12-bit BCID, 8-bit trigger type plus 2 spare bits) follow the document. The
// bit positions on the 8-bit TTC backplane bus, the register map and the
// serial frame format are this design's own choices; the document names the
// signals and the registers 08 and 0A but does not give an encoding.
`timescale 1ns / 1ps
package tim_pkg;

  localparam int unsigned L1ID_W = 24;
  localparam int unsigned BCID_W = 12;
  localparam int unsigned TTID_W = 10;                 // 8-bit trigger type + 2 spare bits
  localparam int unsigned EVID_W = L1ID_W + BCID_W;    // word held by the ID FIFO

  typedef struct packed {
    logic spare;
    logic fer;
    logic cal;
    logic bcr;
    logic ecr;
    logic l1a;
  } fast_cmd_t;

  localparam fast_cmd_t NO_CMD = '0;

  // Bit positions on the TTC(0-7) backplane bus.
  localparam int unsigned TTC_L1A   = 0;
  localparam int unsigned TTC_ECR   = 1;
  localparam int unsigned TTC_BCR   = 2;
  localparam int unsigned TTC_CAL   = 3;
  localparam int unsigned TTC_SID   = 4;   // Serial ID (L1ID + BCID)
  localparam int unsigned TTC_STT   = 5;   // Serial TT (trigger type)
  localparam int unsigned TTC_FER   = 6;
  localparam int unsigned TTC_SPARE = 7;

  // Source of the TTC bus.
  typedef enum logic [1:0] {
    SRC_RUN = 2'd0,   // TTC system through the TTCrx
    SRC_SA  = 2'd1,   // stand-alone generators
    SRC_SEQ = 2'd2    // sequencer RAM
  } bus_src_t;

  // Register map: byte addresses on the local bus (VME A7..A1, D16 words).
  localparam logic [7:0] REG_CTRL      = 8'h00;  // mode and enables
  localparam logic [7:0] REG_CMD       = 8'h02;  // write: one-shot fast commands, sequencer start/stop
  localparam logic [7:0] REG_TRIG_PER  = 8'h04;  // trigger oscillator period (cycles)
  localparam logic [7:0] REG_ECR_PER   = 8'h06;  // ECR/FER oscillator period (cycles)
  localparam logic [7:0] REG_WINDOW    = 8'h08;  // trigger window size/delay (held only)
  localparam logic [7:0] REG_SACLK_DLY = 8'h0A;  // SA clock delay setting (DL1)
  localparam logic [7:0] REG_TTID      = 8'h0C;  // stand-alone trigger type
  localparam logic [7:0] REG_TRIG_DLY  = 8'h0E;  // external trigger delay (cycles)
  localparam logic [7:0] REG_BUSY_MASK = 8'h10;
  localparam logic [7:0] REG_BUSY_STAT = 8'h12;  // read: current ROD busys
  localparam logic [7:0] REG_BUSY_LAT  = 8'h14;  // read: latched busys; write 1 to clear
  localparam logic [7:0] REG_SEQ_ADDR  = 8'h16;
  localparam logic [7:0] REG_SEQ_DATA  = 8'h18;  // RAM word at REG_SEQ_ADDR, address increments
  localparam logic [7:0] REG_SEQ_END   = 8'h1A;  // last sequencer address
  localparam logic [7:0] REG_SINK_ADDR = 8'h1C;
  localparam logic [7:0] REG_SINK_DATA = 8'h1E;  // read: sink word, address increments
  localparam logic [7:0] REG_SINK_CNT  = 8'h20;  // read: words recorded
  localparam logic [7:0] REG_L1ID_LO   = 8'h22;  // read: last L1ID [15:0]
  localparam logic [7:0] REG_L1ID_HI   = 8'h24;  // read: last L1ID [23:16]
  localparam logic [7:0] REG_BCID      = 8'h26;  // read: last BCID
  localparam logic [7:0] REG_STATUS    = 8'h28;
  localparam logic [7:0] REG_EXT_MASK  = 8'h2A;  // external command enables [5:0]
  localparam logic [7:0] REG_TRIG_NUM  = 8'h2C;  // automatic trigger count (0 = endless)
  localparam logic [7:0] REG_TRIG_CNT  = 8'h2E;  // read: automatic triggers issued

  // Control register bits.
  typedef struct packed {
    logic [3:0] unused;
    logic       sink_en;       // [11] sink records the TTC bus
    logic       irq_en;        // [10] interrupt on clock failure
    logic       seq_loop;      // [9]  sequencer repeats from address 0
    logic       busy_inhibit;  // [8]  crate busy stops stand-alone triggers
    logic       ext_en;        // [7]  external NIM/ECL commands
    logic       auto_ecr;      // [6]  ECR/FER oscillator
    logic       auto_trig;     // [5]  trigger oscillator
    logic       fer_from_ecr;  // [4]  FER generated together with ECR
    logic       seq_mode;      // [3]  TTC bus from the sequencer
    logic       enextclk;      // [2]  external clock enable
    logic       enintclk;      // [1]  internal clock enable
    logic       samode;        // [0]  stand-alone mode (0: Run mode)
  } ctrl_t;

endpackage
