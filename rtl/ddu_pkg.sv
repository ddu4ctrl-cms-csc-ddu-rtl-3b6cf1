// ddu_pkg: types and constants shared by the DDU central-control modules.
//
// Holds the FMM (fast merging module / trigger throttling) state bit positions, the JTAG
// user-instruction opcodes, the 16-bit per-event control word, the 8b/10b control codes the GbE
// framer sends, and the fixed words of the DDU event header and trailer. Opcode numbers, FMM bit
// meanings, the control-bit list and the fixed header/trailer words follow the DDU documentation;
// the K-codes for the Ethernet start/end delimiters are the standard IEEE 802.3 ones.
package ddu_pkg;

  // ---- FMM / TTS state bits -------------------------------------------------------------
  localparam int FMM_BUSY = 0;  // not ready
  localparam int FMM_WARN = 1;  // warning, near full
  localparam int FMM_SYNC = 2;  // lost sync, needs a sync reset
  localparam int FMM_ERR  = 3;  // error, needs a hard reset

  // ---- JTAG user instruction opcodes ----------------------------------------------------
  typedef enum logic [5:0] {
    OP_NOOP        = 6'd0,
    OP_RESET       = 6'd1,   // toggled: FPGA reset
    OP_RD_L1A      = 6'd2,   // 24-bit L1A number
    OP_STAT32      = 6'd3,   // status, capture and shift, 32 bits
    OP_STAT_LO     = 6'd4,   // status low word
    OP_STAT_HI     = 6'd5,   // status high word
    OP_FIFO_ERR    = 6'd6,
    OP_FOK         = 6'd7,
    OP_TMO_START   = 6'd8,
    OP_TMO_ENDWAIT = 6'd9,
    OP_CRC_ERR     = 6'd10,
    OP_L1A_MISM    = 6'd11,
    OP_XMIT_ERR    = 6'd12,
    OP_RD_KILL     = 6'd13,
    OP_LD_KILL     = 6'd14,
    OP_TMO_ENDACT  = 6'd15,
    OP_DMB_ERR     = 6'd16,
    OP_TMB_ERR     = 6'd17,
    OP_LOST_EVT    = 6'd18,
    OP_LOST_DATA   = 6'd19,
    OP_AFULL       = 6'd20,
    OP_FULL        = 6'd21,
    OP_ERR_A       = 6'd22,
    OP_ERR_B       = 6'd23,
    OP_ERR_C       = 6'd24,
    OP_EMPTY       = 6'd25,
    OP_STUCK       = 6'd26,
    OP_OUT_STAT    = 6'd27,
    OP_ALCT_ERR    = 6'd28,
    OP_LD_BXORB    = 6'd29,
    OP_RD_BXORB    = 6'd30,
    OP_CAL_TOGGLE  = 6'd31,  // toggled: CFEB_Cal auto-L1
    OP_RD_BOARDID  = 6'd32,
    OP_VME_L1A     = 6'd33   // toggled: DDU-only L1A
  } jtag_op_e;

  localparam int NUM_OPS = 34;

  // ---- Per-event control bits (Control Bit List) ---------------------------------------
  typedef struct packed {
    logic wc_crc_mismatch;  // 15
    logic l1a_mismatch;     // 14
    logic fifo_full;        // 13
    logic link_changed;     // 12
    logic critical_err;     // 11
    logic ddu_err;          // 10
    logic fifo_afull;       // 9
    logic end_of_event;     // 8
    logic wc_enable;        // 7
    logic do_header;        // 6
    logic [3:0] voted_sb;   // 5..2 latched voted special bits 15..12
    logic first_word;       // 1
    logic gold_data;        // 0
  } ctrl_bits_t;

  // ---- DDU header/trailer fixed fields ------------------------------------------------------
  localparam logic [3:0]  BOE_NIBBLE = 4'h5;                       // H1[63:60]
  localparam logic [3:0]  EOE_NIBBLE = 4'hA;                       // TR[63:60]
  localparam logic [63:0] DDU_H2     = 64'h8000_0001_8000_8000;    // second header word
  localparam logic [63:0] DDU_T2     = 64'h8000_FFFF_8000_8000;    // second-to-last trailer word

  // ---- 8b/10b characters, {k, byte} ---------------------------------------------------------
  localparam logic [8:0] K28_5 = 9'h1BC;
  localparam logic [8:0] D16_2 = 9'h050;
  localparam logic [8:0] D21_5 = 9'h0B5;
  localparam logic [8:0] D2_2  = 9'h042;
  localparam logic [8:0] K27_7 = 9'h1FB;   // /S/ start of packet
  localparam logic [8:0] K29_7 = 9'h1FD;   // /T/ end of packet
  localparam logic [8:0] K23_7 = 9'h1F7;   // /R/ carrier extend

  // ---- BX numbering -------------------------------------------------------------------------
  localparam logic [11:0] BX_LIM_LHC = 12'd3563;  // 0xDEB
  localparam logic [11:0] BX_LIM_SPS = 12'd923;   // 0x39B, power-up default

endpackage
