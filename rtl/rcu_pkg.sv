// rcu_pkg: types and constants shared by the Readout Control Unit blocks.
//
// The RCU steers one readout partition of up to 25 Front End Cards (FECs)
// over two ALTRO bus branches. This package fixes the encodings that the
// blocks agree on: the ALTRO bus request kinds, the 20-bit instruction field
// placed on BD[39:20], the trigger modes, the event descriptor handed from the
// trigger module to the readout path, the DDL header/trailer layout, the
// sequencer instruction set and the register map of the control interface.
// The 40-bit bus, the 7 header words plus one trailer word and the depth of 8
// FEC event buffers come from the RCU description; every bit layout below is
// this design's own choice, since the description does not give one.
package rcu_pkg;

  localparam int BD_W     = 40;   // ALTRO bus data/address lines
  localparam int MEB_EVTS = 8;    // acquisitions an ALTRO can hold
  localparam int N_HDR    = 7;    // DDL header words per event

  // ---------------------------------------------------------------- ALTRO bus
  typedef enum logic [1:0] {
    BOP_WR    = 2'd0,   // write instruction, acknowledged
    BOP_RD    = 2'd1,   // read instruction, acknowledged, data on BD[19:0]
    BOP_BCAST = 2'd2,   // broadcast write, no acknowledge
    BOP_RDO   = 2'd3    // channel readout: write cycle, then TRSF/DSTB block
  } bus_op_e;

  // Instruction field on BD[39:20]:
  //   [19] reserved, [18] broadcast, [17] board-controller select,
  //   [16:12] card address {branch, card[3:0]}, [11:9] chip, [8:5] channel,
  //   [4:0] register or command code.
  localparam logic [4:0] CMD_CHRDO = 5'h1A;   // channel readout command

  function automatic logic [19:0] mk_baddr(input logic       bcast,
                                           input logic       bcsel,
                                           input logic [4:0] card,
                                           input logic [2:0] chip,
                                           input logic [3:0] chan,
                                           input logic [4:0] code);
    return {1'b0, bcast, bcsel, card, chip, chan, code};
  endfunction

  // ---------------------------------------------------------------- triggers
  typedef enum logic [1:0] {
    TRG_SW   = 2'd0,    // software trigger, L2 generated after the window
    TRG_L1   = 2'd1,    // TTC L1 only, L2 generated after the window
    TRG_L1L2 = 2'd2     // TTC L1 and TTC L2 messages
  } trg_mode_e;

  // B-channel message word types, word[15:12]
  localparam logic [3:0] BCH_L1  = 4'h1;  // [9:0] L1 trigger word
  localparam logic [3:0] BCH_L2A = 4'h2;  // [11:0] bunch crossing, then 2 payload words
  localparam logic [3:0] BCH_L2R = 4'h3;  // [11:0] bunch crossing

  typedef struct packed {
    logic [23:0] evcnt;       // accepted-event number
    logic [9:0]  l1_word;     // L1 trigger word
    logic [11:0] bcid;        // bunch crossing latched at L1
    logic [31:0] l2_payload;  // part of the L2 message copied to the header
    trg_mode_e   mode;
  } ev_info_t;

  typedef struct packed {
    logic [15:0] l1;
    logic [15:0] l2a;
    logic [15:0] l2r;
    logic [15:0] bc_mismatch;
    logic [15:0] dropped;     // L1 lost because the FEC buffers were full
  } trg_cnt_t;

  // ---------------------------------------------------------------- DDL format
  localparam logic [7:0] HDR_VERSION = 8'h01;

  function automatic logic [31:0] ddl_header(input ev_info_t e, input int unsigned i);
    case (i)
      0:       return 32'hFFFF_FFFF;                         // length not known up front
      1:       return {HDR_VERSION, e.l1_word, 2'b00, e.bcid};
      2:       return {8'h00, e.evcnt};
      3:       return {30'h0, e.mode};
      4:       return e.l2_payload;
      default: return 32'h0;                                 // status / reserved
    endcase
  endfunction

  function automatic logic [31:0] ddl_trailer(input logic [23:0] n_payload_words);
    return {8'hA0, n_payload_words};
  endfunction

  // ---------------------------------------------------------------- sequencer
  // Instruction word: [31:28] opcode, [27:20] argument, [19:0] bus field.
  typedef enum logic [3:0] {
    OP_END   = 4'h0,   // stop
    OP_WR    = 4'h1,   // + data word: ALTRO write
    OP_RD    = 4'h2,   // ALTRO read, result appended to the result memory
    OP_BCAST = 4'h3,   // + data word: broadcast write
    OP_BLKWR = 4'h4,   // macro: + pointer-reg word, + {count,start} word, + count data words
    OP_BLKVF = 4'h5,   // macro: as BLKWR, but read back and compare
    OP_TRG   = 4'h6,   // macro: software trigger, wait for readout to finish
    OP_WAIT  = 4'h7    // wait [19:0] clock cycles
  } seq_op_e;

  // ---------------------------------------------------------------- registers
  localparam logic [15:0] A_IMEM     = 16'h0000;  // 0x0000-0x03FF
  localparam logic [15:0] A_RMEM     = 16'h0400;  // 0x0400-0x04FF, read only
  localparam logic [15:0] A_ACL      = 16'h0800;  // 0x0800-0x08FF
  localparam logic [15:0] A_ORD      = 16'h0900;  // 0x0900-0x09FF chip readout order (write)
  localparam logic [15:0] A_TRG_MODE = 16'h1000;
  localparam logic [15:0] A_L2_DELAY = 16'h1001;
  localparam logic [15:0] A_PWR      = 16'h1002;  // active FEC list / power state
  localparam logic [15:0] A_FCB_CMD  = 16'h1003;  // [29] read, [28:24] card, [23:16] reg, [15:0] data
  localparam logic [15:0] A_FCB_RES  = 16'h1004;
  localparam logic [15:0] A_MSM_STAT = 16'h1005;
  localparam logic [15:0] A_STATUS   = 16'h1006;
  localparam logic [15:0] A_VERIFY   = 16'h1007;  // automatic re-run period in clocks, 0 = off
  localparam logic [15:0] A_CNT_L1   = 16'h1008;  // 0x1008-0x100C trigger counters
  localparam logic [15:0] A_RO_ORDER = 16'h100D;  // [0] read chips in the order table's order
  localparam logic [15:0] A_CMD      = 16'h2000;  // [0] run sequencer, [1] software trigger

endpackage
