// Shared types and constants of the time-triggered serial bus interface.
//
// A frame f(m) for a message of L bytes is TSS, FSS, then for every byte
// BSS followed by the byte, then FES:  TSS=0, FSS=1, BSS=1,0, FES=0,1.
// Its length is 4 + 10*L bits, and every frame bit is driven for REP clock
// cycles.  The receiver automaton and the sender walk through the same
// frame positions, so both use frame_pos_t.  The frame format and the
// 8-fold repetition follow the specification; the encodings, register map
// and struct layouts are this design's.
package fr_pkg;

  localparam int unsigned REP      = 8;   // clock cycles per frame bit
  localparam int unsigned STROBE_AT = 4;  // strobe when the bit counter is 4
  localparam int unsigned IO_W     = 32;  // width of every I/O port
  localparam int unsigned TI_W     = 16;  // width of the ECU timer ti

  // Frame positions.  POS_IDLE is also where TSS is sampled/sent.
  typedef enum logic [2:0] {
    POS_IDLE = 3'd0,  // bus idle; receiver samples TSS here
    POS_TSS  = 3'd1,  // sender only: driving TSS
    POS_FSS  = 3'd2,
    POS_BSS1 = 3'd3,  // receiver: BSS[1] or FES[1] (decided by the bit)
    POS_BSS0 = 3'd4,
    POS_DATA = 3'd5,  // b[7] .. b[0], index held separately
    POS_FES1 = 3'd6,  // sender only
    POS_FES0 = 3'd7
  } frame_pos_t;

  // Register map of the processor I/O ports (word addresses).
  localparam logic [7:0] A_DATA   = 8'h00;
  localparam logic [7:0] A_CMD    = 8'h01;  // write: command, read: status
  localparam logic [7:0] A_U      = 8'h02;
  localparam logic [7:0] A_NS     = 8'h03;
  localparam logic [2:0] A_ECU    = 3'b010; // 0x40 + slot
  localparam logic [2:0] A_ST     = 3'b011; // 0x60 + slot
  localparam logic [2:0] A_MLEN   = 3'b100; // 0x80 + slot
  localparam logic [2:0] A_WAKEUP = 3'b101; // 0xA0 + slot

  // Command register bits.
  localparam int unsigned CMD_CLR_SBP = 0;
  localparam int unsigned CMD_CLR_RBP = 1;
  localparam int unsigned CMD_CLR_IRQ = 2;
  localparam int unsigned CMD_CLR_ERR = 3;

  // One processor request on the I/O ports.
  typedef struct packed {
    logic            we;
    logic            re;
    logic [7:0]      addr;
    logic [IO_W-1:0] wdata;
  } io_req_t;

  // Schedule entry of one slot (widths fixed at their largest use).
  typedef struct packed {
    logic [7:0]  ecu;     // sending ECU number
    logic [TI_W-1:0] st;     // start time in timer ticks
    logic [15:0] mlen;    // message length in bytes
    logic [TI_W-1:0] wakeup;  // wakeup interrupt time in timer ticks
  } slot_cfg_t;

endpackage
