// ebc_pkg: constants and types shared by the expansion buffer cache.
//
// The cache serves a four-issue VLIW processor whose I-packets (groups of
// instructions issued together) are one to four instructions long and are
// packed back to back in memory, so a packet may start at any instruction
// slot of a cache block and may run into the next block ("straddle").
//
// Instruction format (this design's choice; the packet-length rules follow the
// document): 32-bit instructions, four bytes each, so a 32-byte block holds
// eight of them. Bit STOP_BIT of an instruction word marks the last
// instruction of its I-packet. Nothing else of the instruction is interpreted.
package ebc_pkg;

  // Width of one instruction word and the position of its end-of-packet mark.
  localparam int unsigned INST_W   = 32;
  localparam int unsigned STOP_BIT = 31;

  typedef logic [INST_W-1:0] inst_t;

  // Controller states.
  //   ST_IDLE   : waiting for a fetch request
  //   ST_LOOKUP : main cache (and, if enabled, expansion buffer) read for the front block
  //   ST_SECOND : second main cache read, of the successive block (double access)
  //   ST_MEMREQ : block read request presented to lower memory
  //   ST_MEMDAT : collecting refill beats
  //   ST_FILL   : writing the refilled block into the main cache
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_LOOKUP = 3'd1,
    ST_SECOND = 3'd2,
    ST_MEMREQ = 3'd3,
    ST_MEMDAT = 3'd4,
    ST_FILL   = 3'd5
  } ebc_state_e;

  // Instruction carries the end-of-packet mark.
  function automatic logic is_stop(inst_t i);
    return i[STOP_BIT];
  endfunction

endpackage
