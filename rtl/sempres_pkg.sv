// sempres_pkg: types and widths shared by the SEMPRES fetch/prefetch stage.
//
// A process descriptor carries the fields the waiting-process queue (FP)
// keeps for each process: identification, program counter, remaining
// time-slice and the "miss-status" flag that tells whether the line at the
// process' PC has been brought into the L1 i-cache by the prefetch logic.
// The same descriptor, minus the meaning of miss-status, is what a slot's
// RDP register holds while the process is being fetched.
//
// Widths are this design's choice: the source architecture names the
// fields but gives no sizes. PCs are real (translated) instruction-word
// addresses; an instruction is one 32-bit word.
package sempres_pkg;

  parameter int unsigned PID_W   = 8;   // process identification
  parameter int unsigned ADDR_W  = 32;  // real instruction-word address
  parameter int unsigned TS_W    = 16;  // time-slice counter
  parameter int unsigned INSTR_W = 32;  // one instruction

  typedef logic [PID_W-1:0]   pid_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [TS_W-1:0]    tslice_t;
  typedef logic [INSTR_W-1:0] instr_t;

  // Descriptor of a process as held in FP and in a slot's RDP register.
  typedef struct packed {
    pid_t    pid;
    addr_t   pc;
    tslice_t tslice;
    logic    miss_status;  // 1: line at pc was prefetched into L1
  } proc_desc_t;

  // One entry of a slot's fetched-instruction queue (FI).
  typedef struct packed {
    pid_t   pid;
    addr_t  addr;
    instr_t instr;
  } fi_entry_t;

  // What the fetch logic did with the slot that held the token this cycle.
  typedef enum logic [2:0] {
    EV_PASS    = 3'd0,  // idle slot, no prefetched process: token passed
    EV_HIT     = 3'd1,  // L1 hit: one line moved into FI
    EV_MISS    = 3'd2,  // L1 miss: process sent back to FP, miss-status 0
    EV_SWITCH  = 3'd3,  // time-slice over or switch request: process back to FP
    EV_STALL   = 3'd4,  // FI lacks room for the line (or FP full): nothing done
    EV_FILL    = 3'd5   // idle slot loaded from FP, FI full so no fetch yet
  } fetch_event_e;

endpackage
