// fetch_unit: round-robin fetch logic of the SEMPRES fetch stage.
//
// A token circulates among the NSLOTS slots, one slot per cycle, as in the
// source architecture's token ring. The slot holding the token is handled
// as follows (all decided combinationally within the cycle, applied at the
// closing edge):
//   busy slot, time-slice over or switch requested
//            -> process back to FP with its miss-status unchanged, slot idle
//   busy slot, L1 hit on the line at RDP.pc
//            -> the instructions from pc to the end of the line go into FI,
//               pc moves to the start of the next line, time-slice - 1
//   busy slot, L1 miss
//            -> process back to FP with miss-status 0, slot idle; nothing
//               is requested from L2 here (the prefetch logic does that)
//   idle slot, FP offers a prefetched process
//            -> the process is taken and, in the same cycle, fetched as
//               above (a miss sends it straight back)
//   idle slot, nothing prefetched in FP
//            -> nothing; the token simply moves on
// The token moves to the next slot every cycle whatever happened.
//
// This design's own choices: if FI lacks room for the line, or FP cannot
// take a process back, the slot does nothing this visit (EV_STALL; an idle
// slot is still loaded, EV_FILL). A process going back to FP gets a fresh
// time-slice of TSLICE fetches. The time-slice counts successful fetches.
//
// Interfaces: slot state in (busy, RDP, pending switch, FI room); per-slot
// RDP write, release and FI push count out, with one shared RDP value and
// one shared line of FI entries (only the token slot is ever written). The
// L1 read port is driven with the line address. ev/ev_slot/ev_loaded report
// what happened, for statistics.
module fetch_unit
  import sempres_pkg::*;
#(
  parameter int unsigned NSLOTS   = 8,
  parameter int unsigned FETCH_W  = 8,
  parameter int unsigned FI_DEPTH = 16,
  parameter int unsigned TSLICE   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // slots
  input  logic        slot_busy [NSLOTS],
  input  proc_desc_t  slot_rdp  [NSLOTS],
  input  logic        slot_sw   [NSLOTS],
  input  logic [$clog2(FI_DEPTH+1)-1:0] slot_free [NSLOTS],
  output logic        rdp_we    [NSLOTS],
  output logic        release_slot [NSLOTS],
  output logic [$clog2(FETCH_W+1)-1:0] push_n [NSLOTS],
  output proc_desc_t  rdp_d,
  output fi_entry_t   push_data [FETCH_W],
  // waiting-process queue
  input  logic        sched_valid,
  input  proc_desc_t  sched_desc,
  output logic        sched_take,
  output logic        ret_valid,
  output proc_desc_t  ret_desc,
  input  logic        ret_ready,
  // L1 read port
  output addr_t       l1_line,   // line looked up this cycle
  input  logic        l1_hit,
  input  instr_t      l1_data [FETCH_W],
  output logic        l1_rd_en,  // the looked-up line is fetched (LRU update)
  // statistics
  output fetch_event_e ev,
  output logic [$clog2(NSLOTS)-1:0] ev_slot,
  output logic        ev_loaded
);

  localparam int unsigned SW = (NSLOTS > 1) ? $clog2(NSLOTS) : 1;
  localparam int unsigned NW = $clog2(FETCH_W+1);
  localparam int unsigned OW = (FETCH_W > 1) ? $clog2(FETCH_W) : 1;

  logic [SW-1:0] token;

  always_ff @(posedge clk) begin
    if (!rst_n)                         token <= '0;
    else if (token == SW'(NSLOTS - 1))  token <= '0;
    else                                token <= token + 1'b1;
  end

  proc_desc_t    cur;
  logic          busy_s, load;
  logic [OW-1:0] off;
  logic [NW-1:0] n;
  logic          room;

  assign busy_s = slot_busy[token];
  assign load   = !busy_s && sched_valid;
  assign cur    = busy_s ? slot_rdp[token] : sched_desc;
  assign off    = OW'(cur.pc % FETCH_W);
  assign n      = NW'(FETCH_W) - NW'(off);
  assign room   = slot_free[token] >= ($clog2(FI_DEPTH+1))'(n);
  assign l1_line = addr_t'(cur.pc / FETCH_W);

  assign ev_slot   = token;
  assign ev_loaded = sched_take;

  always_comb begin
    for (int k = 0; k < FETCH_W; k++) begin
      push_data[k].pid   = cur.pid;
      push_data[k].addr  = cur.pc + addr_t'(k);
      push_data[k].instr = l1_data[(32'(off) + k) % FETCH_W];
    end
  end

  // Descriptor after a successful fetch, and descriptor sent back to FP.
  proc_desc_t advanced, back;
  always_comb begin
    advanced        = cur;
    advanced.pc     = cur.pc + addr_t'(n);
    advanced.tslice = (cur.tslice == '0) ? '0 : cur.tslice - 1'b1;
    back            = cur;
    back.tslice     = tslice_t'(TSLICE);
  end

  always_comb begin
    logic fetch;
    for (int i = 0; i < NSLOTS; i++) begin
      rdp_we[i]       = 1'b0;
      release_slot[i] = 1'b0;
      push_n[i]       = '0;
    end
    rdp_d      = advanced;
    sched_take = 1'b0;
    ret_valid  = 1'b0;
    ret_desc   = back;
    ev         = EV_PASS;
    fetch      = 1'b0;

    if (busy_s) begin
      if (cur.tslice == '0 || slot_sw[token]) begin
        if (ret_ready) begin
          ret_valid            = 1'b1;
          release_slot[token]  = 1'b1;
          ev                   = EV_SWITCH;
        end else begin
          ev = EV_STALL;
        end
      end else if (!room) begin
        ev = EV_STALL;
      end else if (l1_hit) begin
        fetch = 1'b1;
      end else if (ret_ready) begin
        ret_valid            = 1'b1;
        ret_desc.miss_status = 1'b0;
        release_slot[token]  = 1'b1;
        ev                   = EV_MISS;
      end else begin
        ev = EV_STALL;
      end
    end else if (load) begin
      sched_take = 1'b1;
      if (!room) begin
        rdp_we[token] = 1'b1;
        rdp_d         = cur;
        ev            = EV_FILL;
      end else if (l1_hit) begin
        fetch = 1'b1;
      end else begin
        // FP frees the taken entry in the same cycle, so it always has room.
        ret_valid            = 1'b1;
        ret_desc.miss_status = 1'b0;
        ev                   = EV_MISS;
      end
    end

    if (fetch) begin
      rdp_we[token] = 1'b1;
      rdp_d         = advanced;
      push_n[token] = n;
      ev            = EV_HIT;
    end
    l1_rd_en = fetch;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(ret_valid && !ret_ready))
        else $error("fetch_unit: process sent back to a full FP");
    end
  end

endmodule
