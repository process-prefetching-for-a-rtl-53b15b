// sempres_fetch_top: fetch stage of SEMPRES with process prefetching.
//
// SEMPRES is a simultaneous multithreaded processor that runs independent
// processes rather than threads of one program. Its fetch stage keeps
// NSLOTS slots, each fetching for one process, and a queue FP of processes
// waiting for a slot. The problem is the i-cache: with many processes
// sharing L1, a process that has just been switched in usually misses. The
// remedy wired up here is process prefetching: while the fetch logic feeds
// the slots from L1, the prefetch logic walks FP and brings the line at
// each waiting process' PC from L2 into L1 ahead of time. Only processes
// whose line has been prefetched (miss-status 1) are switched into a slot;
// a process that misses in its slot is sent back to FP with miss-status 0
// and waits for the prefetch logic again.
//
//   L2 port <-> prefetch_unit -> l1_icache -> fetch_unit -> fetch_slot x NSLOTS -> dispatch
//                     ^                          |  ^
//                     +------ process_queue <----+  +---- process_queue
//
// Interfaces brought out (the rest of the processor is not part of this
// design): process creation into FP; per slot a switch request and a PC
// redirect from the later stages, and the FI head with a dequeue count
// towards decode/dispatch; the L2 request/response port; event outputs for
// statistics, and which process each slot holds. A created process is
// accepted only in cycles where the fetch logic sends no process back to FP
// (create_ready).
//
// Defaults: 8 slots, 8-instruction fetch width (= line size), 16 processes
// in FP - the base configuration of the source architecture. FI depth, L1
// size and time-slice length are this design's choices. Synchronous
// active-low reset.
module sempres_fetch_top
  import sempres_pkg::*;
#(
  parameter int unsigned NSLOTS   = 8,
  parameter int unsigned FETCH_W  = 8,
  parameter int unsigned FP_DEPTH = 16,
  parameter int unsigned FI_DEPTH = 16,
  parameter int unsigned L1_LINES = 512,
  parameter int unsigned L1_WAYS  = 2,
  parameter int unsigned TSLICE   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // process creation
  input  logic        create_valid,
  input  proc_desc_t  create_desc,
  output logic        create_ready,
  // from later stages, per slot
  input  logic        switch_req     [NSLOTS],
  input  logic        redirect_valid [NSLOTS],
  input  addr_t       redirect_pc    [NSLOTS],
  output logic        redirect_ack   [NSLOTS],
  // to decode/dispatch, per slot
  output fi_entry_t   disp_head  [NSLOTS][FETCH_W],
  output logic [$clog2(FETCH_W+1)-1:0] disp_count [NSLOTS],
  input  logic [$clog2(FETCH_W+1)-1:0] disp_deq   [NSLOTS],
  // L2
  output logic        l2_req_valid,
  input  logic        l2_req_ready,
  output addr_t       l2_req_line,
  output pid_t        l2_req_pid,
  input  logic        l2_resp_valid,
  input  addr_t       l2_resp_line,
  input  pid_t        l2_resp_pid,
  input  instr_t      l2_resp_data [FETCH_W],
  // statistics
  output fetch_event_e ev,
  output logic [$clog2(NSLOTS)-1:0] ev_slot,
  output logic        ev_loaded,
  output logic        pf_issue,
  output logic [$clog2(FP_DEPTH+1)-1:0] fp_count,
  output logic [$clog2(FP_DEPTH+1)-1:0] fp_prefetched,
  output logic        slot_busy [NSLOTS],
  output pid_t        slot_pid  [NSLOTS]
);

  localparam int unsigned FCW = $clog2(FI_DEPTH+1);
  localparam int unsigned NW  = $clog2(FETCH_W+1);

  // slot <-> fetch logic
  proc_desc_t slot_rdp  [NSLOTS];
  logic       slot_sw   [NSLOTS];
  logic [FCW-1:0] slot_free [NSLOTS];
  logic       rdp_we    [NSLOTS];
  logic       rel       [NSLOTS];
  logic [NW-1:0] push_n [NSLOTS];
  proc_desc_t rdp_d;
  fi_entry_t  push_data [FETCH_W];

  // FP
  logic       sched_valid, sched_take;
  proc_desc_t sched_desc;
  logic       ret_valid, enq_ready;
  proc_desc_t ret_desc;
  logic       pf_valid, pf_take, pf_done_valid;
  proc_desc_t pf_desc;
  pid_t       pf_done_pid;

  // L1
  addr_t  l1_line, fill_line;
  logic   l1_hit, l1_rd_en, fill_valid;
  instr_t l1_data [FETCH_W];
  instr_t fill_data [FETCH_W];

  // FP enqueue: a process coming back from a slot wins over a new one.
  logic       enq_valid;
  proc_desc_t enq_desc;
  assign enq_valid    = ret_valid || (create_valid && enq_ready);
  assign enq_desc     = ret_valid ? ret_desc : create_desc;
  assign create_ready = enq_ready && !ret_valid;
  assign pf_issue     = pf_take;

  process_queue #(.DEPTH(FP_DEPTH)) u_fp (
    .clk, .rst_n,
    .enq_valid, .enq_desc, .enq_ready,
    .sched_valid, .sched_desc, .sched_take,
    .pf_valid, .pf_desc, .pf_take,
    .pf_done_valid, .pf_done_pid,
    .count(fp_count), .num_prefetched(fp_prefetched)
  );

  prefetch_unit #(.FETCH_W(FETCH_W)) u_pf (
    .clk, .rst_n,
    .pf_valid, .pf_desc, .pf_take,
    .done_valid(pf_done_valid), .done_pid(pf_done_pid),
    .l2_req_valid, .l2_req_ready, .l2_req_line, .l2_req_pid,
    .l2_resp_valid, .l2_resp_line, .l2_resp_pid, .l2_resp_data,
    .fill_valid, .fill_line, .fill_data
  );

  l1_icache #(.FETCH_W(FETCH_W), .LINES(L1_LINES), .WAYS(L1_WAYS)) u_l1 (
    .clk, .rst_n,
    .rd_en(l1_rd_en), .rd_line(l1_line), .rd_hit(l1_hit), .rd_data(l1_data),
    .fill_valid, .fill_line, .fill_data
  );

  fetch_unit #(.NSLOTS(NSLOTS), .FETCH_W(FETCH_W), .FI_DEPTH(FI_DEPTH),
               .TSLICE(TSLICE)) u_fetch (
    .clk, .rst_n,
    .slot_busy, .slot_rdp, .slot_sw, .slot_free,
    .rdp_we, .release_slot(rel), .push_n, .rdp_d, .push_data,
    .sched_valid, .sched_desc, .sched_take,
    .ret_valid, .ret_desc, .ret_ready(enq_ready),
    .l1_line, .l1_hit, .l1_data, .l1_rd_en,
    .ev, .ev_slot, .ev_loaded
  );

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    assign slot_pid[s] = slot_rdp[s].pid;
    fetch_slot #(.FETCH_W(FETCH_W), .FI_DEPTH(FI_DEPTH)) u_slot (
      .clk, .rst_n,
      .rdp_we(rdp_we[s]), .rdp_d, .release_slot(rel[s]),
      .busy(slot_busy[s]), .rdp(slot_rdp[s]), .sw_pending(slot_sw[s]),
      .push_n(push_n[s]), .push_data, .fi_free(slot_free[s]),
      .switch_req(switch_req[s]),
      .redirect_valid(redirect_valid[s]), .redirect_pc(redirect_pc[s]),
      .redirect_ack(redirect_ack[s]),
      .head(disp_head[s]), .head_count(disp_count[s]), .deq_n(disp_deq[s])
    );
  end

endmodule
