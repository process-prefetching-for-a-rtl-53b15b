// process_queue: the waiting-process queue FP of the SEMPRES fetch stage.
//
// FP keeps one descriptor per process that is waiting to be scheduled into
// a fetch slot, in arrival order (oldest at index 0). Each entry carries the
// "miss-status" flag: 0 means the line at the process' PC is not known to
// be in the L1 i-cache, 1 means the prefetch logic has brought it in. This
// split follows the source architecture; the queue organisation (a
// compacting array) is this design's own.
//
// Three users, all served in the same cycle:
//   * enqueue  (enq_*):   a process switched out of a slot, or a new process.
//   * schedule (sched_*): the oldest entry with miss-status 1 is offered;
//                         sched_take removes it (round-robin scheduling).
//   * prefetch (pf_*):    the oldest entry with miss-status 0 and no prefetch
//                         in flight is offered; pf_take marks it in flight.
//                         pf_done_valid/pf_done_pid sets miss-status of the
//                         process whose line has been written into L1.
// A process that leaves a slot for a reason other than a miss keeps the
// miss-status it arrives with; the enqueuing side decides the flag.
//
// Timing: all outputs are combinational from the registered queue; every
// update takes effect at the next rising clock edge. Reset is active low and
// synchronous, and empties the queue.
module process_queue
  import sempres_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // enqueue
  input  logic        enq_valid,
  input  proc_desc_t  enq_desc,
  output logic        enq_ready,
  // scheduling into a slot
  output logic        sched_valid,
  output proc_desc_t  sched_desc,
  input  logic        sched_take,
  // prefetch logic
  output logic        pf_valid,
  output proc_desc_t  pf_desc,
  input  logic        pf_take,
  input  logic        pf_done_valid,
  input  pid_t        pf_done_pid,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] num_prefetched
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  proc_desc_t q       [DEPTH];
  logic       pending [DEPTH];  // prefetch request in flight
  logic [CW-1:0] cnt;

  logic [IW-1:0] sched_idx, pf_idx;

  // Oldest prefetched entry and oldest entry still to be prefetched.
  always_comb begin
    sched_valid = 1'b0;
    sched_idx   = '0;
    pf_valid    = 1'b0;
    pf_idx      = '0;
    num_prefetched = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (CW'(i) < cnt) begin
        if (q[i].miss_status) begin
          sched_valid = 1'b1;
          sched_idx   = IW'(i);
          num_prefetched = num_prefetched + 1'b1;
        end else if (!pending[i]) begin
          pf_valid = 1'b1;
          pf_idx   = IW'(i);
        end
      end
    end
  end

  assign sched_desc = q[sched_idx];
  assign pf_desc    = q[pf_idx];
  assign enq_ready  = (cnt < CW'(DEPTH)) || (sched_take && sched_valid);
  assign count      = cnt;

  // Next state: flag updates, then removal with compaction, then append.
  proc_desc_t q_n [DEPTH];
  logic       p_n [DEPTH];
  logic [CW-1:0] cnt_n;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      q_n[i] = q[i];
      p_n[i] = pending[i];
    end
    cnt_n = cnt;
    // prefetch issued / completed
    if (pf_take && pf_valid) p_n[pf_idx] = 1'b1;
    if (pf_done_valid) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (CW'(i) < cnt && q[i].pid == pf_done_pid && pending[i]) begin
          q_n[i].miss_status = 1'b1;
          p_n[i] = 1'b0;
        end
      end
    end
    // removal of the scheduled entry
    if (sched_take && sched_valid) begin
      for (int i = 0; i < DEPTH-1; i++) begin
        if (IW'(i) >= sched_idx) begin
          q_n[i] = q_n[i+1];
          p_n[i] = p_n[i+1];
        end
      end
      cnt_n = cnt_n - 1'b1;
    end
    // append at the tail
    if (enq_valid && enq_ready) begin
      q_n[cnt_n[IW-1:0]] = enq_desc;
      p_n[cnt_n[IW-1:0]] = 1'b0;
      cnt_n = cnt_n + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        q[i]       <= '0;
        pending[i] <= 1'b0;
      end
    end else begin
      cnt <= cnt_n;
      for (int i = 0; i < DEPTH; i++) begin
        q[i]       <= q_n[i];
        pending[i] <= p_n[i];
      end
    end
  end

  // Handshake rules.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(sched_take && !sched_valid))
        else $error("process_queue: sched_take with no prefetched process");
      assert (!(pf_take && !pf_valid))
        else $error("process_queue: pf_take with nothing to prefetch");
      assert (!(enq_valid && !enq_ready))
        else $error("process_queue: enqueue into a full queue");
    end
  end

endmodule
