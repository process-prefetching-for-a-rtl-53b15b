// prefetch_unit: the process-prefetch logic between L2 and the L1 i-cache.
//
// While the fetch logic feeds the slots from L1, this unit works on the
// waiting-process queue FP: it takes the oldest waiting process whose
// miss-status is 0, asks L2 for the line that holds the process' PC, writes
// the returned line into L1 and then sets the process' miss-status to 1, so
// the process may be scheduled into a slot. This is the mechanism of the
// source architecture. Fetching exactly one line (the one at the PC) per
// prefetch is this design's reading of it.
//
// L2 interface (L2 itself is outside this design):
//   request  l2_req_valid/l2_req_ready, line address, process id as tag;
//   response l2_resp_valid with the same line address and tag, and the line.
// Responses may come back in any order and several requests may be in
// flight; the tag identifies the process to mark.
//
// Timing: one cycle of prefetch logic. A process taken from FP in cycle t
// has its request on the L2 port from cycle t+1 (held until accepted). An L2
// of fixed delay D answers in cycle t+1+D; in that cycle the line is written
// into L1 and the miss-status set (both at the closing edge), so the process
// can be scheduled from cycle t+2+D. With the source's figures (L2 delay 3)
// the prefetch delay is 1+3 = 4 cycles. Synchronous active-low reset.
module prefetch_unit
  import sempres_pkg::*;
#(
  parameter int unsigned FETCH_W = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // waiting-process queue
  input  logic        pf_valid,
  input  proc_desc_t  pf_desc,
  output logic        pf_take,
  output logic        done_valid,
  output pid_t        done_pid,
  // L2 request
  output logic        l2_req_valid,
  input  logic        l2_req_ready,
  output addr_t       l2_req_line,
  output pid_t        l2_req_pid,
  // L2 response
  input  logic        l2_resp_valid,
  input  addr_t       l2_resp_line,
  input  pid_t        l2_resp_pid,
  input  instr_t      l2_resp_data [FETCH_W],
  // L1 fill
  output logic        fill_valid,
  output addr_t       fill_line,
  output instr_t      fill_data [FETCH_W]
);

  logic  req_v;
  addr_t req_line;
  pid_t  req_pid;

  assign pf_take      = pf_valid && (!req_v || l2_req_ready);
  assign l2_req_valid = req_v;
  assign l2_req_line  = req_line;
  assign l2_req_pid   = req_pid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_v    <= 1'b0;
      req_line <= '0;
      req_pid  <= '0;
    end else if (pf_take) begin
      req_v    <= 1'b1;
      req_line <= addr_t'(pf_desc.pc / FETCH_W);
      req_pid  <= pf_desc.pid;
    end else if (l2_req_ready) begin
      req_v    <= 1'b0;
    end
  end

  // Returned line: into L1, then the process is marked prefetched.
  assign fill_valid = l2_resp_valid;
  assign fill_line  = l2_resp_line;
  always_comb
    for (int k = 0; k < FETCH_W; k++) fill_data[k] = l2_resp_data[k];
  assign done_valid = l2_resp_valid;
  assign done_pid   = l2_resp_pid;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(req_v && $past(req_v) && !$past(l2_req_ready) &&
                (req_line != $past(req_line))))
        else $error("prefetch_unit: L2 request changed before it was accepted");
    end
  end

endmodule
