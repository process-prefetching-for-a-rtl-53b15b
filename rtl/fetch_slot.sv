// fetch_slot: one fetch slot of the SEMPRES fetch stage.
//
// A slot holds the process currently being fetched for it and the
// instructions fetched so far. As in the source architecture it has two
// parts:
//   * the RDP register: the process descriptor (PC, time-slice, ...), plus a
//     "busy" bit that is 0 while the slot holds no process;
//   * the FI queue: fetched instructions waiting for decode/dispatch, oldest
//     first, each tagged with its process id and word address.
// The fetch logic decides everything about the RDP: it writes a new
// descriptor (rdp_we) when it loads a process or advances the PC, and clears
// busy (release) when it sends the process back to the waiting queue. It
// pushes up to FETCH_W instructions (one L1 line) into FI per cycle.
// Decode removes up to FETCH_W instructions from the FI head per cycle
// (deq_n, at most head_count).
//
// Two requests from the later pipeline stages are held in the slot until the
// fetch logic next visits it (both are this design's interface to stages it
// does not contain):
//   * switch_req: a context switch requested by decode (one of the new
//     process-control instructions, or an I/O stall). Held in sw_pending.
//   * redirect_valid/redirect_pc: the PC of the running process changes
//     (taken branch or mispredict). Accepted (redirect_ack) only while the
//     slot is busy and not being released in the same cycle. It flushes at
//     once the youngest FI entries of the running process, drops a line
//     being pushed in the same cycle, and makes rdp.pc read as the new PC
//     until the fetch logic next writes the RDP.
//
// Timing: outputs are combinational from registers; all updates take effect
// at the next rising edge. fi_free is computed from the registered count, so
// it does not count room freed by a dequeue in the same cycle. Synchronous
// active-low reset empties FI and clears busy.
module fetch_slot
  import sempres_pkg::*;
#(
  parameter int unsigned FETCH_W  = 8,
  parameter int unsigned FI_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // RDP control from the fetch logic
  input  logic        rdp_we,
  input  proc_desc_t  rdp_d,
  input  logic        release_slot,
  output logic        busy,
  output proc_desc_t  rdp,         // pc reads as the pending redirect target
  output logic        sw_pending,
  // FI push from the fetch logic
  input  logic [$clog2(FETCH_W+1)-1:0] push_n,
  input  fi_entry_t   push_data [FETCH_W],
  output logic [$clog2(FI_DEPTH+1)-1:0] fi_free,
  // requests from later stages
  input  logic        switch_req,
  input  logic        redirect_valid,
  input  addr_t       redirect_pc,
  output logic        redirect_ack,
  // FI head to decode/dispatch
  output fi_entry_t   head [FETCH_W],
  output logic [$clog2(FETCH_W+1)-1:0] head_count,
  input  logic [$clog2(FETCH_W+1)-1:0] deq_n
);

  localparam int unsigned PW = (FI_DEPTH > 1) ? $clog2(FI_DEPTH) : 1;
  localparam int unsigned CW = $clog2(FI_DEPTH+1);
  localparam int unsigned NW = $clog2(FETCH_W+1);

  fi_entry_t  fi [FI_DEPTH];
  logic [PW-1:0] hd;
  logic [CW-1:0] cnt;

  proc_desc_t rdp_q;
  logic       busy_q;
  logic       redir_pend;
  addr_t      redir_pc;

  function automatic logic [PW-1:0] wrap(input int unsigned p);
    return PW'(p % FI_DEPTH);
  endfunction

  assign busy       = busy_q;
  assign fi_free    = CW'(FI_DEPTH) - cnt;
  assign head_count = (cnt > CW'(FETCH_W)) ? NW'(FETCH_W) : NW'(cnt);
  assign redirect_ack = redirect_valid && busy_q && !release_slot;

  always_comb begin
    rdp = rdp_q;
    if (redir_pend) rdp.pc = redir_pc;
  end

  always_comb begin
    for (int k = 0; k < FETCH_W; k++) head[k] = fi[wrap(32'(hd) + 32'(k))];
  end

  // Length of the run of youngest entries that belong to the running
  // process, among those left after this cycle's dequeue.
  logic [CW-1:0] flush_len;
  always_comb begin
    logic run;
    run = 1'b1;
    flush_len = '0;
    for (int k = FI_DEPTH-1; k >= 0; k--) begin
      if (CW'(k) < cnt && CW'(k) >= CW'(deq_n)) begin
        if (run && fi[wrap(32'(hd) + 32'(k))].pid == rdp_q.pid) flush_len = flush_len + 1'b1;
        else run = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hd         <= '0;
      cnt        <= '0;
      busy_q     <= 1'b0;
      rdp_q      <= '0;
      redir_pend <= 1'b0;
      redir_pc   <= '0;
      sw_pending <= 1'b0;
      for (int i = 0; i < FI_DEPTH; i++) fi[i] <= '0;
    end else begin
      // FI: dequeue at the head, flush or push at the tail
      hd <= wrap(32'(hd) + 32'(deq_n));
      if (redirect_ack) begin
        cnt <= cnt - CW'(deq_n) - flush_len;
      end else begin
        for (int k = 0; k < FETCH_W; k++)
          if (NW'(k) < push_n) fi[wrap(32'(hd) + 32'(cnt) + 32'(k))] <= push_data[k];
        cnt <= cnt - CW'(deq_n) + CW'(push_n);
      end

      // RDP
      if (release_slot) begin
        busy_q <= 1'b0;
      end else if (rdp_we) begin
        busy_q <= 1'b1;
        rdp_q  <= rdp_d;
      end

      // held requests
      if (redirect_ack) begin
        redir_pend <= 1'b1;
        redir_pc   <= redirect_pc;
      end else if (rdp_we || release_slot) begin
        redir_pend <= 1'b0;
      end

      if (release_slot)                sw_pending <= 1'b0;
      else if (switch_req && busy_q)   sw_pending <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (CW'(deq_n) <= cnt && deq_n <= head_count)
        else $error("fetch_slot: dequeue of more instructions than FI holds");
      assert (CW'(push_n) <= fi_free)
        else $error("fetch_slot: push into FI beyond its free room");
    end
  end

endmodule
