// fetch_workload: one run of the synthetic multi-process workload on the
// fetch/prefetch stage at a given configuration (slots, fetch width, L2
// delay, process count). It is the driver of tb_sempres_fetch_top made
// parameterizable, for the configuration sweep in tb_workloads: sixteen
// processes running chains of loops in their own code regions, decode emulated with random
// dequeues and loop-closing redirects, slow decode phases, requested
// switches and short first time-slices. JUMP_PCT percent of the taken
// loop-closing branches go to a random loop start of the process' own
// region instead of back to their loop (0 by default), which lowers the
// L1 hit rate.
//
// Checks, counted into checks/failures: instruction words match their
// addresses, program order within a slot, progress of every process, the
// prefetch delay at system level (each L2 response comes 1 + L2D cycles after
// the prefetch logic took the process from FP) and the fetch bandwidth bound
// (at most one line, FETCH_W instructions, per cycle on average). When done,
// it prints its configuration, the L1 hit rate and the instructions
// delivered per cycle, and raises done.
module fetch_workload #(
  parameter int NS = 8,
  parameter int FW = 8,
  parameter int L2D = 3,
  parameter int CYCLES = 20000,
  parameter int JUMP_PCT = 0
) (
  output bit done,
  output int checks,
  output int failures,
  output int hit_pct,
  output int thr_x100
);
  import sempres_pkg::*;
  import sempres_tb_pkg::*;

  localparam int NPROC = 16, LOOP_LEN = 37, LOOP_SPACING = 64, NLOOPS = 16;
  localparam int NW = $clog2(FW+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic create_valid, create_ready;
  proc_desc_t create_desc;
  logic switch_req [NS];
  logic redirect_valid [NS];
  addr_t redirect_pc [NS];
  logic redirect_ack [NS];
  fi_entry_t disp_head [NS][FW];
  logic [NW-1:0] disp_count [NS];
  logic [NW-1:0] disp_deq [NS];
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  addr_t l2_req_line, l2_resp_line;
  pid_t l2_req_pid, l2_resp_pid;
  instr_t l2_resp_data [FW];
  fetch_event_e ev;
  logic [$clog2(NS)-1:0] ev_slot;
  logic ev_loaded, pf_issue;
  logic [$clog2(NPROC+1)-1:0] fp_count, fp_prefetched;
  initial begin done = 0; checks = 0; failures = 0; hit_pct = 0; thr_x100 = 0; end
  logic slot_busy [NS];
  pid_t slot_pid [NS];

  sempres_fetch_top #(.NSLOTS(NS), .FETCH_W(FW)) dut (.*);

  l2_model #(.FETCH_W(FW), .DELAY(L2D)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_line(l2_req_line),
    .req_pid(l2_req_pid), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .resp_pid(l2_resp_pid), .resp_data(l2_resp_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic addr_t base_of(input int p);
    return addr_t'(p * 1024 + p * 40);
  endfunction

  // per-slot program-order tracking
  bit    have_last [NS];
  pid_t  last_pid  [NS];
  addr_t next_addr [NS];
  int    progress  [NPROC];
  // mechanism counters
  int n_ev [8];
  int    redir_rem [NS];
  addr_t not_taken_next [NS];
  int created = 0;
  int n_load_miss = 0;
  int load_credit [NS];
  int pf_t[$];
  int cyc_cnt = 0;
  int n_jumps = 0;
  int n_held = 0, n_not_taken = 0, n_far = 0;
  int n_req_switch = 0, n_pf = 0, n_pf_done = 0, n_redir = 0, n_flush = 0, n_loaded = 0;
  longint deq_sum = 0, disp_sum = 0, disp_cycles = 0;


  // statistics at every edge
  always @(posedge clk) if (rst_n) begin
    n_ev[int'(ev)]++;
    if (create_valid && create_ready) created++;
    if (ev_loaded) begin
      n_loaded++;
      if (ev == EV_MISS) n_load_miss++;
      load_credit[ev_slot]++;
    end
    if (pf_issue) n_pf++;
    if (l2_resp_valid) n_pf_done++;
    if (pf_issue) pf_t.push_back(cyc_cnt);
    if (l2_resp_valid) begin
      check(pf_t.size() > 0 && cyc_cnt - pf_t[0] == 1 + L2D, "prefetch delay = 1 + L2 delay");
      if (pf_t.size() > 0) void'(pf_t.pop_front());
    end
  end
  always @(posedge clk) cyc_cnt <= cyc_cnt + 1;

  initial begin
    int slow, dq, remain;
    bit all_same, have_last_prev;
    fi_entry_t e;
    foreach (n_ev[i]) n_ev[i] = 0;
    foreach (progress[i]) progress[i] = 0;
    create_valid = 0; create_desc = '0;
    for (int s = 0; s < NS; s++) begin
      switch_req[s] = 0; redirect_valid[s] = 0; redirect_pc[s] = '0; disp_deq[s] = '0;
      have_last[s] = 0; last_pid[s] = '0; next_addr[s] = '0; load_credit[s] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    slow = 0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // process creation (accepted processes are counted at the clock edge)
      create_valid = created < NPROC;
      create_desc = '{pid: pid_t'(created), pc: base_of(created),
                      tslice: (created < 4) ? tslice_t'(4) : tslice_t'(256),
                      miss_status: 1'b0};
      if (cyc % 2000 == 1000) slow = 300;
      if (slow > 0) slow--;
      #1;
      for (int s = 0; s < NS; s++) begin
        switch_req[s] = ($urandom_range(0, 999) < 2);
        redirect_valid[s] = 0;
        dq = (slow > 0) ? 0 : $urandom_range(0, int'(disp_count[s]));
        disp_deq[s] = NW'(dq);
        // check dispatched entries and look for the loop-closing branch
        have_last_prev = have_last[s];
        for (int k = 0; k < dq; k++) begin
          e = disp_head[s][k];
          check(e.instr == instr_at(e.addr), "instruction word matches its address");
          // A process may leave the slot and come back later after another
          // slot fetched (and perhaps looped) for it: one jump is allowed per
          // load into this slot seen since.
          if (have_last[s] && e.pid == last_pid[s] && e.addr != next_addr[s] &&
              load_credit[s] > 0) begin
            load_credit[s]--;
            n_jumps++;
          end else if (have_last[s] && e.pid == last_pid[s]) begin
            check(e.addr == next_addr[s], "program order within a slot");
            if (e.addr != next_addr[s])
              $display("  slot %0d pid %0d addr %h expected %h", s, e.pid, e.addr, next_addr[s]);
          end
          have_last[s] = 1; last_pid[s] = e.pid; next_addr[s] = e.addr + 1;
          if (int'(e.pid) < NPROC) progress[int'(e.pid)]++;
          if ((e.addr - base_of(int'(e.pid))) % LOOP_SPACING == LOOP_LEN - 1) begin
            // Taken branch. Redirect only when everything younger in this FI
            // is certainly the same process' wrong path; while the process
            // still holds the slot but that is not yet certain, keep the
            // branch at the FI head. A process no longer in the slot has
            // its PC elsewhere: the branch is then treated as not taken.
            all_same = slot_busy[s] && slot_pid[s] == e.pid && int'(disp_count[s]) < FW;
            for (int j = k + 1; j < int'(disp_count[s]); j++)
              if (disp_head[s][j].pid != e.pid) all_same = 0;
            if (all_same) begin
              remain = int'(disp_count[s]) - (k + 1);
              disp_deq[s] = NW'(k + 1);
              redirect_valid[s] = 1;
              if ($urandom_range(0, 99) < JUMP_PCT) begin
                // far jump: a random loop of the process' region, likely cold
                redirect_pc[s] = base_of(int'(e.pid)) +
                                 addr_t'(LOOP_SPACING * $urandom_range(0, NLOOPS - 1)) +
                                 addr_t'($urandom_range(0, 7));
                n_far++;
              end else begin
                redirect_pc[s] = e.addr - addr_t'(LOOP_LEN - 1) + addr_t'($urandom_range(0, 7));
              end
              next_addr[s] = redirect_pc[s];
              redir_rem[s] = remain;
              not_taken_next[s] = e.addr + 1;
            end else if (slot_busy[s] && slot_pid[s] == e.pid) begin
              disp_deq[s] = NW'(k);           // branch waits at the head
              progress[int'(e.pid)]--;
              next_addr[s] = e.addr;
              if (k == 0) have_last[s] = have_last_prev;
              else last_pid[s] = e.pid;
              n_held++;
            end else begin
              next_addr[s] = e.addr + 1;
              n_not_taken++;
            end
            break;
          end
        end
        disp_sum += longint'(disp_count[s]);
        deq_sum += longint'(disp_deq[s]);
      end
      disp_cycles++;
      #1;
      for (int s = 0; s < NS; s++) begin
        if (switch_req[s] && slot_busy[s]) n_req_switch++;
        if (redirect_valid[s]) begin
          if (redirect_ack[s]) begin
            n_redir++;
            if (redir_rem[s] > 0) n_flush++;
          end else begin
            next_addr[s] = not_taken_next[s];  // slot released: old path continues
          end
        end
      end
      @(negedge clk);
    end
    for (int s = 0; s < NS; s++) begin
      disp_deq[s] = '0; redirect_valid[s] = 0; switch_req[s] = 0;
    end
    create_valid = 0;
    for (int p = 0; p < NPROC; p++) check(progress[p] > 0, "every process makes progress");
    check(deq_sum <= longint'(FW) * disp_cycles, "at most one line fetched per cycle");
    hit_pct = 100 * n_ev[1] / (n_ev[1] + n_ev[2]);
    thr_x100 = int'(100 * deq_sum / disp_cycles);
    if (JUMP_PCT > 0) check(n_far > 0, "far jumps happened");
    $display("config slots=%0d fetch_width=%0d prefetch_delay=%0d far_jumps=%0d%%: L1 hit %0d%%, %0d.%02d instr/cycle delivered, %0d switches, %0d loads, %0d of them missing at once",
             NS, FW, L2D + 1, JUMP_PCT, hit_pct, thr_x100 / 100, thr_x100 % 100, n_ev[EV_SWITCH], n_loaded, n_load_miss);
    done = 1;
  end
endmodule
