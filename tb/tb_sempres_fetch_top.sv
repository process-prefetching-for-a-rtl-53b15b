// tb_sempres_fetch_top: end-to-end run of the fetch/prefetch stage at its
// default size (8 slots, fetch width 8, 16 processes, L1 of 512 lines, 2-way) with
// an L2 of delay 3, i.e. a prefetch delay of 4 cycles.
//
// Sixteen processes are created, each in its own code region made of loops
// of LOOP_LEN instructions placed every LOOP_SPACING words: the emulated
// decode treats the last instruction of a loop as a taken branch and
// redirects the slot back to the loop start, so lines are reused and L1
// hits occur (a process that has left its slot before its branch is decoded
// falls through into the next loop); regions share L1 sets, so processes
// also evict each other. Processes 0-3
// start with a time-slice of 4 fetches, so time-slice switches happen.
// Decode dequeues a random number of instructions per slot per cycle, with
// slow phases so FI fills up.
//
// Checks: every dispatched instruction is the word stored at its address;
// every L2 response comes 4 cycles after the prefetch logic took the
// process from FP (the prefetch delay);
// within one slot, consecutive instructions of one process follow program
// order (sequential, or the loop start after a redirect); every process
// makes progress; each mechanism (hit, miss, token pass, time-slice switch,
// requested switch, FI stall, load without fetch, prefetch issued and
// completed, redirect with flush) happens at least once. The dispatch
// throughput (instructions at the FI heads per cycle) is printed.
module tb_sempres_fetch_top;
  import sempres_pkg::*;
  import sempres_tb_pkg::*;

  localparam int NS = 8, FW = 8, NPROC = 16, LOOP_LEN = 37, LOOP_SPACING = 64, CYCLES = 20000;
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
  logic slot_busy [NS];
  pid_t slot_pid [NS];

  sempres_fetch_top dut (.*);

  l2_model #(.FETCH_W(FW), .DELAY(3)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_line(l2_req_line),
    .req_pid(l2_req_pid), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .resp_pid(l2_resp_pid), .resp_data(l2_resp_data)
  );

  int checks = 0, failures = 0;
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
  int n_held = 0, n_not_taken = 0;
  int n_req_switch = 0, n_pf = 0, n_pf_done = 0, n_redir = 0, n_flush = 0, n_loaded = 0;
  longint deq_sum = 0, disp_sum = 0, disp_cycles = 0;

  initial begin
    repeat (CYCLES + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      check(pf_t.size() > 0 && cyc_cnt - pf_t[0] == 4, "prefetch delay of 4 cycles (L2 3 + 1)");
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
              redirect_pc[s] = e.addr - addr_t'(LOOP_LEN - 1) + addr_t'($urandom_range(0, 7));
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
    check(n_ev[EV_HIT] > 0, "L1 hit");
    check(n_ev[EV_MISS] > 0, "L1 miss, process back to FP");
    check(n_ev[EV_PASS] > 0, "token passed by an idle slot");
    check(n_ev[EV_SWITCH] > n_req_switch / 2 && n_ev[EV_SWITCH] > 0, "context switch");
    check(n_req_switch > 0, "requested switch");
    check(n_ev[EV_STALL] > 0, "FI stall");
    check(n_ev[EV_FILL] > 0, "slot loaded without fetch");
    check(n_loaded > 0, "slot loaded from FP");
    check(n_pf > 0 && n_pf_done > 0, "prefetch issued and completed");
    check(n_redir > 0 && n_flush > 0, "redirect with flush");
    $display("events: pass=%0d hit=%0d miss=%0d switch=%0d stall=%0d fill=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5]);
    $display("loads that missed at once (prefetched line already evicted): %0d", n_load_miss);
    $display("branches held=%0d not taken=%0d, slot re-entries=%0d", n_held, n_not_taken, n_jumps);
    $display("loaded=%0d prefetches=%0d completed=%0d redirects=%0d flushes=%0d req_switches=%0d",
             n_loaded, n_pf, n_pf_done, n_redir, n_flush, n_req_switch);
    $display("L1 hit rate %0d%%, dispatch throughput %0d.%02d instr/cycle",
             100 * n_ev[1] / (n_ev[1] + n_ev[2]), disp_sum / disp_cycles,
             (100 * disp_sum / disp_cycles) % 100);
    $display("instructions delivered to decode: %0d.%02d per cycle",
             deq_sum / disp_cycles, (100 * deq_sum / disp_cycles) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
