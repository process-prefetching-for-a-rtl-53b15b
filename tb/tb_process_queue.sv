// tb_process_queue: random enqueue / schedule / prefetch traffic on the
// waiting-process queue, checked each cycle against a queue model kept in
// the testbench (oldest prefetched entry offered for scheduling, oldest
// unprefetched and not-in-flight entry offered for prefetch, arrival order
// kept across removals, miss-status set only by a completed prefetch).
module tb_process_queue;
  import sempres_pkg::*;

  localparam int DEPTH = 16;
  localparam int CW = $clog2(DEPTH+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enq_valid, enq_ready, sched_valid, sched_take, pf_valid, pf_take, pf_done_valid;
  proc_desc_t enq_desc, sched_desc, pf_desc;
  pid_t pf_done_pid;
  logic [CW-1:0] count, num_prefetched;

  process_queue #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { proc_desc_t d; bit pend; } ent_t;
  ent_t m[$];
  int fulls = 0, bothcycles = 0;

  function automatic bit pid_in_use(pid_t p);
    foreach (m[i]) if (m[i].d.pid == p) return 1;
    return 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int si, pi, pendlist[$];
    enq_valid = 0; sched_take = 0; pf_take = 0; pf_done_valid = 0;
    enq_desc = '0; pf_done_pid = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive
      @(negedge clk);
      enq_valid = ($urandom_range(0, 99) < 55);
      enq_desc.pc = $urandom;
      enq_desc.tslice = tslice_t'($urandom);
      enq_desc.miss_status = $urandom_range(0, 1);
      do enq_desc.pid = pid_t'($urandom); while (pid_in_use(enq_desc.pid));
      sched_take = sched_valid && ($urandom_range(0, 99) < 40);
      pf_take    = pf_valid && ($urandom_range(0, 99) < 50);
      pendlist.delete();
      foreach (m[i]) if (m[i].pend) pendlist.push_back(i);
      pf_done_valid = (pendlist.size() > 0) && ($urandom_range(0, 99) < 40);
      if (pf_done_valid) pf_done_pid = m[pendlist[$urandom_range(0, pendlist.size()-1)]].d.pid;
      else pf_done_pid = pid_t'($urandom);
      #1;
      // expected outputs
      si = -1; pi = -1;
      foreach (m[i]) begin
        if (m[i].d.miss_status && si < 0) si = i;
        if (!m[i].d.miss_status && !m[i].pend && pi < 0) pi = i;
      end
      check(count == CW'(m.size()), "count");
      check(sched_valid == (si >= 0), "sched_valid");
      if (si >= 0) check(sched_desc == m[si].d, "sched_desc");
      check(pf_valid == (pi >= 0), "pf_valid");
      if (pi >= 0) check(pf_desc == m[pi].d, "pf_desc");
      begin
        int np;
        np = 0;
        foreach (m[i]) np += m[i].d.miss_status;
        check(num_prefetched == CW'(np), "num_prefetched");
      end
      check(enq_ready == (m.size() < DEPTH || (sched_take && si >= 0)), "enq_ready");
      if (m.size() == DEPTH) fulls++;
      if (enq_valid && sched_take) bothcycles++;
      if (!enq_ready) enq_valid = 0;
      #1;
      // model update: flags, removal, append
      if (pf_take && pi >= 0) m[pi].pend = 1;
      if (pf_done_valid)
        foreach (m[i]) if (m[i].d.pid == pf_done_pid && m[i].pend) begin
          m[i].d.miss_status = 1; m[i].pend = 0;
        end
      if (sched_take && si >= 0) m.delete(si);
      if (enq_valid) m.push_back('{d: enq_desc, pend: 0});
    end
    check(fulls > 0, "queue reached full");
    check(bothcycles > 0, "enqueue and removal in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
