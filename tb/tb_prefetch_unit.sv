// tb_prefetch_unit: feeds the prefetch logic a stream of waiting processes
// and plays L2 itself (fixed delay, optional back-pressure on requests).
// Checks: the L2 request carries the line address pc/FETCH_W and the pid;
// a request is held unchanged until accepted; every taken process is
// completed exactly once, with the L1 fill carrying the right line and
// words; with L2 always ready, the time from taking a process to its
// completion is the prefetch delay 1 + L2 delay (= 4 for an L2 delay of 3).
module tb_prefetch_unit;
  import sempres_pkg::*;
  import sempres_tb_pkg::*;

  localparam int FW = 8, L2D = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pf_valid, pf_take, done_valid, l2_req_valid, l2_req_ready, l2_resp_valid, fill_valid;
  proc_desc_t pf_desc;
  pid_t done_pid, l2_req_pid, l2_resp_pid;
  addr_t l2_req_line, l2_resp_line, fill_line;
  instr_t l2_resp_data [FW];
  instr_t fill_data [FW];

  prefetch_unit #(.FETCH_W(FW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // L2 played by the testbench: accepted requests return L2D cycles later.
  typedef struct { addr_t line; pid_t pid; int due; } l2req_t;
  l2req_t l2q[$];
  bit random_ready = 0;

  // processes taken, by pid: cycle taken and expected line
  int    taken_at [256];
  addr_t want_line [256];
  bit    outstanding [256];
  int completed = 0, exact_latency = 0, held = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pid_t nxt;
    addr_t last_line; pid_t last_pid; bit last_wait;
    nxt = 0; last_wait = 0; last_line = '0; last_pid = '0;
    pf_valid = 0; pf_desc = '0; l2_req_ready = 1; l2_resp_valid = 0;
    l2_resp_line = '0; l2_resp_pid = '0;
    foreach (l2_resp_data[k]) l2_resp_data[k] = '0;
    foreach (outstanding[i]) outstanding[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (t == 3000) random_ready = 1;
      l2_req_ready = random_ready ? ($urandom_range(0, 99) < 50) : 1'b1;
      // response due this cycle
      l2_resp_valid = (l2q.size() > 0) && (l2q[0].due == cyc);
      if (l2_resp_valid) begin
        l2_resp_line = l2q[0].line; l2_resp_pid = l2q[0].pid;
        for (int k = 0; k < FW; k++) l2_resp_data[k] = instr_at(l2q[0].line * FW + addr_t'(k));
      end
      // offer a waiting process (pids cycle; one in flight per pid at most)
      pf_valid = !outstanding[nxt] && ($urandom_range(0, 99) < 60);
      pf_desc  = '{pid: nxt, pc: $urandom, tslice: '0, miss_status: 1'b0};
      #1;
      // request held stable while not accepted
      if (last_wait) begin
        held++;
        check(l2_req_valid && l2_req_line == last_line && l2_req_pid == last_pid, "request held");
      end
      // completion
      check(done_valid == l2_resp_valid && fill_valid == l2_resp_valid, "done/fill with response");
      if (done_valid) begin
        check(outstanding[done_pid], "completion of an outstanding process");
        check(fill_line == want_line[done_pid], "fill line");
        for (int k = 0; k < FW; k++)
          check(fill_data[k] == instr_at(want_line[done_pid] * FW + addr_t'(k)), "fill data");
        if (!random_ready) begin
          check(cyc - taken_at[done_pid] == 1 + L2D, "prefetch delay 1 + L2 delay");
          exact_latency++;
        end
        outstanding[done_pid] = 0;
        completed++;
      end
      check(pf_take == (pf_valid && (!l2_req_valid || l2_req_ready)), "pf_take rule");
      if (pf_take) begin
        taken_at[nxt] = cyc; want_line[nxt] = pf_desc.pc / FW; outstanding[nxt] = 1;
        nxt++;
      end
      if (l2_req_valid && l2_req_ready) begin
        check(outstanding[l2_req_pid] && l2_req_line == want_line[l2_req_pid], "request line/pid");
        l2q.push_back('{line: l2_req_line, pid: l2_req_pid, due: cyc + L2D});
      end
      if (l2_resp_valid) void'(l2q.pop_front());
      last_wait = l2_req_valid && !l2_req_ready;
      last_line = l2_req_line; last_pid = l2_req_pid;
    end
    check(completed > 1000 && exact_latency > 500 && held > 100, "enough traffic");
    $display("completed=%0d exact_latency=%0d held=%0d", completed, exact_latency, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
