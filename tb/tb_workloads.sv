// tb_workloads: the configuration sweep of the process-prefetching fetch
// stage. Runs the synthetic looping multi-process workload (fetch_workload)
// side by side at the configurations the architecture was evaluated at:
// the base configuration (8 slots, fetch width 8, prefetch delay 4, 16
// processes), 4 and 6 slots, fetch widths 12 and 16, and prefetch delays
// (1 + L2 delay) of 2, 9, 12 and 16 cycles. Each run checks itself (see
// fetch_workload); this testbench adds the results up. The hit rate is a
// property of the workload and of L1 conflicts, not a set input, so for the
// hit-rate sweep the base configuration is also run with 10, 25, 50 and
// 100% of the loop-closing branches jumping to a random (likely cold) loop
// of the process' region: there the testbench checks that the L1 hit rate
// and the delivered instructions per cycle both fall as the share of far
// jumps rises. Other configurations are not compared with each other.
module tb_workloads;
  localparam int N = 13;

  bit done [N];
  int chk [N], fl [N], hit [N], thr [N];

  fetch_workload #(.NS(8), .FW(8),  .L2D(3))  w_base (done[0], chk[0], fl[0], hit[0], thr[0]);
  fetch_workload #(.NS(4), .FW(8),  .L2D(3))  w_s4   (done[1], chk[1], fl[1], hit[1], thr[1]);
  fetch_workload #(.NS(6), .FW(8),  .L2D(3))  w_s6   (done[2], chk[2], fl[2], hit[2], thr[2]);
  fetch_workload #(.NS(8), .FW(12), .L2D(3))  w_f12  (done[3], chk[3], fl[3], hit[3], thr[3]);
  fetch_workload #(.NS(8), .FW(16), .L2D(3))  w_f16  (done[4], chk[4], fl[4], hit[4], thr[4]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(1))  w_d2   (done[5], chk[5], fl[5], hit[5], thr[5]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(8))  w_d9   (done[6], chk[6], fl[6], hit[6], thr[6]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(11)) w_d12  (done[7], chk[7], fl[7], hit[7], thr[7]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(15)) w_d16  (done[8], chk[8], fl[8], hit[8], thr[8]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(3), .JUMP_PCT(10))  w_j10  (done[9],  chk[9],  fl[9],  hit[9],  thr[9]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(3), .JUMP_PCT(25))  w_j25  (done[10], chk[10], fl[10], hit[10], thr[10]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(3), .JUMP_PCT(50))  w_j50  (done[11], chk[11], fl[11], hit[11], thr[11]);
  fetch_workload #(.NS(8), .FW(8),  .L2D(3), .JUMP_PCT(100)) w_j100 (done[12], chk[12], fl[12], hit[12], thr[12]);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1us;
      all = 1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    foreach (chk[i]) begin checks += chk[i]; failures += fl[i]; end
    foreach (thr[i]) check(thr[i] > 0, "every configuration delivers instructions");
    // hit-rate sweep: base (0%), then 10, 25, 50, 100% far jumps
    check(hit[0] > hit[9] && hit[9] > hit[10] && hit[10] > hit[11] && hit[11] > hit[12],
          "L1 hit rate falls as far jumps rise");
    check(thr[0] > thr[9] && thr[9] > thr[10] && thr[10] > thr[11] && thr[11] > thr[12],
          "throughput falls with the L1 hit rate");
    $display("hit-rate sweep: far jumps 0/10/25/50/100%% -> hit %0d/%0d/%0d/%0d/%0d%%, instr/cycle x100 %0d/%0d/%0d/%0d/%0d",
             hit[0], hit[9], hit[10], hit[11], hit[12], thr[0], thr[9], thr[10], thr[11], thr[12]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
