// tb_fetch_unit: random slot, FP and L1 states presented to the fetch logic
// every cycle, outputs compared with the expected action worked out in the
// testbench: token order (one slot per cycle, round robin), hit -> line
// pushed from the PC's offset to the end of the line with PC and time-slice
// advanced, miss -> process back to FP with miss-status 0 and slot released,
// time-slice over or switch request -> process back with miss-status
// unchanged and a fresh time-slice, idle slot -> prefetched process taken
// and fetched in the same cycle, FI without room or full FP -> stall.
module tb_fetch_unit;
  import sempres_pkg::*;

  localparam int NS = 8, FW = 8, D = 16, TS = 5;
  localparam int NW = $clog2(FW+1), CW = $clog2(D+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_busy [NS];
  proc_desc_t slot_rdp [NS];
  logic slot_sw [NS];
  logic [CW-1:0] slot_free [NS];
  logic rdp_we [NS];
  logic release_slot [NS];
  logic [NW-1:0] push_n [NS];
  proc_desc_t rdp_d, sched_desc, ret_desc;
  fi_entry_t push_data [FW];
  logic sched_valid, sched_take, ret_valid, ret_ready, l1_hit, l1_rd_en, ev_loaded;
  addr_t l1_line;
  instr_t l1_data [FW];
  fetch_event_e ev;
  logic [$clog2(NS)-1:0] ev_slot;

  fetch_unit #(.NSLOTS(NS), .FETCH_W(FW), .FI_DEPTH(D), .TSLICE(TS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int seen [8];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tok, n, off;
    proc_desc_t cur;
    fetch_event_e e;
    bit x_take, x_ret, x_rel, x_we, x_miss0;
    int x_push;
    proc_desc_t x_rdp;
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < NS; i++) begin
      slot_busy[i] = 0; slot_rdp[i] = '0; slot_sw[i] = 0; slot_free[i] = '0;
    end
    sched_valid = 0; sched_desc = '0; ret_ready = 1; l1_hit = 0;
    foreach (l1_data[k]) l1_data[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    tok = 1;  // one edge out of reset before the first check
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NS; i++) begin
        slot_busy[i] = $urandom_range(0, 99) < 60;
        slot_rdp[i] = '{pid: pid_t'($urandom), pc: $urandom,
                        tslice: tslice_t'($urandom_range(0, 3)), miss_status: 1'($urandom)};
        slot_sw[i] = $urandom_range(0, 99) < 10;
        slot_free[i] = CW'($urandom_range(0, D));
      end
      sched_valid = $urandom_range(0, 99) < 60;
      sched_desc = '{pid: pid_t'($urandom), pc: $urandom, tslice: tslice_t'(TS), miss_status: 1'b1};
      ret_ready = $urandom_range(0, 99) < 90;
      // FP always has room for a process it hands out and gets straight back
      if (!slot_busy[tok] && sched_valid) ret_ready = 1;
      l1_hit = $urandom_range(0, 99) < 60;
      foreach (l1_data[k]) l1_data[k] = $urandom;
      #1;
      // expected action for the token slot
      check(int'(ev_slot) == tok, "token order");
      cur = slot_busy[tok] ? slot_rdp[tok] : sched_desc;
      off = int'(cur.pc % FW);
      n = FW - off;
      check(l1_line == cur.pc / FW, "L1 line address");
      x_take = 0; x_ret = 0; x_rel = 0; x_we = 0; x_push = 0; x_miss0 = 0; x_rdp = '0;
      if (slot_busy[tok]) begin
        if (cur.tslice == 0 || slot_sw[tok]) begin
          if (ret_ready) begin e = EV_SWITCH; x_ret = 1; x_rel = 1; end
          else e = EV_STALL;
        end else if (slot_free[tok] < n) e = EV_STALL;
        else if (l1_hit) e = EV_HIT;
        else if (ret_ready) begin e = EV_MISS; x_ret = 1; x_rel = 1; x_miss0 = 1; end
        else e = EV_STALL;
      end else if (sched_valid) begin
        x_take = 1;
        if (slot_free[tok] < n) begin e = EV_FILL; x_we = 1; x_rdp = cur; end
        else if (l1_hit) e = EV_HIT;
        else begin e = EV_MISS; x_ret = 1; x_miss0 = 1; end
      end else e = EV_PASS;
      if (e == EV_HIT) begin
        x_we = 1; x_push = n; x_rdp = cur;
        x_rdp.pc = cur.pc + n;
        x_rdp.tslice = (cur.tslice == 0) ? 0 : cur.tslice - 1;
      end
      check(ev == e, "event");
      check(l1_rd_en == (e == EV_HIT), "l1_rd_en marks a used hit");
      check(sched_take == x_take && ev_loaded == x_take, "sched_take");
      check(ret_valid == x_ret, "ret_valid");
      if (x_ret) begin
        check(ret_desc.pid == cur.pid && ret_desc.pc == cur.pc && ret_desc.tslice == TS, "ret desc");
        check(ret_desc.miss_status == (x_miss0 ? 1'b0 : cur.miss_status), "ret miss-status");
      end
      for (int i = 0; i < NS; i++) begin
        check(release_slot[i] == (x_rel && i == tok), "release");
        check(rdp_we[i] == (x_we && i == tok), "rdp_we");
        check(int'(push_n[i]) == ((i == tok) ? x_push : 0), "push_n");
      end
      if (x_we) check(rdp_d == x_rdp, "rdp value");
      if (x_push > 0)
        for (int k = 0; k < n; k++)
          check(push_data[k].pid == cur.pid && push_data[k].addr == cur.pc + k &&
                push_data[k].instr == l1_data[off + k], "pushed entry");
      seen[int'(e)]++;
      tok = (tok + 1) % NS;
    end
    for (int i = 0; i < 6; i++) check(seen[i] > 0, "every fetch event occurred");
    $display("pass=%0d hit=%0d miss=%0d switch=%0d stall=%0d fill=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
