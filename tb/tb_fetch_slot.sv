// tb_fetch_slot: drives one slot the way the fetch logic and decode would:
// loads and releases of processes, line pushes, random dequeues, switch
// requests and PC redirects. A model of the FI queue and RDP in the
// testbench checks the FI head, head count, free room, busy, the RDP value
// (with a pending redirect target) and the flush of the running process'
// youngest instructions on a redirect.
module tb_fetch_slot;
  import sempres_pkg::*;

  localparam int FW = 8, D = 16;
  localparam int NW = $clog2(FW+1), CW = $clog2(D+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rdp_we, release_slot, busy, sw_pending, switch_req, redirect_valid, redirect_ack;
  proc_desc_t rdp_d, rdp;
  logic [NW-1:0] push_n, head_count, deq_n;
  fi_entry_t push_data [FW];
  fi_entry_t head [FW];
  logic [CW-1:0] fi_free;
  addr_t redirect_pc;

  fetch_slot #(.FETCH_W(FW), .FI_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  fi_entry_t m[$];
  bit m_busy = 0, m_sw = 0, m_rp = 0;
  proc_desc_t m_rdp;
  addr_t m_rpc;
  int n_flush = 0, n_redir = 0, n_full = 0;
  pid_t next_pid = 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hc, fl;
    bit ack;
    rdp_we = 0; release_slot = 0; push_n = 0; switch_req = 0; redirect_valid = 0;
    deq_n = 0; rdp_d = '0; redirect_pc = '0; m_rdp = '0; m_rpc = '0;
    foreach (push_data[k]) push_data[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // outputs against the model
      hc = (m.size() > FW) ? FW : m.size();
      check(head_count == NW'(hc), "head_count");
      for (int k = 0; k < hc; k++) check(head[k] == m[k], "head entry");
      check(fi_free == CW'(D - m.size()), "fi_free");
      check(busy == m_busy, "busy");
      check(sw_pending == m_sw, "sw_pending");
      if (m_busy) check(rdp.pc == (m_rp ? m_rpc : m_rdp.pc) && rdp.pid == m_rdp.pid, "rdp");
      if (m.size() == D) n_full++;
      // stimulus
      rdp_we = 0; release_slot = 0; push_n = 0;
      deq_n = NW'($urandom_range(0, hc));
      if ($urandom_range(0, 99) < 30) deq_n = 0;
      switch_req = ($urandom_range(0, 99) < 3);
      redirect_valid = ($urandom_range(0, 99) < 6);
      redirect_pc = $urandom;
      if (!m_busy) begin
        if ($urandom_range(0, 99) < 50) begin
          rdp_we = 1;
          rdp_d = '{pid: next_pid, pc: $urandom, tslice: 16'd50, miss_status: 1'b1};
          next_pid++;
        end
      end else if ($urandom_range(0, 99) < 8) begin
        release_slot = 1;
      end else if ($urandom_range(0, 99) < 70) begin
        int n;
        n = $urandom_range(1, FW);
        if (n <= D - m.size()) begin
          push_n = NW'(n);
          for (int k = 0; k < FW; k++) begin
            push_data[k].pid = m_rdp.pid;
            push_data[k].addr = m_rdp.pc + addr_t'(k);
            push_data[k].instr = $urandom;
          end
          rdp_we = 1;
          rdp_d = m_rdp;
          rdp_d.pc = m_rdp.pc + addr_t'(n);
        end
      end
      #1;
      ack = redirect_valid && m_busy && !release_slot;
      check(redirect_ack == ack, "redirect_ack");
      // model update at the edge
      @(posedge clk);
      for (int k = 0; k < deq_n; k++) void'(m.pop_front());
      if (ack) begin
        fl = 0;
        while (m.size() > 0 && m[$].pid == m_rdp.pid) begin void'(m.pop_back()); fl++; end
        if (fl > 0) n_flush++;
        n_redir++;
      end else begin
        for (int k = 0; k < push_n; k++) m.push_back(push_data[k]);
      end
      if (release_slot) m_busy = 0;
      else if (rdp_we) begin m_busy = 1; m_rdp = rdp_d; end
      if (ack) begin m_rp = 1; m_rpc = redirect_pc; end
      else if (rdp_we || release_slot) m_rp = 0;
      if (release_slot) m_sw = 0;
      else if (switch_req && busy) m_sw = 1;
    end
    check(n_flush > 0, "redirect flushed entries");
    check(n_full > 0, "FI reached full");
    $display("redirects=%0d flushes=%0d full_cycles=%0d", n_redir, n_flush, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
