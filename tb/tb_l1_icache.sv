// tb_l1_icache: random fills and lookups on the L1 i-cache, checked against
// a set-associative LRU model in the testbench. The model keeps, per set, the
// valid lines ordered from most to least recently used: a lookup hits only
// if its line is in the list and returns that line's words; a used read hit
// (rd_en) moves the line to the front unless a fill hits the same set in
// that cycle; a fill puts its line at the front, dropping the last line when
// the set is full, and is visible from the next cycle. 4 ways and a small
// line range make evictions and LRU decisions frequent.
module tb_l1_icache;
  import sempres_pkg::*;

  localparam int FW = 8, LINES = 16, WAYS = 4, SETS = LINES / WAYS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t rd_line, fill_line;
  logic rd_en, rd_hit, fill_valid;
  instr_t rd_data [FW];
  instr_t fill_data [FW];

  l1_icache #(.FETCH_W(FW), .LINES(LINES), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { addr_t line; instr_t d [FW]; } mline_t;
  mline_t mset [SETS][$];   // per set, most recently used first
  int hits = 0, misses = 0, evicts = 0, lru_moves = 0;

  function automatic int find(int s, addr_t l);
    foreach (mset[s][i]) if (mset[s][i].line == l) return i;
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs, fs, pos;
    mline_t e;
    fill_valid = 0; rd_en = 0; rd_line = '0; fill_line = '0;
    foreach (fill_data[k]) fill_data[k] = '0;
    repeat (3) @(posedge clk);
    // after reset nothing hits
    @(negedge clk);
    for (int i = 0; i < 4 * LINES; i++) begin
      rd_line = addr_t'(i); #1;
      check(!rd_hit, "hit after reset");
    end
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      rd_line = addr_t'($urandom_range(0, 2 * LINES - 1));
      rd_en = 1'($urandom_range(0, 1));
      fill_valid = ($urandom_range(0, 99) < 30);
      fill_line = addr_t'($urandom_range(0, 2 * LINES - 1));
      foreach (fill_data[k]) fill_data[k] = $urandom;
      #1;
      rs = int'(rd_line % SETS);
      fs = int'(fill_line % SETS);
      pos = find(rs, rd_line);
      if (pos >= 0) begin
        hits++;
        check(rd_hit, "expected hit");
        for (int k = 0; k < FW; k++) check(rd_data[k] == mset[rs][pos].d[k], "hit data");
      end else begin
        misses++;
        check(!rd_hit, "expected miss");
      end
      @(posedge clk);
      if (rd_en && pos >= 0 && !(fill_valid && fs == rs)) begin
        if (pos > 0) lru_moves++;
        e = mset[rs][pos];
        mset[rs].delete(pos);
        mset[rs].push_front(e);
      end
      if (fill_valid) begin
        pos = find(fs, fill_line);
        if (pos >= 0) mset[fs].delete(pos);
        else if (mset[fs].size() == WAYS) begin
          void'(mset[fs].pop_back());
          evicts++;
        end
        e.line = fill_line;
        for (int k = 0; k < FW; k++) e.d[k] = fill_data[k];
        mset[fs].push_front(e);
      end
    end
    check(hits > 100 && misses > 100 && evicts > 100 && lru_moves > 100,
          "mix of hits, misses, evictions, LRU updates");
    $display("hits=%0d misses=%0d evictions=%0d lru_moves=%0d", hits, misses, evicts, lru_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
