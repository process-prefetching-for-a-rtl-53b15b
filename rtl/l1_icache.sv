// l1_icache: the L1 instruction cache of the SEMPRES fetch stage.
//
// The cache is addressed by real line addresses (PCs are translated before
// the cache is reached, as in the source architecture). A line holds
// FETCH_W instructions, the number the fetch logic moves into a slot's FI
// in one cycle. The cache has one read port, used by the fetch logic, and
// one fill port, used only by the prefetch logic: a miss seen by the fetch
// logic does not request anything, the missed process goes back to the
// waiting queue and the prefetch logic refills the line later.
//
// Organisation, size and replacement are this design's choice (the source
// gives none): LINES lines in LINES/WAYS sets of WAYS ways, set index =
// line address mod sets, tag = line address div sets, least-recently-used
// replacement. A fill allocates the LRU way of its set (or the way that
// already holds the line) and makes it most recently used; a read with
// rd_en that hits makes the hit way most recently used. Size matters more
// than usual here: a prefetched line must survive in L1 until its process
// gets a slot, and with a small L1 most of them do not (with 128 lines,
// direct-mapped, most switched-in processes missed at once on the test
// workload; with the default 512 lines, 2-way, almost none do).
//
// Timing: the read port is combinational (lookup and data in the cycle the
// address is presented, matching one fetch per cycle); a fill and the LRU
// update are written at the rising edge and seen from the next cycle. A
// read of the line being filled in the same cycle sees the old contents.
// If a fill and a read hit touch the same set in one cycle, the fill's LRU
// update wins. Synchronous active-low reset clears all valid bits and the
// LRU state.
module l1_icache
  import sempres_pkg::*;
#(
  parameter int unsigned FETCH_W = 8,
  parameter int unsigned LINES   = 512,
  parameter int unsigned WAYS    = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // read port (fetch logic)
  input  logic   rd_en,
  input  addr_t  rd_line,
  output logic   rd_hit,
  output instr_t rd_data [FETCH_W],
  // fill port (prefetch logic)
  input  logic   fill_valid,
  input  addr_t  fill_line,
  input  instr_t fill_data [FETCH_W]
);

  localparam int unsigned SETS = LINES / WAYS;
  localparam int unsigned IW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  instr_t        data_q  [SETS][WAYS][FETCH_W];
  addr_t         tag_q   [SETS][WAYS];
  logic          valid_q [SETS][WAYS];
  logic [WW-1:0] age_q   [SETS][WAYS];  // 0 = most recently used

  logic [IW-1:0] rd_idx, fill_idx;
  addr_t         rd_tag, fill_tag;
  assign rd_idx   = IW'(rd_line % SETS);
  assign fill_idx = IW'(fill_line % SETS);
  assign rd_tag   = addr_t'(rd_line / SETS);
  assign fill_tag = addr_t'(fill_line / SETS);

  // read lookup
  logic [WW-1:0] rd_way;
  always_comb begin
    rd_hit = 1'b0;
    rd_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[rd_idx][w] && tag_q[rd_idx][w] == rd_tag) begin
        rd_hit = 1'b1;
        rd_way = WW'(w);
      end
    for (int k = 0; k < FETCH_W; k++) rd_data[k] = data_q[rd_idx][rd_way][k];
  end

  // fill victim: the way already holding the line, else an invalid way,
  // else the least recently used one
  logic [WW-1:0] fill_way;
  always_comb begin
    logic found;
    found    = 1'b0;
    fill_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!found && valid_q[fill_idx][w] && tag_q[fill_idx][w] == fill_tag) begin
        found = 1'b1; fill_way = WW'(w);
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[fill_idx][w]) begin
        found = 1'b1; fill_way = WW'(w);
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && age_q[fill_idx][w] == WW'(WAYS - 1)) begin
        found = 1'b1; fill_way = WW'(w);
      end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      tag_q[fill_idx][fill_way] <= fill_tag;
      for (int k = 0; k < FETCH_W; k++) data_q[fill_idx][fill_way][k] <= fill_data[k];
    end
  end

  // valid bits and LRU ages (ages of a set are a permutation of 0..WAYS-1)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          age_q[s][w]   <= WW'(w);
        end
    end else begin
      if (rd_en && rd_hit && !(fill_valid && fill_idx == rd_idx)) begin
        for (int w = 0; w < WAYS; w++)
          if (age_q[rd_idx][w] < age_q[rd_idx][rd_way]) age_q[rd_idx][w] <= age_q[rd_idx][w] + 1'b1;
        age_q[rd_idx][rd_way] <= '0;
      end
      if (fill_valid) begin
        valid_q[fill_idx][fill_way] <= 1'b1;
        for (int w = 0; w < WAYS; w++)
          if (age_q[fill_idx][w] < age_q[fill_idx][fill_way]) age_q[fill_idx][w] <= age_q[fill_idx][w] + 1'b1;
        age_q[fill_idx][fill_way] <= '0;
      end
    end
  end

endmodule
