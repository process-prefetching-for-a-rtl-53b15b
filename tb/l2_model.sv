// l2_model: behavioural model of the L2 cache seen by the prefetch logic.
// Not synthesizable intent, for simulation only. Every request is accepted
// at once (req_ready = 1) and answered exactly DELAY cycles later with the
// line at that line address (word a of the line holds instr_at(a)) and the
// request's tag. Requests are pipelined: one per cycle may be in flight in
// each of the DELAY stages. DELAY must be at least 1.
module l2_model
  import sempres_pkg::*;
  import sempres_tb_pkg::*;
#(
  parameter int unsigned FETCH_W = 8,
  parameter int unsigned DELAY   = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  output logic   req_ready,
  input  addr_t  req_line,
  input  pid_t   req_pid,
  output logic   resp_valid,
  output addr_t  resp_line,
  output pid_t   resp_pid,
  output instr_t resp_data [FETCH_W]
);
  logic  v    [DELAY];
  addr_t line [DELAY];
  pid_t  pid  [DELAY];

  assign req_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        v[i] <= 1'b0; line[i] <= '0; pid[i] <= '0;
      end
    end else begin
      v[0] <= req_valid; line[0] <= req_line; pid[0] <= req_pid;
      for (int i = 1; i < DELAY; i++) begin
        v[i] <= v[i-1]; line[i] <= line[i-1]; pid[i] <= pid[i-1];
      end
    end
  end

  assign resp_valid = v[DELAY-1];
  assign resp_line  = line[DELAY-1];
  assign resp_pid   = pid[DELAY-1];
  always_comb
    for (int k = 0; k < FETCH_W; k++)
      resp_data[k] = instr_at(line[DELAY-1] * FETCH_W + addr_t'(k));
endmodule
