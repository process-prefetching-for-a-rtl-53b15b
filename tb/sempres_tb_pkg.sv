// sempres_tb_pkg: helpers shared by the testbenches.
// instr_at() gives the instruction word stored at a real word address in
// the behavioural L2/memory model, so a testbench can check every fetched
// instruction against its address without keeping a copy of memory.
package sempres_tb_pkg;
  import sempres_pkg::*;

  function automatic instr_t instr_at(input addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction
endpackage
