// gc_addr_alu -- the garbage collector's address ALU.  It qualifies a word
// address with the memory space it is meant for: new_addr puts the current
// new-space bit in front of the word address, old_addr the other one.  Its
// output is wired straight to the memory address of the GC's memory port.
// Combinational.
module gc_addr_alu
  import secd_pkg::*;
(
  input  addralu_inst_e        inst,
  input  logic [WADDR_W-1:0]   v0,
  input  logic                 new_space,
  output logic [PADDR_W-1:0]   buff
);
  assign buff = {(inst == AA_NEW) ? new_space : ~new_space, v0};
endmodule
