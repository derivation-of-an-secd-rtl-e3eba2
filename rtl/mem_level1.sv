// mem_level1 -- level 1 memory interface: the garbage collector's view of
// memory (word addressed, two spaces).
//
// It holds the space bit that says which half of physical memory is the
// "new" space.  The CPU side (already translated by level 2 into word
// addresses) always reaches the new space.  The GC side presents a full
// physical address that its address ALU has already qualified with
// old_addr/new_addr, and may also issue mem-switch, which flips the roles of
// the two spaces at the clock edge.  The GC port wins whenever it issues an
// instruction; the two processes never use memory at the same time.
// Reads are combinational through to phys_mem; writes and switch take
// effect at the clock edge.  The CPU writes 16-bit words with the mark bit 0.
module mem_level1
  import secd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // CPU side (from level 2)
  input  l1_inst_e             cpu_inst,
  input  logic [WADDR_W-1:0]   cpu_addr,
  input  word_t                cpu_data,
  output word_t                cpu_buf,
  // GC side
  input  l1_inst_e             gc_inst,
  input  logic [PADDR_W-1:0]   gc_addr,
  input  gcword_t              gc_data,
  output gcword_t              gc_buf,
  output logic                 new_space,
  // physical memory
  output logic [PADDR_W-1:0]   pm_addr,
  output logic                 pm_we,
  output gcword_t              pm_wdata,
  input  gcword_t              pm_rdata
);
  logic gc_sel;

  always_ff @(posedge clk)
    if (rst) new_space <= 1'b0;
    else if (gc_inst == L1_SWITCH) new_space <= ~new_space;

  assign gc_sel = (gc_inst != L1_NOOP);

  always_comb begin
    if (gc_sel) begin
      pm_addr  = gc_addr;
      pm_we    = (gc_inst == L1_WRITE);
      pm_wdata = gc_data;
    end else begin
      pm_addr  = {new_space, cpu_addr};
      pm_we    = (cpu_inst == L1_WRITE);
      pm_wdata = {1'b0, cpu_data};
    end
  end

  assign gc_buf  = pm_rdata;
  assign cpu_buf = pm_rdata[WORD_W-1:0];

  // the two processes must never drive memory in the same cycle
  a_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(gc_inst != L1_NOOP && cpu_inst != L1_NOOP));
endmodule
