// memory_unit -- the memory shared by the SECD CPU and the garbage
// collector, built as two interface layers on top of physical memory:
//   CPU --(car/cdr/setcar!/setcdr!/alloc/meminit)--> level 2
//       --(word read/write)--> level 1 --(space bit added)--> phys_mem
//   GC  --(mem-read/mem-write/mem-switch, physical address)--> level 1
// See mem_level2, mem_level1 and phys_mem for the timing; all reads are
// combinational within the cycle, all writes happen at the clock edge.
// Default size: 2 spaces x 32K words x (16 + 1 mark) bits.
module memory_unit
  import secd_pkg::*;
#(
  parameter int CELLS   = 2**(WADDR_W-1),
  parameter int RESERVE = GC_RESERVE
) (
  input  logic                 clk,
  input  logic                 rst,
  // CPU port
  input  mem_inst_e            cpu_inst,
  input  logic [MADDR_W-1:0]   cpu_addr,
  input  word_t                cpu_data,
  output word_t                cpu_buf,
  output logic                 need_2_gc,
  output logic [CELL_AW-1:0]   avail,
  // GC port
  input  l1_inst_e             gc_inst,
  input  logic [PADDR_W-1:0]   gc_addr,
  input  gcword_t              gc_data,
  output gcword_t              gc_buf,
  output logic                 new_space
);
  l1_inst_e             l1_inst;
  logic [WADDR_W-1:0]   l1_addr;
  word_t                l1_data, l1_buf;
  logic [PADDR_W-1:0]   pm_addr;
  logic                 pm_we;
  gcword_t              pm_wdata, pm_rdata;

  mem_level2 #(.CELLS(CELLS), .RESERVE(RESERVE)) u_l2 (
    .clk, .rst, .inst(cpu_inst), .addr(cpu_addr), .data(cpu_data), .buf_o(cpu_buf),
    .need_2_gc, .avail, .l1_inst, .l1_addr, .l1_data, .l1_buf);

  mem_level1 u_l1 (
    .clk, .rst, .cpu_inst(l1_inst), .cpu_addr(l1_addr), .cpu_data(l1_data), .cpu_buf(l1_buf),
    .gc_inst, .gc_addr, .gc_data, .gc_buf, .new_space,
    .pm_addr, .pm_we, .pm_wdata, .pm_rdata);

  phys_mem #(.ADDR_W(PADDR_W), .DATA_W(GCW_W)) u_pm (
    .clk, .addr(pm_addr), .we(pm_we), .wdata(pm_wdata), .rdata(pm_rdata));
endmodule
