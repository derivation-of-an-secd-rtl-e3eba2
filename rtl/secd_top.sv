// secd_top -- the SECD machine: CPU and garbage collector, two cooperating
// processes sharing one memory unit.
//
// Only one process works at a time.  After reset the collector loads the
// boot ROM image into memory while the CPU waits; the CPU then runs the
// program found in the image.  When free cells run short the CPU hands over
// with do_gc and resumes when the collector signals gcdone.  The serial
// device port (a UART would sit there) is brought out as a byte interface.
// donesecd rises once the program executes STOP.
// The split into CPU, collector and a two-level shared memory, and the
// do_gc (registered) / gcdone (combinational) handshake, follow the
// original; sizes default to the original board: 16K cells per space and a
// 32K-word boot ROM.  The ROM image is loaded from ROM_FILE (hex) if given.
module secd_top
  import secd_pkg::*;
#(
  parameter int    CELLS     = 2**(WADDR_W-1),
  parameter int    ROM_WORDS = 32768,
  parameter string ROM_FILE  = ""
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       rx_full,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  output logic       donesecd,
  output logic       do_gc,
  output logic       gcdone
);
  mem_inst_e          cpu_mem_inst;
  logic [MADDR_W-1:0] cpu_mem_addr;
  word_t              cpu_mem_data, cpu_mem_buf, s_reg;
  logic               need_2_gc, new_space;
  logic [CELL_AW-1:0] avail;
  l1_inst_e           gc_mem_inst;
  logic [PADDR_W-1:0] gc_mem_addr;
  gcword_t            gc_mem_data, gc_mem_buf;
  cpu_state_e         cpu_state;
  gc_state_e          gc_state;

  secd_cpu u_cpu (
    .clk, .rst, .mem_inst(cpu_mem_inst), .mem_addr(cpu_mem_addr), .mem_data(cpu_mem_data),
    .mem_buf(cpu_mem_buf), .need_2_gc, .do_gc, .gcdone,
    .rx_valid, .rx_data, .rx_full, .tx_valid, .tx_data,
    .donesecd, .state(cpu_state), .s_reg);

  secd_gc #(.ROM_WORDS(ROM_WORDS), .ROM_FILE(ROM_FILE)) u_gc (
    .clk, .rst, .do_gc, .gcdone, .mem_inst(gc_mem_inst), .mem_addr(gc_mem_addr),
    .mem_data(gc_mem_data), .mem_buf(gc_mem_buf), .new_space, .state(gc_state));

  memory_unit #(.CELLS(CELLS)) u_mem (
    .clk, .rst, .cpu_inst(cpu_mem_inst), .cpu_addr(cpu_mem_addr), .cpu_data(cpu_mem_data),
    .cpu_buf(cpu_mem_buf), .need_2_gc, .avail,
    .gc_inst(gc_mem_inst), .gc_addr(gc_mem_addr), .gc_data(gc_mem_data),
    .gc_buf(gc_mem_buf), .new_space);
endmodule
