// secd_gc -- the SECD machine's garbage collector: state generator, data
// path unit, the avail and untraced counters, the address ALU and the boot
// ROM.
//
// After reset it copies the ROM into the new memory space (one word per
// cycle) and then idles with gcdone high.  When the CPU raises do_gc it
// drops gcdone, switches the memory spaces and copies every cell reachable
// from word 1 of the old space into the new space with a Cheney scan
// (untraced chases avail); a copied cell's old car is overwritten by a
// forward pointer with the mark bit set.  It finally stores the new free
// cell in word 0, raises gcdone for one cycle and returns to idle.
// The division into a state generator that also emits the RTC, a data path
// that emits the memory and counter instructions, two 16-bit counters, an
// address ALU and a ROM follows the original block diagram.  Switching the
// spaces at the start (rather than the end) of a collection, and writing
// the new free pointer into the new space, are this design's choices; they
// keep the CPU always on the space it was just given.
// Memory port: level 1 instruction, full physical address from the address
// ALU, 17-bit data; read data comes back in the same cycle.
module secd_gc
  import secd_pkg::*;
#(
  parameter int    ROM_WORDS = 32768,
  parameter string ROM_FILE  = ""
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               do_gc,
  output logic               gcdone,
  output l1_inst_e           mem_inst,
  output logic [PADDR_W-1:0] mem_addr,
  output gcword_t            mem_data,
  input  gcword_t            mem_buf,
  input  logic               new_space,
  output gc_state_e          state
);
  gc_preds_t     preds;
  gc_rtc_t       rtc;
  logic [15:0]   rom_buf, untraced, avail, untr_v0, avail_v0;
  cnt_inst_e     untr_inst, avail_inst;
  addralu_inst_e aa_inst;
  logic [WADDR_W-1:0] aa_v0;

  gc_state_gen u_sg (.clk, .rst, .preds, .state, .rtc);

  gc_datapath #(.ROM_WORDS(ROM_WORDS)) u_dp (
    .clk, .rst, .rtc, .do_gc, .mem_buf, .rom_buf, .untraced, .avail,
    .mem_inst, .mem_data, .aa_inst, .aa_v0, .untr_inst, .untr_v0,
    .avail_inst, .avail_v0, .gcdone, .preds);

  gc_counter #(.WIDTH(16)) u_untraced (.clk, .rst, .inst(untr_inst), .v0(untr_v0), .count(untraced));
  gc_counter #(.WIDTH(16)) u_avail    (.clk, .rst, .inst(avail_inst), .v0(avail_v0), .count(avail));

  gc_addr_alu u_aa (.inst(aa_inst), .v0(aa_v0), .new_space, .buff(mem_addr));

  boot_rom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_FILE)) u_rom (
    .addr(untraced[$clog2(ROM_WORDS)-1:0]), .data(rom_buf));
endmodule
