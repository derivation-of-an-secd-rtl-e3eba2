// mem_level2 -- level 2 memory interface: the CPU's view of memory as list
// cells.
//
// A cell_a address (value field of a pointer) becomes the word address
// {cell_a, cdr-bit}: car fields at even and cdr fields at odd words.  It keeps
// the avail pointer, the next free cell_a.  Instructions (one per cycle):
//   car x / cdr x        buf = word (2x) / (2x+1)
//   setcar! x y / setcdr! x y  write y at word 2x / 2x+1
//   alloc                buf = pointer to avail, avail <= avail + 1
//   meminit              avail <= word 0 (the GC leaves the free cell_a there)
// need_2_gc is high when fewer than RESERVE cells are left, the amount the
// worst-case instruction plus the collection preamble can allocate
// (RESERVE = 8: 4 for AP/RAP, 3 for the root list, 1 so avail never wraps;
// the original only says the threshold covers the worst instruction and
// the root list, the value is this design's).
// Reads are combinational; avail changes at the clock edge.
module mem_level2
  import secd_pkg::*;
#(
  parameter int CELLS   = 2**(WADDR_W-1),   // cells per space (16K)
  parameter int RESERVE = GC_RESERVE
) (
  input  logic                 clk,
  input  logic                 rst,
  input  mem_inst_e            inst,
  input  logic [MADDR_W-1:0]   addr,
  input  word_t                data,
  output word_t                buf_o,
  output logic                 need_2_gc,
  output logic [CELL_AW-1:0]   avail,
  // to level 1
  output l1_inst_e             l1_inst,
  output logic [WADDR_W-1:0]   l1_addr,
  output word_t                l1_data,
  input  word_t                l1_buf
);
  logic [CELL_AW-1:0] cell_a;
  assign cell_a = addr[CELL_AW-1:0];

  always_comb begin
    l1_inst = L1_NOOP;
    l1_addr = {cell_a, 1'b0};
    l1_data = data;
    buf_o   = l1_buf;
    case (inst)
      M_CAR:     l1_inst = L1_READ;
      M_CDR:   begin l1_inst = L1_READ;  l1_addr = {cell_a, 1'b1}; end
      M_SETCAR:  l1_inst = L1_WRITE;
      M_SETCDR:begin l1_inst = L1_WRITE; l1_addr = {cell_a, 1'b1}; end
      M_ALLOC:   buf_o = mk_ptr(avail);
      M_MEMINIT: begin l1_inst = L1_READ; l1_addr = '0; end
      default: ;
    endcase
  end

  always_ff @(posedge clk)
    if (rst) avail <= '0;
    else if (inst == M_ALLOC) avail <= avail + 1'b1;
    else if (inst == M_MEMINIT) avail <= l1_buf[CELL_AW-1:0];

  assign need_2_gc = (32'(avail) + RESERVE) > CELLS;
endmodule
