// gc_datapath -- data path unit of the garbage collector.
//
// Registers header (the word being scanned) and data (a word being copied),
// both 17 bits (mark + word).  From the RTC it also produces, as
// combinational outputs, the memory instruction and write data, the address
// ALU instruction and input, the two counter instructions and load values,
// and gcdone.  Word forms it builds:
//   header-with-data   header's tag with the value of data (forwarded copy)
//   forward(avail/2)   mark bit set, pointer to the new cell
//   header-with-avail  header's tag pointing at the new cell avail/2
//   shiftright(avail)  avail/2 with bits 16..14 cleared
// avail/2 converts the GC's word address to the CPU's cell address.
// Counter loads: untraced 0 or 1, avail 0 or 2 (one bit each).
module gc_datapath
  import secd_pkg::*;
#(
  parameter int ROM_WORDS = 32768
) (
  input  logic               clk,
  input  logic               rst,
  input  gc_rtc_t            rtc,
  input  logic               do_gc,
  input  gcword_t            mem_buf,
  input  logic [15:0]        rom_buf,
  input  logic [15:0]        untraced,
  input  logic [15:0]        avail,
  output l1_inst_e           mem_inst,
  output gcword_t            mem_data,
  output addralu_inst_e      aa_inst,
  output logic [WADDR_W-1:0] aa_v0,
  output cnt_inst_e          untr_inst,
  output logic [15:0]        untr_v0,
  output cnt_inst_e          avail_inst,
  output logic [15:0]        avail_v0,
  output logic               gcdone,
  output gc_preds_t          preds
);
  gcword_t header, data;

  always_ff @(posedge clk)
    if (rst) begin
      header <= '0;
      data   <= '0;
    end else begin
      if (rtc.hdr_load)  header <= mem_buf;
      if (rtc.data_load) data   <= mem_buf;
    end

  always_comb begin
    case (rtc.v0)
      GV_ZERO:     aa_v0 = '0;
      GV_UNTRACED: aa_v0 = untraced[WADDR_W-1:0];
      GV_AVAIL:    aa_v0 = avail[WADDR_W-1:0];
      GV_HDR_CAR:  aa_v0 = {header[CELL_AW-1:0], 1'b0};
      default:     aa_v0 = {header[CELL_AW-1:0], 1'b1};
    endcase
    case (rtc.mdata)
      GD_ROM:       mem_data = {1'b0, rom_buf};
      GD_DATA:      mem_data = data;
      GD_HDR:       mem_data = {1'b0, header[15:0]};
      GD_HDR_DATA:  mem_data = {1'b0, header[15:14], data[CELL_AW-1:0]};
      GD_FWD_AVAIL: mem_data = {1'b1, TAG_PTR, avail[CELL_AW:1]};
      GD_HDR_AVAIL: mem_data = {1'b0, header[15:14], avail[CELL_AW:1]};
      default:      mem_data = {3'b000, avail[CELL_AW:1]};
    endcase
    case (rtc.gcdone)
      GDONE_1:        gcdone = 1'b1;
      GDONE_NOT_DOGC: gcdone = ~do_gc;
      default:        gcdone = 1'b0;
    endcase
  end

  assign mem_inst   = rtc.mem;
  assign aa_inst    = rtc.aa;
  assign untr_inst  = rtc.untr_inst;
  assign untr_v0    = {15'd0, rtc.untr_v0};
  assign avail_inst = rtc.avail_inst;
  assign avail_v0   = {14'd0, rtc.avail_v0, 1'b0};

  assign preds.do_gc      = do_gc;
  assign preds.hdr_is_ref = (header[15:14] == TAG_PTR) || (header[15:14] == TAG_SYM);
  assign preds.data_fwd   = data[16];
  assign preds.scan_done  = (untraced == avail);
  assign preds.rom_last   = (32'(untraced) == ROM_WORDS - 1);
endmodule
