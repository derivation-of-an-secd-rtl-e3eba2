// tb_gc_datapath -- the collector's data path (header and data registers,
// address-operand and write-data multiplexers, gcdone multiplexer and the
// predicates) under random controls and inputs, against a reference model.
// The write-data cases follow the collector's needs: a forward word is a
// marked pointer to the new cell (avail shifted right by one), a scanned
// reference keeps its tag and gets the new cell address, and the restored
// free pointer is avail shifted right with the top bits cleared.
module tb_gc_datapath;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  gc_rtc_t rtc;
  logic do_gc, gcdone;
  gcword_t mem_buf, mem_data;
  logic [15:0] rom_buf, untraced, avail, untr_v0, avail_v0;
  l1_inst_e mem_inst;
  addralu_inst_e aa_inst;
  logic [14:0] aa_v0;
  cnt_inst_e untr_inst, avail_inst;
  gc_preds_t preds;
  int checks = 0, failures = 0;

  gc_datapath #(.ROM_WORDS(32768)) dut (.clk, .rst, .rtc, .do_gc, .mem_buf, .rom_buf, .untraced, .avail,
    .mem_inst, .mem_data, .aa_inst, .aa_v0, .untr_inst, .untr_v0, .avail_inst, .avail_v0, .gcdone, .preds);

  always #5 clk = ~clk;
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [16:0] hdr = 0, dat = 0;
    rtc = '0; do_gc = 0; mem_buf = 0; rom_buf = 0; untraced = 0; avail = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 20000; k++) begin
      logic [14:0] ev0;
      logic [16:0] ed;
      @(negedge clk);
      rtc.hdr_load = $urandom_range(0, 1); rtc.data_load = $urandom_range(0, 1);
      rtc.mem = l1_inst_e'($urandom_range(0, 3)); rtc.aa = addralu_inst_e'($urandom_range(0, 1));
      rtc.v0 = gc_v0_sel_e'($urandom_range(0, 4)); rtc.mdata = gc_mdata_sel_e'($urandom_range(0, 6));
      rtc.untr_inst = cnt_inst_e'($urandom_range(0, 2)); rtc.untr_v0 = $urandom_range(0, 1);
      rtc.avail_inst = cnt_inst_e'($urandom_range(0, 2)); rtc.avail_v0 = $urandom_range(0, 1);
      rtc.gcdone = gc_done_sel_e'($urandom_range(0, 2));
      do_gc = $urandom_range(0, 1); mem_buf = 17'($urandom); rom_buf = 16'($urandom);
      untraced = 16'($urandom_range(0, 32767)); avail = 16'($urandom_range(0, 32767));
      if ($urandom_range(0, 7) == 0) avail = untraced;
      if ($urandom_range(0, 15) == 0) untraced = 16'd32767;
      #1;
      case (rtc.v0)
        GV_ZERO: ev0 = 0; GV_UNTRACED: ev0 = untraced[14:0]; GV_AVAIL: ev0 = avail[14:0];
        GV_HDR_CAR: ev0 = 15'(hdr[13:0]) * 2; default: ev0 = 15'(hdr[13:0]) * 2 + 1;
      endcase
      case (rtc.mdata)
        GD_ROM: ed = {1'b0, rom_buf};
        GD_DATA: ed = dat;
        GD_HDR: ed = {1'b0, hdr[15:0]};
        GD_HDR_DATA: ed = {1'b0, hdr[15:14], dat[13:0]};
        GD_FWD_AVAIL: ed = {1'b1, 2'b00, 14'(avail / 2)};
        GD_HDR_AVAIL: ed = {1'b0, hdr[15:14], 14'(avail / 2)};
        default: ed = 17'(avail / 2) & 17'h03FFF;
      endcase
      chk(aa_v0 == ev0, "address operand");
      chk(mem_data == ed, "write data");
      chk(mem_inst == rtc.mem && aa_inst == rtc.aa && untr_inst == rtc.untr_inst && avail_inst == rtc.avail_inst,
          "instructions passed through");
      chk(untr_v0 == (rtc.untr_v0 ? 16'd1 : 16'd0) && avail_v0 == (rtc.avail_v0 ? 16'd2 : 16'd0), "counter loads");
      chk(gcdone == ((rtc.gcdone == GDONE_1) || (rtc.gcdone == GDONE_NOT_DOGC && !do_gc)), "gcdone");
      chk(preds.do_gc == do_gc, "do_gc predicate");
      chk(preds.hdr_is_ref == (hdr[15] == 1'b0), "reference predicate");
      chk(preds.data_fwd == dat[16], "forward predicate");
      chk(preds.scan_done == (untraced == avail), "scan end predicate");
      chk(preds.rom_last == (untraced == 16'd32767), "ROM end predicate");
      @(posedge clk);
      if (rtc.hdr_load) hdr = mem_buf;
      if (rtc.data_load) dat = mem_buf;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
