// tb_gc_state_gen -- the collector's sequencer.  Checks the boot ROM copy
// (one write per cycle until the last ROM word), the wait in IDLEGC with
// gcdone = not do_gc, the space switch and counter loads (untraced 1,
// avail 2) when a collection starts, and, for random header / forward-mark
// / scan-end predicates, that each scanned word advances untraced by
// exactly one, that each copied pair advances avail by exactly two, and
// that RESTORE writes word 0 with gcdone high and returns to IDLEGC.
module tb_gc_state_gen;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  gc_preds_t preds;
  gc_state_e state;
  gc_rtc_t rtc;
  int checks = 0, failures = 0;

  gc_state_gen dut (.clk, .rst, .preds, .state, .rtc);

  always #5 clk = ~clk;
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (state %s) at %0t", what, state.name(), $time); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    int n_copy = 0, n_fwd = 0, n_atom = 0;
    preds = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(state == GC_RESET, "reset state");
    chk(rtc.untr_inst == CNT_LOAD && rtc.untr_v0 == 0, "untraced cleared for the ROM copy");
    step();
    for (int k = 0; k < 50; k++) begin
      chk(state == GC_ROMCOPY && rtc.mem == L1_WRITE && rtc.mdata == GD_ROM && rtc.untr_inst == CNT_INC, "rom copy");
      preds.rom_last = (k == 49);
      step();
    end
    preds.rom_last = 0;
    chk(state == IDLEGC, "idle after rom copy");
    for (int g = 0; g < 200; g++) begin
      int untr_inc, avail_inc, words, n; untr_inc = 0; avail_inc = 0; words = 0; n = 0;
      preds.do_gc = 0; #1;
      chk(state == IDLEGC && rtc.gcdone == GDONE_NOT_DOGC && rtc.mem == L1_NOOP, "idle");
      step();
      preds.do_gc = 1; #1;
      chk(rtc.mem == L1_SWITCH, "switch spaces at start");
      chk(rtc.untr_inst == CNT_LOAD && rtc.untr_v0 == 1 && rtc.avail_inst == CNT_LOAD && rtc.avail_v0 == 1,
          "counters loaded");
      step();
      chk(state == GC_ROOT, "root read");
      step();
      while (state != RESTORE && n < 10000) begin
        if (state == NEXTOBJ) begin
          words++;
          preds.hdr_is_ref = $urandom_range(0, 1);
          preds.data_fwd = $urandom_range(0, 1);
        end
        preds.scan_done = (words >= 5 + g % 7) ? 1'b1 : 1'b0;
        #1;
        chk(rtc.gcdone == GDONE_0, "gcdone low during the scan");
        if (state == GC_CHECK && preds.data_fwd) n_fwd++;
        if (state == GC_CHECK && !preds.data_fwd) n_copy++;
        if (state == NEXTOBJ && !preds.hdr_is_ref) n_atom++;
        if (rtc.untr_inst == CNT_INC) untr_inc++;
        if (rtc.avail_inst == CNT_INC) avail_inc++;
        chk(rtc.untr_inst != CNT_LOAD && rtc.avail_inst != CNT_LOAD, "no reload in the scan");
        if (state == GC_NEXT) begin
          chk(untr_inc == words, "one untraced step per scanned word");
          chk(avail_inc % 2 == 0, "avail advances by whole cells");
        end
        step(); n++;
      end
      chk(state == RESTORE, "scan ends");
      chk(rtc.mem == L1_WRITE && rtc.v0 == GV_ZERO && rtc.mdata == GD_SHR_AVAIL && rtc.gcdone == GDONE_1,
          "restore writes avail to word 0");
      preds.do_gc = 0;
      step();
    end
    chk(n_copy > 0 && n_fwd > 0 && n_atom > 0, "all scan branches taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
