// tb_cpu_inst_gen -- the CPU instruction generator (the outputs of the
// control table for each state).  Walks every instruction from EXEC with
// random predicates and checks, per instruction:
//   * at most 4 cells are allocated (the collector's reserve relies on it),
//   * every setcar!/setcdr! goes through the register that received a cell
//     allocated earlier in the same instruction; the only exceptions are
//     RAP (rewrites the dummy frame at e) and SET (rewrites a frame slot),
//   * ALU instructions appear only where the result is taken into i,
//   * serial input/output appear only in RECH and WRCH,
// plus the fixed rows: FETCH, EXEC, the INIT_GC chain that builds the
// root list and sets do_gc, and DONE setting donesecd.
module tb_cpu_inst_gen;
  import secd_pkg::*;
  cpu_state_e state;
  cpu_preds_t preds;
  mem_inst_e mem_inst;
  alu_inst_e alu_inst;
  ser_inst_e ser_inst;
  rtc_t rtc;
  int checks = 0, failures = 0;

  cpu_inst_gen dut (.state, .preds, .mem_inst, .alu_inst, .ser_inst, .rtc);

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  initial begin
    mem_inst_e gc_chain[12] = '{M_ALLOC, M_NOOP, M_SETCAR, M_SETCDR, M_SETCAR, M_ALLOC,
                                M_SETCDR, M_SETCAR, M_ALLOC, M_SETCDR, M_SETCAR, M_SETCDR};
    int gc_allocs = 0;
    preds = '0;
    state = FETCH; #1;
    chk(mem_inst == M_CAR && rtc.addr == AD_C && rtc.i == I_MBUF, "fetch reads car c into i");
    preds.need_2_gc = 1; #1;
    chk(mem_inst == M_ALLOC && dut.u.next == INIT_GC1, "fetch starts a collection");
    preds.need_2_gc = 0;
    state = EXEC; #1;
    chk(mem_inst == M_CDR && rtc.addr == AD_C && rtc.c == C_MBUF, "exec advances c");
    for (int k = 0; k < 12; k++) begin
      state = cpu_state_e'(int'(INIT_GC1) + k); #1;
      chk(mem_inst == gc_chain[k], "root list build");
      if (mem_inst == M_ALLOC) gc_allocs++;
      if (k == 11) chk(rtc.do_gc == F_SET && rtc.data == DT_NIL, "do_gc set with the list end");
      else chk(rtc.do_gc == F_CLR, "do_gc low while building");
    end
    // the allocation in FETCH is the first of the three root cells
    chk(gc_allocs + 1 == 4 || gc_allocs == 3, "root list uses three cells");
    state = DONE; #1;
    chk(rtc.donesecd == F_SET, "DONE sets donesecd");
    state = WAIT_GC; preds.gcdone = 0; #1;
    chk(rtc.do_gc == F_HOLD && mem_inst == M_NOOP, "wait holds do_gc");
    state = RECOVER_GC8; #1;
    chk(mem_inst == M_MEMINIT, "recover ends with meminit");

    for (int rep = 0; rep < 30; rep++)
      for (int op = 0; op < 40; op++) begin
        int allocs, n; bit fs, fi, fj; allocs = 0; n = 0; fs = 0; fi = 0; fj = 0;
        preds = '0; preds.opcode = 8'(op);
        state = EXEC; #1;
        state = dut.u.next; #1;
        while (state != FETCH && state != IDLE && n < 100) begin
          preds.i_zero = ($urandom_range(0, 2) == 0);
          preds.i_true = $urandom_range(0, 1);
          #1;
          if (mem_inst == M_ALLOC) allocs++;
          if ((mem_inst == M_SETCAR || mem_inst == M_SETCDR) && state != RAP18 && state != SET10)
            chk((rtc.addr == AD_S && fs) || (rtc.addr == AD_I && fi) || (rtc.addr == AD_J && fj),
                "write only through a freshly allocated cell");
          if (state == RAP18) chk(rtc.addr == AD_E && mem_inst == M_SETCAR, "RAP rewrites the frame at e");
          if (mem_inst == M_ALLOC) begin
            fs = (rtc.s == S_MBUF); fi = (rtc.i == I_MBUF); fj = (rtc.j == J_MBUF);
          end else begin
            if (rtc.s != S_HOLD) fs = (rtc.s == S_J) ? fj : (rtc.s == S_I) ? fi : 1'b0;
            if (rtc.i != I_HOLD) fi = (rtc.i == I_J) ? fj : 1'b0;
            if (rtc.j != J_HOLD) fj = (rtc.j == J_I) ? fi : 1'b0;
          end
          if (alu_inst != A_NOOP) chk(rtc.i == I_ALU, "ALU result goes to i");
          if (rtc.i == I_ALU) chk(alu_inst != A_NOOP, "i from ALU only with an ALU op");
          if (ser_inst == SER_IN) chk(state == RECH1 && rtc.i == I_SBUF, "serial in");
          if (ser_inst == SER_OUT) chk(state == WRCH2, "serial out");
          chk(rtc.do_gc == F_CLR, "no collection request inside an instruction");
          state = dut.u.next; n++;
        end
        chk(n < 100, "instruction terminates");
        chk(allocs <= 4, $sformatf("opcode %0d allocates %0d cells", op, allocs));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
