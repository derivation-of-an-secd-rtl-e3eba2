// tb_cpu_state_gen -- the CPU state sequencer.  Checks the process-level
// protocol (wait in IDLE for the first gcdone, the eight RECOVER_GC steps,
// the INIT_GC chain into WAIT_GC when need_2_gc is seen at a fetch), the
// opcode dispatch of every instruction to its own first state, and that
// every instruction returns to FETCH (or halts through DONE into IDLE)
// within a bounded number of cycles for random predicate values.
module tb_cpu_state_gen;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  cpu_preds_t preds;
  cpu_state_e state;
  int checks = 0, failures = 0;

  cpu_state_gen dut (.clk, .rst, .preds, .state);

  always #5 clk = ~clk;
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (state %s) at %0t", what, state.name(), $time); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  // first state of each instruction, written out from the opcode list
  function automatic string first_of(int op);
    case (op)
      1: return "LD1";   2: return "LDC1";  3: return "LDF1";  4: return "AP1";
      5: return "RTN1";  6: return "DUM1";  7: return "RAP1";  8: return "SEL1";
      9: return "JOIN1"; 10: return "CAR1"; 11: return "CDR1"; 12: return "ATOM1";
      13: return "CONS1"; 14: return "EQ1"; 15: return "ADD1"; 16: return "SUB1";
      20: return "LEQ1"; 22: return "SL1"; 23: return "LS1"; 24: return "CI1";
      25: return "RECH1"; 26: return "WRCH1"; 27: return "NUM1"; 28: return "SYM1";
      29: return "PAIR1"; 30: return "EX1"; 31: return "POP1"; 32: return "SET1";
      default: return "DONE";
    endcase
  endfunction

  initial begin
    string seen [string];
    preds = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(state == IDLE, "reset to IDLE");
    repeat (5) step();
    chk(state == IDLE, "waits for gcdone");
    preds.gcdone = 1; step(); preds.gcdone = 0;
    for (int k = 1; k <= 8; k++) begin
      chk(state.name() == $sformatf("RECOVER_GC%0d", k), "recover sequence");
      step();
    end
    chk(state == FETCH, "fetch after recover");
    // collection request at a fetch
    preds.need_2_gc = 1; step(); preds.need_2_gc = 0;
    for (int k = 1; k <= 12; k++) begin
      chk(state.name() == $sformatf("INIT_GC%0d", k), "init_gc sequence");
      step();
    end
    repeat (4) begin chk(state == WAIT_GC, "wait for collector"); step(); end
    preds.gcdone = 1; step(); preds.gcdone = 0;
    chk(state == RECOVER_GC1, "recover after collection");
    repeat (8) step();
    chk(state == FETCH, "fetch after second recover");
    // every opcode, several times with random predicates
    for (int rep = 0; rep < 40; rep++)
      for (int op = 0; op < 40; op++) begin
        int n; n = 0;
        if (state != FETCH) begin chk(0, "not at fetch"); break; end
        step();                                // FETCH -> EXEC
        chk(state == EXEC, "exec after fetch");
        preds.opcode = 8'(op);
        step();
        preds.opcode = 8'($urandom);
        chk(state.name() == first_of(op), $sformatf("dispatch of opcode %0d", op));
        seen[state.name()] = "";
        while (state != FETCH && state != IDLE && n < 100) begin
          preds.i_zero = ($urandom_range(0, 2) == 0);
          preds.i_true = $urandom_range(0, 1);
          step(); n++;
          seen[state.name()] = "";
        end
        preds.i_zero = 0;
        chk(n < 100, $sformatf("opcode %0d returns", op));
        if (first_of(op) == "DONE") begin
          chk(state == IDLE, "halt goes to IDLE");
          preds.donesecd = 1; preds.gcdone = 1; repeat (3) step();
          chk(state == IDLE, "stays halted with donesecd");
          // restart as after a reset of the machine
          preds.donesecd = 0; step(); preds.gcdone = 0; repeat (8) step();
        end
      end
    chk(seen.num() >= 140, $sformatf("states visited %0d", seen.num()));
    $display("visited %0d distinct states", seen.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
