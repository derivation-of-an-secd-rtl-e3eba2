// tb_secd_top -- end-to-end test of the SECD machine.
//
// Builds a series of small programs (one or two per instruction group) and
// a TAK run in the boot ROM, resets the machine for each, lets the collector
// load memory and the CPU run to STOP, then checks the top of the stack (and
// the serial output) against values worked out here.  The heap is made small
// (CELLS = 512) so that TAK forces many collections.  Counts how often each
// mechanism happened: ROM load, collection, forward-pointer hit, space
// switch, serial in/out and every opcode, and fails any that never did.
// The CPU/collector handshake is checked against its timing diagram at
// every collection: do_gc is high from the first WAIT_GC cycle on, gcdone is
// low in that cycle (the collector has seen do_gc and left idle), and the
// CPU leaves WAIT_GC for RECOVER_GC1 on the cycle after RESTORE, when
// the collector is back in IDLEGC.
module tb_secd_top;
  import secd_pkg::*;
  import secd_image_pkg::*;

  localparam int ROM_WORDS = 1024;
  localparam int CELLS     = 512;

  logic clk = 0, rst = 1;
  logic rx_valid = 0;
  logic [7:0] rx_data = 0;
  logic rx_full, tx_valid, donesecd, do_gc, gcdone;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  int n_hs = 0, hs_bad = 0;
  int n_gc = 0, n_fwd = 0, n_switch = 0, n_romcopy = 0, n_sin = 0, n_sout = 0;
  int op_count [64];
  int tx_log [$];
  longint cycles = 0;

  secd_top #(.CELLS(CELLS), .ROM_WORDS(ROM_WORDS)) dut (
    .clk, .rst, .rx_valid, .rx_data, .rx_full, .tx_valid, .tx_data, .donesecd, .do_gc, .gcdone);

  always #5 clk = ~clk;

  initial begin
    #400_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic do_gc_q = 0;
  always @(posedge clk) begin
    cycles++;
    do_gc_q <= do_gc;
    if (!rst) begin
      if (dut.u_cpu.state == WAIT_GC && !(do_gc && !gcdone) && dut.u_gc.state != RESTORE) hs_bad++;
      if (dut.u_cpu.state == WAIT_GC && dut.u_gc.state == RESTORE) begin
        n_hs++;
        if (!gcdone) hs_bad++;
      end
      if (dut.u_cpu.state == RECOVER_GC1 && dut.u_gc.state != IDLEGC) hs_bad++;
      if (do_gc && !do_gc_q) n_gc++;
      if (dut.u_gc.state == GC_CHECK && dut.u_gc.preds.data_fwd) n_fwd++;
      if (dut.u_gc.mem_inst == L1_SWITCH) n_switch++;
      if (dut.u_gc.state == GC_ROMCOPY) n_romcopy++;
      if (dut.u_cpu.u_ser.inst == SER_IN) n_sin++;
      if (dut.u_cpu.u_ser.inst == SER_OUT) n_sout++;
      if (dut.u_cpu.state == EXEC) op_count[dut.u_cpu.opcode[5:0]]++;
      if (tx_valid) tx_log.push_back(int'(tx_data));
    end
  end

  // read a word of the CPU's current (new) space
  function automatic word_t rd(int word_addr);
    return dut.u_mem.u_pm.ram[{dut.u_mem.new_space, 15'(word_addr)}][15:0];
  endfunction

  task automatic run_program(string name, word_t expect_top, int max_cycles);
    int k;
    for (k = 0; k < ROM_WORDS; k++) dut.u_gc.u_rom.rom[k] = img[k];
    rst = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    k = 0;
    while (!donesecd && k < max_cycles) begin @(posedge clk); k++; end
    checks++;
    if (!donesecd) begin
      failures++;
      $display("FAIL %s: no STOP within %0d cycles", name, max_cycles);
    end else begin
      word_t top;
      top = rd(2 * int'(dut.u_cpu.s_reg[13:0]));
      checks++;
      if (top !== expect_top) begin
        failures++;
        $display("FAIL %s: top of stack %h, expected %h", name, top, expect_top);
      end else $display("ok   %s: top %h after %0d cycles", name, top, k);
    end
  endtask

  initial begin
    word_t f, code;
    foreach (op_count[k]) op_count[k] = 0;

    img_reset(); load_prog(lst('{n(OP_LDC), n(10), n(OP_LDC), n(3), n(OP_SUB), n(OP_LDC), n(2), n(OP_ADD), n(OP_STOP)}));
    run_program("sub/add", n(9), 200000);

    img_reset(); load_prog(lst('{n(OP_LDC), n(3), n(OP_LDC), n(3), n(OP_EQ), n(OP_STOP)}));
    run_program("eq", W_TRUE, 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), n(5), n(OP_LDC), n(4), n(OP_LEQ), n(OP_STOP)}));
    run_program("leq false", W_NIL, 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), n(-3), n(OP_LDC), n(4), n(OP_LEQ), n(OP_STOP)}));
    run_program("leq true", W_TRUE, 200000);

    img_reset(); load_prog(lst('{n(OP_LDC), cons(n(1), n(2)), n(OP_CDR), n(OP_STOP)}));
    run_program("cdr", n(2), 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), n(1), n(OP_LDC), n(2), n(OP_CONS), n(OP_CAR), n(OP_STOP)}));
    run_program("cons/car", n(2), 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), n(7), n(OP_ATOM), n(OP_LDC), cons(n(1), W_NIL), n(OP_PAIR),
                               n(OP_EQ), n(OP_STOP)}));
    run_program("atom/pair", W_TRUE, 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), ch(65), n(OP_NUM), n(OP_STOP)}));
    run_program("num", W_NIL, 200000);

    img_reset(); load_prog(lst('{n(OP_LDC), W_TRUE, n(OP_SEL), lst('{n(OP_LDC), n(1), n(OP_JOIN)}),
                               lst('{n(OP_LDC), n(2), n(OP_JOIN)}), n(OP_STOP)}));
    run_program("sel true", n(1), 200000);
    img_reset(); load_prog(lst('{n(OP_LDC), W_NIL, n(OP_SEL), lst('{n(OP_LDC), n(1), n(OP_JOIN)}),
                               lst('{n(OP_LDC), n(2), n(OP_JOIN)}), n(OP_STOP)}));
    run_program("sel false", n(2), 200000);

    img_reset();
    f = lst('{n(OP_LD), loc(0,1), n(OP_LD), loc(0,0), n(OP_SUB), n(OP_RTN)});
    load_prog(lst('{n(OP_LDC), W_NIL, n(OP_LDC), n(5), n(OP_CONS), n(OP_LDC), n(20), n(OP_CONS),
                  n(OP_LDF), f, n(OP_AP), n(OP_STOP)}));
    run_program("ldf/ap/ld/rtn", n(-15), 200000);

    img_reset();
    code = lst('{n(OP_LDC), n(42), n(OP_RTN)});
    load_prog(lst('{n(OP_LDC), W_NIL, n(OP_LDC), code, n(OP_EXEC), n(OP_AP), n(OP_STOP)}));
    run_program("exec", n(42), 200000);

    img_reset(); load_prog(lst('{n(OP_LDC), n(1), n(OP_LDC), n(2), n(OP_POP), n(OP_STOP)}));
    run_program("pop", n(1), 200000);

    img_reset();
    f = lst('{n(OP_LDC), n(9), n(OP_SET), loc(0,1), n(OP_POP), n(OP_LD), loc(0,1), n(OP_RTN)});
    load_prog(lst('{n(OP_LDC), W_NIL, n(OP_LDC), n(5), n(OP_CONS), n(OP_LDC), n(6), n(OP_CONS),
                  n(OP_LDF), f, n(OP_AP), n(OP_STOP)}));
    run_program("set", n(9), 200000);

    img_reset();
    load_prog(lst('{n(OP_LDC), {TAG_SYM, cons(ch(97), W_NIL) & 16'h3fff}, n(OP_SL), n(OP_CAR),
                  n(OP_WRCH), n(OP_CI), n(OP_STOP)}));
    run_program("sl/wrch/ci", n(97), 200000);
    img_reset();
    load_prog(lst('{n(OP_LDC), cons(ch(98), W_NIL), n(OP_LS), n(OP_SYM), n(OP_STOP)}));
    run_program("ls/sym", W_TRUE, 200000);

    // serial input: deliver a character, then RECH it
    img_reset(); load_prog(lst('{n(OP_RECH), n(OP_WRCH), n(OP_STOP)}));
    fork
      begin repeat (ROM_WORDS / 2) @(posedge clk); rx_data = 8'h5a; rx_valid = 1; @(posedge clk); rx_valid = 0; end
    join_none
    run_program("rech", ch(8'h5a), 200000);

    // DUM/RAP, deep recursion and garbage collection
    img_reset(); load_prog(tak_code(8, 4, 2));
    run_program("tak(8,4,2)", n(tak_ref(8, 4, 2)), 20_000_000);

    checks++;
    if (tx_log.size() != 2 || tx_log[0] != 97 || tx_log[1] != 8'h5a) begin
      failures++; $display("FAIL serial output log size %0d", tx_log.size());
    end

    checks++;
    if (hs_bad != 0 || n_hs == 0) begin
      failures++; $display("FAIL handshake: %0d bad cycles, %0d completed collections", hs_bad, n_hs);
    end else $display("handshake ok in %0d collections", n_hs);

    // mechanisms
    begin
      string names [6] = '{"rom copy", "collection", "forward hit", "space switch", "s-in", "s-out"};
      int    cnt   [6];
      cnt = '{n_romcopy, n_gc, n_fwd, n_switch, n_sin, n_sout};
      for (int k = 0; k < 6; k++) begin
        checks++;
        $display("mechanism %-13s %0d", names[k], cnt[k]);
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[k]); end
      end
      for (int k = 1; k <= 32; k++) if (!(k inside {17, 18, 19})) begin
        checks++;
        if (op_count[k] == 0) begin failures++; $display("FAIL opcode %0d never executed", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
