// tb_secd_cpu -- the CPU alone, on a behavioural cell memory (level-2
// interface: car, cdr, setcar!, setcdr!, alloc, meminit) and a stand-in
// collector that moves nothing: on do_gc it checks that cell 1 holds the
// list (s e c d) equal to the CPU registers, writes the free-cell pointer
// to word 0 and answers gcdone.  need_2_gc is raised at random fetches, so
// programs are interrupted by collections at arbitrary instruction
// boundaries and must still produce the right result.
module tb_secd_cpu;
  import secd_pkg::*;
  import secd_image_pkg::*;

  logic clk = 0, rst = 1;
  mem_inst_e mem_inst;
  logic [14:0] mem_addr;
  word_t mem_data, mem_buf, s_reg;
  logic need_2_gc, do_gc, gcdone, rx_valid, rx_full, tx_valid, donesecd;
  logic [7:0] rx_data, tx_data;
  cpu_state_e state;
  logic [15:0] mem [32768];
  logic [13:0] avail;
  int checks = 0, failures = 0, n_gc = 0, n_tx = 0;
  logic [7:0] last_tx;

  secd_cpu dut (.clk, .rst, .mem_inst, .mem_addr, .mem_data, .mem_buf, .need_2_gc, .do_gc, .gcdone,
                .rx_valid, .rx_data, .rx_full, .tx_valid, .tx_data, .donesecd, .state, .s_reg);

  always #5 clk = ~clk;
  initial begin #2_000_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // level-2 memory model
  always_comb begin
    case (mem_inst)
      M_CAR:   mem_buf = mem[{mem_addr[13:0], 1'b0}];
      M_CDR:   mem_buf = mem[{mem_addr[13:0], 1'b1}];
      M_ALLOC: mem_buf = {2'b00, avail};
      M_MEMINIT: mem_buf = mem[0];
      default: mem_buf = 16'h8000;
    endcase
  end
  always_ff @(posedge clk) begin
    if (mem_inst == M_SETCAR) mem[{mem_addr[13:0], 1'b0}] <= mem_data;
    if (mem_inst == M_SETCDR) mem[{mem_addr[13:0], 1'b1}] <= mem_data;
    if (rst) avail <= 0;
    else if (mem_inst == M_ALLOC) avail <= avail + 1'b1;
    else if (mem_inst == M_MEMINIT) avail <= mem[0][13:0];
  end

  // random collection requests; gcdone follows the IDLEGC rule (= !do_gc)
  // except right after a request, where it answers once the word-0 write
  // has been made
  logic gc_busy = 0;
  always @(posedge clk) begin
    need_2_gc <= ($urandom_range(0, 40) == 0);
    if (tx_valid) begin n_tx++; last_tx = tx_data; end
    if (!rst && do_gc && !gc_busy) begin
      gc_busy <= 1;
      n_gc++;
      chk(mem[2] == dut.u_dp.s, "root list s");
      chk(mem[2*mem[3][13:0]] == dut.u_dp.e, "root list e");
      chk(mem[2*mem[2*mem[3][13:0]+1][13:0]] == dut.u_dp.c, "root list c");
      mem[0] <= {2'b00, avail};
    end
    if (!do_gc) gc_busy <= 0;
  end
  assign gcdone = !do_gc || gc_busy;

  task automatic run(string name, word_t expect_top, int max_cycles);
    int k;
    for (k = 0; k < 32768; k++) mem[k] = img[k];
    rst = 1; rx_valid = 0; rx_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    k = 0;
    while (!donesecd && k < max_cycles) begin @(posedge clk); k++; end
    checks++;
    if (!donesecd) begin failures++; $display("FAIL %s: no STOP", name); end
    else begin
      word_t top = mem[{s_reg[13:0], 1'b0}];
      checks++;
      if (top !== expect_top) begin failures++; $display("FAIL %s: top %h expected %h", name, top, expect_top); end
    end
  endtask

  initial begin
    word_t f;
    int gc_before;
    need_2_gc = 0; rx_valid = 0; rx_data = 0;
    img_reset(); load_prog(lst('{n(OP_LDC), n(100), n(OP_LDC), n(58), n(OP_SUB), n(OP_LDC), n(-2), n(OP_ADD), n(OP_STOP)}));
    run("sub/add", n(40), 100000);
    img_reset(); load_prog(lst('{n(OP_LDC), n(2), n(OP_LDC), n(1), n(OP_CONS), n(OP_CDR), n(OP_STOP)}));
    run("cons/cdr", n(2), 100000);
    img_reset();
    f = lst('{n(OP_LD), loc(0,0), n(OP_LD), loc(0,1), n(OP_ADD), n(OP_RTN)});
    load_prog(lst('{n(OP_LDC), W_NIL, n(OP_LDC), n(30), n(OP_CONS), n(OP_LDC), n(12), n(OP_CONS),
                  n(OP_LDF), f, n(OP_AP), n(OP_STOP)}));
    run("ldf/ap", n(42), 100000);
    // serial: read a character, echo it, leave its code on the stack
    img_reset(); load_prog(lst('{n(OP_RECH), n(OP_WRCH), n(OP_CI), n(OP_STOP)}));
    for (int k = 0; k < 32768; k++) mem[k] = img[k];
    rst = 1; repeat (3) @(posedge clk); rst = 0;
    @(negedge clk) begin rx_valid = 1; rx_data = 8'h5A; end
    @(negedge clk) rx_valid = 0;
    begin
      int k; k = 0;
      while (!donesecd && k < 10000) begin @(posedge clk); k++; end
      chk(donesecd, "serial program stops");
      chk(mem[{s_reg[13:0], 1'b0}] == n(8'h5A), "character code on the stack");
      chk(n_tx > 0 && last_tx == 8'h5A, "character echoed");
    end
    // TAK with collections at random instruction boundaries
    gc_before = n_gc;
    img_reset(); load_prog(tak_code(6, 4, 2));
    run("tak(6,4,2)", n(tak_ref(6, 4, 2)), 2_000_000);
    chk(n_gc > gc_before, "collections requested during tak");
    $display("collections: %0d", n_gc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
