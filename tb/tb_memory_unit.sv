// tb_memory_unit -- the whole memory unit (level 2, level 1, physical
// memory) with both ports: CPU cell operations in the current space and
// collector word operations with full physical addresses, interleaved at
// random (never in the same cycle, as the processes never overlap), against
// a 64K x 17 reference.  Covers alloc / meminit / need_2_gc, the space
// switch, and that a CPU write clears the word's mark bit.
module tb_memory_unit;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  mem_inst_e cpu_inst;
  logic [14:0] cpu_addr;
  word_t cpu_data, cpu_buf;
  logic need_2_gc, new_space;
  logic [13:0] avail;
  l1_inst_e gc_inst;
  logic [15:0] gc_addr;
  gcword_t gc_data, gc_buf;
  logic [16:0] shadow [65536];
  int checks = 0, failures = 0;

  memory_unit dut (.clk, .rst, .cpu_inst, .cpu_addr, .cpu_data, .cpu_buf, .need_2_gc, .avail,
                   .gc_inst, .gc_addr, .gc_data, .gc_buf, .new_space);

  always #5 clk = ~clk;
  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit sp = 0;
    int m_avail = 0;
    for (int k = 0; k < 65536; k++) begin shadow[k] = 17'($urandom); dut.u_pm.ram[k] = shadow[k]; end
    cpu_inst = M_NOOP; gc_inst = L1_NOOP; cpu_addr = 0; cpu_data = 0; gc_addr = 0; gc_data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 40000; k++) begin
      int c;
      @(negedge clk);
      cpu_inst = M_NOOP; gc_inst = L1_NOOP;
      c = $urandom_range(0, 16383);
      cpu_addr = 15'(c); cpu_data = 16'($urandom);
      gc_addr = 16'($urandom); gc_data = 17'($urandom);
      if ($urandom_range(0, 1)) cpu_inst = mem_inst_e'($urandom_range(1, 6));
      else if ($urandom_range(0, 30) == 0) gc_inst = L1_SWITCH;
      else gc_inst = l1_inst_e'($urandom_range(1, 2));
      if (k == 30000) begin   // free pointer near the top of the space
        cpu_inst = M_NOOP; gc_inst = L1_WRITE; gc_addr = {sp, 15'd0}; gc_data = 17'd16375;
      end
      if (k == 30001) begin cpu_inst = M_MEMINIT; gc_inst = L1_NOOP; end
      #1;
      case (cpu_inst)
        M_CAR: chk(cpu_buf == shadow[{sp, 14'(c), 1'b0}][15:0], "car");
        M_CDR: chk(cpu_buf == shadow[{sp, 14'(c), 1'b1}][15:0], "cdr");
        M_ALLOC: chk(cpu_buf == {2'b00, 14'(m_avail)}, "alloc");
        default: ;
      endcase
      if (gc_inst == L1_READ) chk(gc_buf == shadow[gc_addr], "collector read");
      chk(avail == 14'(m_avail) && need_2_gc == (m_avail + 8 > 16384), "avail / need_2_gc");
      @(posedge clk);
      case (cpu_inst)
        M_SETCAR: shadow[{sp, 14'(c), 1'b0}] = {1'b0, cpu_data};
        M_SETCDR: shadow[{sp, 14'(c), 1'b1}] = {1'b0, cpu_data};
        M_ALLOC: m_avail = (m_avail + 1) % 16384;
        M_MEMINIT: m_avail = shadow[{sp, 15'd0}][13:0];
        default: ;
      endcase
      if (gc_inst == L1_WRITE) shadow[gc_addr] = gc_data;
      if (gc_inst == L1_SWITCH) sp = !sp;
      #1 chk(new_space == sp, "space bit");
    end
    for (int k = 0; k < 65536; k += 5) chk(dut.u_pm.ram[k] == shadow[k], "final contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
