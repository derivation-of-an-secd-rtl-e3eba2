// tb_mem_level1 -- the level-1 memory controller with a behavioural
// 64K x 17 memory behind it.  Checks: CPU reads and writes land in the
// current (new) space with the mark bit cleared, GC accesses use the full
// physical address and all 17 bits, mem-switch flips the space bit, and the
// CPU sees only its own space after a switch.
module tb_mem_level1;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  l1_inst_e cpu_inst, gc_inst;
  logic [14:0] cpu_addr;
  logic [15:0] gc_addr, pm_addr;
  word_t cpu_data, cpu_buf;
  gcword_t gc_data, gc_buf, pm_wdata, pm_rdata;
  logic new_space, pm_we;
  logic [16:0] mem [65536];
  logic [16:0] shadow [65536];
  int checks = 0, failures = 0;

  mem_level1 dut (.clk, .rst, .cpu_inst, .cpu_addr, .cpu_data, .cpu_buf, .gc_inst, .gc_addr, .gc_data,
                  .gc_buf, .new_space, .pm_addr, .pm_we, .pm_wdata, .pm_rdata);

  assign pm_rdata = mem[pm_addr];
  always_ff @(posedge clk) if (pm_we) mem[pm_addr] <= pm_wdata;

  always #5 clk = ~clk;
  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit sp = 0;
    for (int k = 0; k < 65536; k++) begin mem[k] = 17'($urandom); shadow[k] = mem[k]; end
    cpu_inst = L1_NOOP; gc_inst = L1_NOOP; cpu_addr = 0; gc_addr = 0; cpu_data = 0; gc_data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(new_space == 0, "space after reset");
    for (int k = 0; k < 20000; k++) begin
      int who;
      @(negedge clk);
      cpu_inst = L1_NOOP; gc_inst = L1_NOOP;
      cpu_addr = 15'($urandom); gc_addr = 16'($urandom);
      cpu_data = 16'($urandom); gc_data = 17'($urandom);
      who = $urandom_range(0, 20);
      if (who < 10) cpu_inst = ($urandom_range(0, 1)) ? L1_READ : L1_WRITE;
      else if (who < 20) gc_inst = ($urandom_range(0, 1)) ? L1_READ : L1_WRITE;
      else gc_inst = L1_SWITCH;
      #1;
      if (cpu_inst == L1_READ) chk(cpu_buf == shadow[{sp, cpu_addr}][15:0], "cpu read");
      if (gc_inst == L1_READ)  chk(gc_buf == shadow[gc_addr], "gc read");
      @(posedge clk);
      if (cpu_inst == L1_WRITE) shadow[{sp, cpu_addr}] = {1'b0, cpu_data};
      if (gc_inst == L1_WRITE)  shadow[gc_addr] = gc_data;
      if (gc_inst == L1_SWITCH) sp = !sp;
      #1;
      chk(new_space == sp, "space bit");
      if (cpu_inst == L1_WRITE) chk(mem[{sp, cpu_addr}] == shadow[{sp, cpu_addr}], "cpu write");
      if (gc_inst == L1_WRITE) chk(mem[gc_addr] == shadow[gc_addr], "gc write");
    end
    for (int k = 0; k < 65536; k += 7) chk(mem[k] == shadow[k], "final contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
