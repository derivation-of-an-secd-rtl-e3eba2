// tb_mem_level2 -- the level-2 (cell) memory controller over a
// behavioural 32K-word space.  Checks car/cdr/setcar!/setcdr! address the
// even/odd word of a cell, alloc returns a pointer to avail and bumps it,
// meminit loads avail from word 0, and need_2_gc rises exactly when fewer
// than the reserve of free cells remain (16K cells per space).
module tb_mem_level2;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  mem_inst_e inst;
  logic [14:0] addr, l1_addr;
  word_t data, buf_o, l1_data, l1_buf;
  logic need_2_gc;
  logic [13:0] avail;
  l1_inst_e l1_inst;
  logic [15:0] mem [32768];
  logic [15:0] shadow [32768];
  int checks = 0, failures = 0;

  mem_level2 dut (.clk, .rst, .inst, .addr, .data, .buf_o, .need_2_gc, .avail,
                  .l1_inst, .l1_addr, .l1_data, .l1_buf);

  assign l1_buf = mem[l1_addr];
  always_ff @(posedge clk) if (l1_inst == L1_WRITE) mem[l1_addr] <= l1_data;

  always #5 clk = ~clk;
  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int m_avail = 0;
    for (int k = 0; k < 32768; k++) begin mem[k] = 16'($urandom); shadow[k] = mem[k]; end
    inst = M_NOOP; addr = 0; data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 40000; k++) begin
      int c;
      @(negedge clk);
      c = $urandom_range(0, 16383);
      addr = {1'b0, 14'(c)};
      data = 16'($urandom);
      case ($urandom_range(0, 9))
        0, 1: inst = M_CAR;
        2, 3: inst = M_CDR;
        4: inst = M_SETCAR;
        5: inst = M_SETCDR;
        6, 7: inst = M_ALLOC;
        8: begin inst = M_MEMINIT; end
        default: inst = M_NOOP;
      endcase
      if (inst == M_MEMINIT && $urandom_range(0, 3) != 0) inst = M_ALLOC;
      #1;
      case (inst)
        M_CAR: chk(buf_o == shadow[2*c], "car");
        M_CDR: chk(buf_o == shadow[2*c+1], "cdr");
        M_ALLOC: chk(buf_o == {2'b00, 14'(m_avail)}, "alloc pointer");
        default: ;
      endcase
      chk(need_2_gc == (m_avail + 8 > 16384), "need_2_gc");
      chk(avail == 14'(m_avail), "avail");
      @(posedge clk);
      case (inst)
        M_SETCAR: shadow[2*c] = data;
        M_SETCDR: shadow[2*c+1] = data;
        M_ALLOC: m_avail = (m_avail + 1) % 16384;
        M_MEMINIT: m_avail = shadow[0][13:0];
        default: ;
      endcase
      // keep avail near the top some of the time to exercise need_2_gc
      if (k == 20000) begin
        @(negedge clk); mem[0] = 16'd16370; shadow[0] = 16'd16370; inst = M_MEMINIT;
        @(posedge clk); m_avail = 16370;
      end
    end
    for (int k = 0; k < 32768; k += 3) chk(mem[k] == shadow[k], "final contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
