// tb_gc_counter -- the 16-bit GC counter (used for untraced and avail):
// load, increment with wrap at 2**16, and hold, against a reference count.
module tb_gc_counter;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  cnt_inst_e inst;
  logic [15:0] v0, count;
  int checks = 0, failures = 0;

  gc_counter dut (.clk, .rst, .inst, .v0, .count);

  always #5 clk = ~clk;
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    int m = 0;
    inst = CNT_HOLD; v0 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (count !== 0) begin failures++; $display("FAIL reset value %h", count); end
    // wrap-around
    @(negedge clk) begin inst = CNT_LOAD; v0 = 16'hFFFE; end
    @(posedge clk) m = 16'hFFFE;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      case ($urandom_range(0, 4))
        0: inst = CNT_LOAD;
        1: inst = CNT_HOLD;
        default: inst = CNT_INC;
      endcase
      v0 = 16'($urandom);
      if (k < 3) inst = CNT_INC;
      @(posedge clk);
      if (inst == CNT_LOAD) m = v0; else if (inst == CNT_INC) m = (m + 1) % 65536;
      #1;
      checks++;
      if (count !== 16'(m)) begin failures++; if (failures < 10) $display("FAIL count %h exp %h", count, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
