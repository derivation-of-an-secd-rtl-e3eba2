// tb_phys_mem -- the 64K x 17 physical memory: random writes and reads
// against a shadow array; a write is visible on the combinational read
// port after the clock edge, and a read with we low never changes memory.
module tb_phys_mem;
  logic clk = 0;
  logic [15:0] addr;
  logic we;
  logic [16:0] wdata, rdata;
  logic [16:0] shadow [65536];
  int checks = 0, failures = 0;

  phys_mem dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;
  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int k = 0; k < 65536; k++) begin shadow[k] = 17'($urandom); dut.ram[k] = shadow[k]; end
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      addr = (k < 64) ? 16'(k * 1025) : 16'($urandom);
      we = $urandom_range(0, 1);
      wdata = 17'($urandom);
      #1; checks++;
      if (rdata !== shadow[addr]) begin failures++; if (failures < 10) $display("FAIL read %h = %h exp %h", addr, rdata, shadow[addr]); end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1; checks++;
      if (rdata !== shadow[addr]) begin failures++; if (failures < 10) $display("FAIL after write %h = %h exp %h", addr, rdata, shadow[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
