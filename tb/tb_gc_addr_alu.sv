// tb_gc_addr_alu -- old_addr/new_addr: the word address gets the current
// space bit (new) or its complement (old) on top; exhaustive over the
// instruction and space bit, random over the address.
module tb_gc_addr_alu;
  import secd_pkg::*;
  addralu_inst_e inst;
  logic [14:0] v0;
  logic new_space;
  logic [15:0] buff;
  int checks = 0, failures = 0;

  gc_addr_alu dut (.inst, .v0, .new_space, .buff);

  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic [15:0] exp;
      inst = (k % 2) ? AA_NEW : AA_OLD;
      new_space = (k / 2) % 2;
      v0 = 15'($urandom);
      if (k < 8) v0 = (k < 4) ? 15'h0000 : 15'h7FFF;
      #1;
      exp = (32'(new_space) * 32768 + 32'(v0)) % 65536;
      if (inst == AA_OLD) exp = exp ^ 16'h8000;
      checks++;
      if (buff !== exp) begin failures++; if (failures < 10) $display("FAIL %s sp=%b v0=%h got %h exp %h", inst.name(), new_space, v0, buff, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
