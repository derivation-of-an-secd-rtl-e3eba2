// tb_boot_rom -- the 32K x 16 boot ROM: every word reads back what was
// placed in it, and an unprogrammed ROM reads zero (the empty-list marker
// the collector's copy loop stops on).
module tb_boot_rom;
  logic [14:0] addr;
  logic [15:0] data;
  logic [15:0] shadow [32768];
  int checks = 0, failures = 0;

  boot_rom dut (.addr, .data);

  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    #1;
    for (int k = 0; k < 32768; k += 97) begin
      addr = 15'(k); #1; checks++;
      if (data !== 16'h0000) begin failures++; if (failures < 10) $display("FAIL blank word %0d = %h", k, data); end
    end
    for (int k = 0; k < 32768; k++) begin
      shadow[k] = 16'($urandom);
      dut.rom[k] = shadow[k];
    end
    for (int k = 0; k < 32768; k++) begin
      addr = 15'(k); #1; checks++;
      if (data !== shadow[k]) begin failures++; if (failures < 10) $display("FAIL word %0d = %h exp %h", k, data, shadow[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
