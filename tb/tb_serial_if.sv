// tb_serial_if -- the serial interface: a received byte is held until the
// CPU reads it (SER_IN clears rx_full), out_char shows the held byte tagged
// as a character, and SER_OUT presents the low byte of v0 with a one-cycle
// tx_valid pulse.  Random traffic is compared with a small reference model.
module tb_serial_if;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  ser_inst_e inst;
  word_t v0, out_char;
  logic rx_valid, rx_full, tx_valid;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;

  serial_if dut (.clk, .rst, .inst, .v0, .out_char, .rx_valid, .rx_data, .rx_full, .tx_valid, .tx_data);

  always #5 clk = ~clk;
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [7:0] m_hold = 0, m_tx = 0;
    bit m_full = 0, m_txv = 0;
    inst = SER_NOOP; v0 = 0; rx_valid = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      rx_valid = ($urandom_range(0, 3) == 0);
      rx_data  = 8'($urandom);
      case ($urandom_range(0, 2))
        0: inst = SER_NOOP;
        1: inst = SER_IN;
        default: inst = SER_OUT;
      endcase
      v0 = 16'($urandom);
      // reference: next-state
      @(posedge clk);
      m_txv = (inst == SER_OUT);
      if (inst == SER_OUT) m_tx = v0[7:0];
      if (rx_valid) begin m_hold = rx_data; m_full = 1; end
      else if (inst == SER_IN) m_full = 0;
      #1;
      chk(tx_valid == m_txv, "tx_valid");
      if (m_txv) chk(tx_data == m_tx, "tx_data");
      chk(rx_full == m_full, "rx_full");
      chk(out_char == {4'b1101, 4'b0000, m_hold}, "out_char");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
