// tb_cpu_datapath -- the CPU register file (s, e, c, d, i, j, do_gc,
// donesecd) driven by random register-transfer controls and random memory,
// ALU and serial buffers, compared every cycle with a reference model kept
// in the testbench.  Also checks the address/data multiplexers, the ALU and
// serial operand wiring (v0 = i, v1 = j, serial v0 = j) and the predicates.
module tb_cpu_datapath;
  import secd_pkg::*;
  logic clk = 0, rst = 1;
  rtc_t rtc;
  word_t mem_buf, alu_buf, ser_buf, mem_data, alu_v0, alu_v1, ser_v0, s, e, c, d, i, j;
  logic [14:0] mem_addr;
  logic [7:0] opcode;
  logic i_zero, i_true, do_gc, donesecd;
  int checks = 0, failures = 0;

  cpu_datapath dut (.clk, .rst, .rtc, .mem_buf, .alu_buf, .ser_buf, .mem_addr, .mem_data, .alu_v0, .alu_v1,
                    .ser_v0, .opcode, .i_zero, .i_true, .do_gc, .donesecd, .s, .e, .c, .d, .i, .j);

  always #5 clk = ~clk;
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] pick(int k, logic [15:0] r[6]);
    return (k < 6) ? r[k] : 16'h8000;
  endfunction

  initial begin
    logic [15:0] r[6];   // s e c d i j
    bit m_gc = 0, m_done = 0;
    rtc = RTC_HOLD; mem_buf = 0; alu_buf = 0; ser_buf = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 6; k++) r[k] = 16'h8000;
    chk(s == 16'h8000 && i == 16'h8000 && !do_gc && !donesecd, "reset values");
    for (int k = 0; k < 20000; k++) begin
      logic [15:0] n[6];
      @(negedge clk);
      rtc.s = s_sel_e'($urandom_range(0, 4));
      rtc.e = e_sel_e'($urandom_range(0, 2));
      rtc.c = c_sel_e'($urandom_range(0, 1));
      rtc.d = d_sel_e'($urandom_range(0, 2));
      rtc.i = i_sel_e'($urandom_range(0, 7));
      rtc.j = j_sel_e'($urandom_range(0, 4));
      rtc.addr = addr_sel_e'($urandom_range(0, 6));
      rtc.data = data_sel_e'($urandom_range(0, 6));
      rtc.do_gc = flag_sel_e'($urandom_range(0, 2));
      rtc.donesecd = flag_sel_e'($urandom_range(0, 2));
      mem_buf = 16'($urandom); alu_buf = 16'($urandom); ser_buf = 16'($urandom);
      if ($urandom_range(0, 7) == 0) mem_buf = {4'b1100, 12'h000};
      if ($urandom_range(0, 7) == 0) mem_buf = 16'h8000;
      #1;
      // combinational outputs
      chk(mem_addr == ((rtc.addr == AD_PTR1) ? 15'h0001 : pick(int'(rtc.addr), r)[14:0]), "mem_addr");
      chk(mem_data == pick(int'(rtc.data), r), "mem_data");
      chk(alu_v0 == r[4] && alu_v1 == r[5] && ser_v0 == r[5], "operands");
      chk(opcode == r[4][7:0], "opcode");
      chk(i_zero == (r[4][11:0] == 0), "i_zero");
      chk(i_true == (r[4] != 16'h8000), "i_true");
      // next state
      n = r;
      case (rtc.s) S_J: n[0] = r[5]; S_I: n[0] = r[4]; S_MBUF: n[0] = mem_buf; S_NIL: n[0] = 16'h8000; default: ; endcase
      case (rtc.e) E_I: n[1] = r[4]; E_MBUF: n[1] = mem_buf; default: ; endcase
      if (rtc.c == C_MBUF) n[2] = mem_buf;
      case (rtc.d) D_I: n[3] = r[4]; D_MBUF: n[3] = mem_buf; default: ; endcase
      case (rtc.i)
        I_MBUF: n[4] = mem_buf; I_ALU: n[4] = alu_buf; I_SBUF: n[4] = ser_buf; I_J: n[4] = r[5];
        I_SYM2LIST: n[4] = {2'b00, r[5][13:0]};
        I_LIST2SYM: n[4] = {2'b01, r[5][13:0]};
        I_CHAR2INT: n[4] = {4'b1100, r[5][11:0]};
        default: ;
      endcase
      case (rtc.j) J_MBUF: n[5] = mem_buf; J_E: n[5] = r[1]; J_I: n[5] = r[4]; J_PTR1: n[5] = 16'h0001; default: ; endcase
      if (rtc.do_gc != F_HOLD) m_gc = (rtc.do_gc == F_SET);
      if (rtc.donesecd != F_HOLD) m_done = (rtc.donesecd == F_SET);
      @(posedge clk);
      r = n;
      #1;
      chk(s == r[0] && e == r[1] && c == r[2] && d == r[3] && i == r[4] && j == r[5], "registers");
      chk(do_gc == m_gc && donesecd == m_done, "flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
