// tb_secd_alu -- random and corner-case check of the SECD ALU against a
// reference written with plain integer arithmetic and literal tag values
// (number = 4'b1100 tag over a 12-bit two's complement value, nil = 16'h8000,
// true = 16'h8001, pointer tag 2'b00, symbol tag 2'b01).
module tb_secd_alu;
  import secd_pkg::*;
  alu_inst_e inst;
  word_t v0, v1, result;
  int checks = 0, failures = 0;

  secd_alu dut (.inst, .v0, .v1, .result);

  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [15:0] num(int v); return {4'b1100, 12'(v)}; endfunction
  function automatic logic [15:0] bool(bit b); return b ? 16'h8001 : 16'h8000; endfunction
  function automatic int sval(logic [15:0] w); return int'($signed(w[11:0])); endfunction

  function automatic logic [15:0] ref_alu(alu_inst_e op, logic [15:0] a, logic [15:0] b);
    case (op)
      A_ADD:   return num(sval(a) + sval(b));
      A_SUB:   return num(sval(a) - sval(b));
      A_SUB1:  return num(sval(a) - 1);
      A_EQ:    return bool(a == b);
      A_LEQ:   return bool(sval(a) <= sval(b));
      A_ATOM:  return bool(a[15:14] != 2'b00);
      A_NUMP:  return bool(a[15:12] == 4'b1100);
      A_SYMP:  return bool(a[15:14] == 2'b01);
      A_PAIRP: return bool(a[15:14] == 2'b00);
      default: return 16'h8000;
    endcase
  endfunction

  task automatic check(alu_inst_e op, logic [15:0] a, logic [15:0] b);
    logic [15:0] exp;
    inst = op; v0 = a; v1 = b; #1;
    exp = ref_alu(op, a, b);
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s v0=%h v1=%h got %h exp %h", op.name(), a, b, result, exp);
    end
  endtask

  initial begin
    alu_inst_e ops[10] = '{A_NOOP, A_ADD, A_SUB, A_SUB1, A_EQ, A_LEQ, A_ATOM, A_NUMP, A_SYMP, A_PAIRP};
    inst = A_NOOP; v0 = 0; v1 = 0;
    // corners named in the benchmarks: 18-12, 1-1, -1 <= 0, wrap at 2047
    check(A_SUB, num(18), num(12));
    check(A_SUB1, num(0), num(0));
    check(A_ADD, num(2047), num(1));
    check(A_LEQ, num(-1), num(0));
    check(A_LEQ, num(5), num(5));
    check(A_LEQ, num(6), num(5));
    check(A_EQ, 16'h4123, 16'h4123);
    check(A_EQ, 16'h4123, 16'h4124);
    check(A_ATOM, 16'h0005, 0);
    check(A_ATOM, 16'h8000, 0);
    for (int k = 0; k < 3000; k++) begin
      logic [15:0] a, b;
      a = 16'($urandom); b = 16'($urandom);
      if ($urandom_range(0, 1)) a[15:12] = 4'b1100;
      if ($urandom_range(0, 1)) b[15:12] = 4'b1100;
      if ($urandom_range(0, 7) == 0) b = a;
      check(ops[$urandom_range(0, 9)], a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
