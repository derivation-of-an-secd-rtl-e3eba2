// cpu_datapath -- data path unit of the SECD CPU.
//
// Registers s (stack), e (environment), c (control), d (dump), the two
// accumulators i and j, and the flags do_gc and donesecd.  Each cycle the
// register transfer code (RTC) picks, per register, whether it holds or
// loads the memory buffer, the ALU result, the serial buffer, another
// register or a constant.  The data path also drives the memory address and
// data (combinational outputs selected by the RTC), feeds i and j straight
// to the ALU (v0 = i, v1 = j) and j to the serial interface, and returns
// the predicates the controller needs (opcode in i, i zero, i true).
// Simple tag conversions are done here instead of in the ALU:
//   char2int: tag bits 15,14 set, 13,12 cleared, value kept;
//   sym->list / list->sym: the tag becomes pointer / symbol.
// All registers load at the rising clock edge; synchronous reset.
module cpu_datapath
  import secd_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  rtc_t               rtc,
  input  word_t              mem_buf,
  input  word_t              alu_buf,
  input  word_t              ser_buf,
  output logic [MADDR_W-1:0] mem_addr,
  output word_t              mem_data,
  output word_t              alu_v0,
  output word_t              alu_v1,
  output word_t              ser_v0,
  output logic [7:0]         opcode,
  output logic               i_zero,
  output logic               i_true,
  output logic               do_gc,
  output logic               donesecd,
  output word_t              s, e, c, d, i, j
);
  word_t addr_w;

  always_comb begin
    case (rtc.addr)
      AD_S:    addr_w = s;
      AD_E:    addr_w = e;
      AD_C:    addr_w = c;
      AD_D:    addr_w = d;
      AD_I:    addr_w = i;
      AD_J:    addr_w = j;
      default: addr_w = W_PTR1;
    endcase
    case (rtc.data)
      DT_S:    mem_data = s;
      DT_E:    mem_data = e;
      DT_C:    mem_data = c;
      DT_D:    mem_data = d;
      DT_I:    mem_data = i;
      DT_J:    mem_data = j;
      default: mem_data = W_NIL;
    endcase
  end
  assign mem_addr = addr_w[MADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= W_NIL; e <= W_NIL; c <= W_NIL; d <= W_NIL; i <= W_NIL; j <= W_NIL;
      do_gc <= 1'b0; donesecd <= 1'b0;
    end else begin
      case (rtc.s)
        S_J:     s <= j;
        S_I:     s <= i;
        S_MBUF:  s <= mem_buf;
        S_NIL:   s <= W_NIL;
        default: ;
      endcase
      case (rtc.e)
        E_I:     e <= i;
        E_MBUF:  e <= mem_buf;
        default: ;
      endcase
      if (rtc.c == C_MBUF) c <= mem_buf;
      case (rtc.d)
        D_I:     d <= i;
        D_MBUF:  d <= mem_buf;
        default: ;
      endcase
      case (rtc.i)
        I_MBUF:     i <= mem_buf;
        I_ALU:      i <= alu_buf;
        I_SBUF:     i <= ser_buf;
        I_J:        i <= j;
        I_SYM2LIST: i <= {TAG_PTR, j[13:0]};
        I_LIST2SYM: i <= {TAG_SYM, j[13:0]};
        I_CHAR2INT: i <= {2'b11, 2'b00, j[11:0]};
        default: ;
      endcase
      case (rtc.j)
        J_MBUF:  j <= mem_buf;
        J_E:     j <= e;
        J_I:     j <= i;
        J_PTR1:  j <= W_PTR1;
        default: ;
      endcase
      case (rtc.do_gc)
        F_CLR:   do_gc <= 1'b0;
        F_SET:   do_gc <= 1'b1;
        default: ;
      endcase
      case (rtc.donesecd)
        F_CLR:   donesecd <= 1'b0;
        F_SET:   donesecd <= 1'b1;
        default: ;
      endcase
    end
  end

  assign alu_v0 = i;
  assign alu_v1 = j;
  assign ser_v0 = j;
  assign opcode = i[7:0];
  assign i_zero = (i[11:0] == 12'd0);
  assign i_true = (i != W_NIL);
endmodule
