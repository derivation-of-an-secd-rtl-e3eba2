// secd_pkg -- shared types, word format and microcode of the SECD machine.
//
// Word format (16 bits, one memory word; a list cell is two words, car at
// the even and cdr at the odd word address):
//   [15:14] = 2'b00  pointer   value [13:0] = cell address
//   [15:14] = 2'b01  symbol    value [13:0] = cell address of its character list
//   [15:14] = 2'b10  constant  value 0 = nil, 1 = true
//   [15:12] = 4'b1100 number   value [11:0] two's complement
//   [15:12] = 4'b1101 character value [7:0] ASCII
// The garbage collector sees 17-bit words: bit 16 is the forward-pointer mark
// it sets on a cell of the old space once the cell has been copied.
// The number tag 1100 follows the char->integer projection of the design
// (tag slices 15,14 set to 1, slices 13,12 cleared); the other tag codes, the
// 14-bit cell address and the opcode numbers of the added instructions are
// this design's choice.  Opcodes 1..16, 20, 21 keep Henderson's numbering.
//
// The CPU controller is a table of states: cpu_ucode() maps the current state
// and the predicates to the next state, the instructions for the memory unit,
// ALU and serial interface, and the register transfer code (RTC) for the data
// path unit.  At most one memory, ALU or serial operation happens per state.
// gc_ucode() does the same for the garbage collector.
package secd_pkg;

  localparam int WORD_W  = 16;   // CPU word
  localparam int GCW_W   = 17;   // GC word: mark bit + CPU word
  localparam int CELL_AW = 14;   // cell address bits in a pointer value
  localparam int WADDR_W = 15;   // word address within one space
  localparam int PADDR_W = 16;   // physical address: space bit + word address
  localparam int MADDR_W = 15;   // width of the CPU mem.addr signal

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [GCW_W-1:0]  gcword_t;

  // ---------------- tags ----------------
  localparam logic [1:0] TAG_PTR   = 2'b00;
  localparam logic [1:0] TAG_SYM   = 2'b01;
  localparam logic [1:0] TAG_CONST = 2'b10;
  localparam logic [3:0] TAG_NUM   = 4'b1100;
  localparam logic [3:0] TAG_CHAR  = 4'b1101;

  localparam word_t W_NIL  = {TAG_CONST, 14'd0};
  localparam word_t W_TRUE = {TAG_CONST, 14'd1};
  localparam word_t W_PTR1 = {TAG_PTR,   14'd1};

  function automatic logic is_ptr(word_t w);  return w[15:14] == TAG_PTR;   endfunction
  function automatic logic is_sym(word_t w);  return w[15:14] == TAG_SYM;   endfunction
  function automatic logic is_num(word_t w);  return w[15:12] == TAG_NUM;   endfunction
  function automatic logic is_char(word_t w); return w[15:12] == TAG_CHAR;  endfunction
  function automatic word_t mk_num(logic [11:0] v);  return {TAG_NUM, v};  endfunction
  function automatic word_t mk_char(logic [7:0] v);  return {TAG_CHAR, 4'd0, v}; endfunction
  function automatic word_t mk_ptr(logic [13:0] a);  return {TAG_PTR, a};  endfunction
  function automatic word_t mk_bool(logic b);        return b ? W_TRUE : W_NIL; endfunction

  // ---------------- SECD opcodes ----------------
  typedef enum logic [7:0] {
    OP_LD = 8'd1, OP_LDC = 8'd2, OP_LDF = 8'd3, OP_AP = 8'd4, OP_RTN = 8'd5,
    OP_DUM = 8'd6, OP_RAP = 8'd7, OP_SEL = 8'd8, OP_JOIN = 8'd9, OP_CAR = 8'd10,
    OP_CDR = 8'd11, OP_ATOM = 8'd12, OP_CONS = 8'd13, OP_EQ = 8'd14,
    OP_ADD = 8'd15, OP_SUB = 8'd16, OP_LEQ = 8'd20, OP_STOP = 8'd21,
    OP_SL = 8'd22, OP_LS = 8'd23, OP_CI = 8'd24, OP_RECH = 8'd25,
    OP_WRCH = 8'd26, OP_NUM = 8'd27, OP_SYM = 8'd28, OP_PAIR = 8'd29,
    OP_EXEC = 8'd30, OP_POP = 8'd31, OP_SET = 8'd32
  } opcode_e;

  // ---------------- instructions for the abstract objects ----------------
  typedef enum logic [2:0] {
    M_NOOP, M_CAR, M_CDR, M_SETCAR, M_SETCDR, M_ALLOC, M_MEMINIT
  } mem_inst_e;

  typedef enum logic [3:0] {
    A_NOOP, A_ADD, A_SUB, A_SUB1, A_EQ, A_LEQ, A_ATOM, A_NUMP, A_SYMP, A_PAIRP
  } alu_inst_e;

  typedef enum logic [1:0] { SER_NOOP, SER_IN, SER_OUT } ser_inst_e;

  // level 1 memory interface instructions (GC view and translated CPU view)
  typedef enum logic [1:0] { L1_NOOP, L1_READ, L1_WRITE, L1_SWITCH } l1_inst_e;

  typedef enum logic { AA_OLD, AA_NEW } addralu_inst_e;

  typedef enum logic [1:0] { CNT_HOLD, CNT_LOAD, CNT_INC } cnt_inst_e;

  // ---------------- CPU register transfer code ----------------
  typedef enum logic [2:0] { S_HOLD, S_J, S_I, S_MBUF, S_NIL } s_sel_e;
  typedef enum logic [1:0] { E_HOLD, E_I, E_MBUF } e_sel_e;
  typedef enum logic [1:0] { C_HOLD, C_MBUF } c_sel_e;
  typedef enum logic [1:0] { D_HOLD, D_I, D_MBUF } d_sel_e;
  typedef enum logic [2:0] {
    I_HOLD, I_MBUF, I_ALU, I_SBUF, I_J, I_SYM2LIST, I_LIST2SYM, I_CHAR2INT
  } i_sel_e;
  typedef enum logic [2:0] { J_HOLD, J_MBUF, J_E, J_I, J_PTR1 } j_sel_e;
  typedef enum logic [2:0] { AD_S, AD_E, AD_C, AD_D, AD_I, AD_J, AD_PTR1 } addr_sel_e;
  typedef enum logic [2:0] { DT_S, DT_E, DT_C, DT_D, DT_I, DT_J, DT_NIL } data_sel_e;
  typedef enum logic [1:0] { F_CLR, F_SET, F_HOLD } flag_sel_e;

  typedef struct packed {
    s_sel_e    s;
    e_sel_e    e;
    c_sel_e    c;
    d_sel_e    d;
    i_sel_e    i;
    j_sel_e    j;
    addr_sel_e addr;
    data_sel_e data;
    flag_sel_e do_gc;
    flag_sel_e donesecd;
  } rtc_t;

  localparam rtc_t RTC_HOLD = '{s: S_HOLD, e: E_HOLD, c: C_HOLD, d: D_HOLD,
                                i: I_HOLD, j: J_HOLD, addr: AD_S, data: DT_S,
                                do_gc: F_CLR, donesecd: F_CLR};

  // ---------------- CPU states ----------------
  typedef enum logic [7:0] {
    IDLE, FETCH, EXEC,
    PUSH1, PUSH2, PUSH3, POPPUSH,
    LD1, LD2, LD3, LD4, LD5, LD6, LD7, LD8, LD9,
    LDC1, LDC2,
    LDF1, LDF2, LDF3, LDF4, LDF5,
    AP1, AP2, AP3, AP4, AP5, AP6, AP7, AP8, AP9, AP10, AP11, AP12, AP13,
    AP14, AP15, AP16, AP17, AP18, AP19,
    RAP1, RAP2, RAP3, RAP4, RAP5, RAP6, RAP7, RAP8, RAP9, RAP10, RAP11,
    RAP12, RAP13, RAP14, RAP15, RAP16, RAP17, RAP18,
    DUM1, DUM2, DUM3,
    SEL1, SEL2, SEL3, SEL4, SEL5, SEL6, SEL7, SEL8, SEL9,
    JOIN1, JOIN2,
    RTN1, RTN2, RTN3, RTN4, RTN5, RTN6, RTN7, RTN8, RTN9, RTN10,
    CAR1, CAR2, CDR1, CDR2,
    CONS1, CONS2, CONS3, CONS4, CONS5, CONS6, CONS7, CONS8,
    ATOM1, ATOM2, NUM1, NUM2, SYM1, SYM2, PAIR1, PAIR2,
    ADD1, ADD2, ADD3, ADD4, ADD5, SUB1, SUB2, SUB3, SUB4, SUB5,
    EQ1, EQ2, EQ3, EQ4, EQ5, LEQ1, LEQ2, LEQ3, LEQ4, LEQ5,
    SL1, SL2, LS1, LS2, CI1, CI2,
    RECH1, WRCH1, WRCH2, POP1,
    EX1, EX2, EX3, EX4, EX5,
    SET1, SET2, SET3, SET4, SET5, SET6, SET7, SET8, SET10, SET11,
    DONE,
    INIT_GC1, INIT_GC2, INIT_GC3, INIT_GC4, INIT_GC5, INIT_GC6, INIT_GC7,
    INIT_GC8, INIT_GC9, INIT_GC10, INIT_GC11, INIT_GC12,
    WAIT_GC,
    RECOVER_GC1, RECOVER_GC2, RECOVER_GC3, RECOVER_GC4, RECOVER_GC5,
    RECOVER_GC6, RECOVER_GC7, RECOVER_GC8
  } cpu_state_e;

  typedef struct packed {
    logic [7:0] opcode;     // value bits of i (instruction word)
    logic       i_zero;     // numeric value of i is zero
    logic       i_true;     // i is not nil
    logic       need_2_gc;  // from the memory unit
    logic       gcdone;     // from the garbage collector
    logic       donesecd;   // machine has executed STOP
  } cpu_preds_t;

  typedef struct packed {
    cpu_state_e next;
    mem_inst_e  mem;
    alu_inst_e  alu;
    ser_inst_e  ser;
    rtc_t       rtc;
  } cpu_uop_t;

  // Cells allocated at most by one instruction (AP: 4) plus the three cells
  // of the register list built before a collection, plus one so that the
  // avail register itself (CELL_AW bits) never has to hold the value CELLS.
  localparam int GC_RESERVE = 8;

  function automatic cpu_state_e dispatch(logic [7:0] op);
    case (op)
      OP_LD:   return LD1;
      OP_LDC:  return LDC1;
      OP_LDF:  return LDF1;
      OP_AP:   return AP1;
      OP_RTN:  return RTN1;
      OP_DUM:  return DUM1;
      OP_RAP:  return RAP1;
      OP_SEL:  return SEL1;
      OP_JOIN: return JOIN1;
      OP_CAR:  return CAR1;
      OP_CDR:  return CDR1;
      OP_ATOM: return ATOM1;
      OP_CONS: return CONS1;
      OP_EQ:   return EQ1;
      OP_ADD:  return ADD1;
      OP_SUB:  return SUB1;
      OP_LEQ:  return LEQ1;
      OP_SL:   return SL1;
      OP_LS:   return LS1;
      OP_CI:   return CI1;
      OP_RECH: return RECH1;
      OP_WRCH: return WRCH1;
      OP_NUM:  return NUM1;
      OP_SYM:  return SYM1;
      OP_PAIR: return PAIR1;
      OP_EXEC: return EX1;
      OP_POP:  return POP1;
      OP_SET:  return SET1;
      default: return DONE;   // STOP and unknown opcodes halt
    endcase
  endfunction

  // One row of the CPU control table.
  function automatic cpu_uop_t cpu_ucode(cpu_state_e st, cpu_preds_t p);
    cpu_uop_t u;
    u.next = st;
    u.mem  = M_NOOP;
    u.alu  = A_NOOP;
    u.ser  = SER_NOOP;
    u.rtc  = RTC_HOLD;
    case (st)
      IDLE: begin
        u.rtc.donesecd = F_HOLD;
        if (!p.donesecd && p.gcdone) u.next = RECOVER_GC1;
      end
      FETCH: begin
        u.rtc.i = I_MBUF;
        if (p.need_2_gc) begin u.mem = M_ALLOC; u.next = INIT_GC1; end
        else begin u.mem = M_CAR; u.rtc.addr = AD_C; u.next = EXEC; end
      end
      EXEC: begin
        u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF;
        u.next = dispatch(p.opcode);
      end
      // push i onto s
      PUSH1: begin u.mem = M_ALLOC; u.rtc.j = J_MBUF; u.next = PUSH2; end
      PUSH2: begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = PUSH3; end
      PUSH3: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_S; u.rtc.s = S_J; u.next = FETCH; end
      POPPUSH: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.next = PUSH1; end
      // LD (m . n): walk m frames, then n elements
      LD1: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.rtc.j = J_E; u.next = LD2; end
      LD2: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = LD3; end
      LD3: begin
        u.rtc.addr = AD_J; u.rtc.j = J_MBUF;
        if (p.i_zero) begin u.mem = M_CAR; u.next = LD5; end
        else begin u.mem = M_CDR; u.next = LD4; end
      end
      LD4: begin u.alu = A_SUB1; u.rtc.i = I_ALU; u.next = LD3; end
      LD5: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.next = LD6; end
      LD6: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = LD7; end
      LD7: begin
        u.rtc.addr = AD_J;
        if (p.i_zero) begin u.mem = M_CAR; u.rtc.i = I_MBUF; u.next = LD9; end
        else begin u.mem = M_CDR; u.rtc.j = J_MBUF; u.next = LD8; end
      end
      LD8: begin u.alu = A_SUB1; u.rtc.i = I_ALU; u.next = LD7; end
      LD9: begin u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF; u.next = PUSH1; end
      // LDC x
      LDC1: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.next = LDC2; end
      LDC2: begin u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF; u.next = PUSH1; end
      // LDF f: push (f . e)
      LDF1: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.next = LDF2; end
      LDF2: begin u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF; u.next = LDF3; end
      LDF3: begin u.mem = M_ALLOC; u.rtc.j = J_MBUF; u.next = LDF4; end
      LDF4: begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = LDF5; end
      LDF5: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_E; u.rtc.i = I_J; u.next = PUSH1; end
      // AP: s=((f.e') v . s') -> nil (v.e') f (s' e c . d)
      AP1:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = AP2; end
      AP2:  begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_C; u.next = AP3; end
      AP3:  begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = AP4; end
      AP4:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = AP5; end
      AP5:  begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_E; u.next = AP6; end
      AP6:  begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = AP7; end
      AP7:  begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = AP8; end
      AP8:  begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = AP9; end
      AP9:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = AP10; end
      AP10: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = AP11; end
      AP11: begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = AP12; end
      AP12: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = AP13; end
      AP13: begin u.mem = M_CAR; u.rtc.addr = AD_J; u.rtc.c = C_MBUF; u.next = AP14; end
      AP14: begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.e = E_MBUF; u.next = AP15; end
      AP15: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = AP16; end
      AP16: begin u.mem = M_CAR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = AP17; end
      AP17: begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = AP18; end
      AP18: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = AP19; end
      AP19: begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_E; u.rtc.e = E_I; u.rtc.s = S_NIL; u.next = FETCH; end
      // RAP: s=((f.(nil.e')) v . s') e=(nil.e') -> nil rplaca(e,v) f (s' e' c . d)
      RAP1:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = RAP2; end
      RAP2:  begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_C; u.next = RAP3; end
      RAP3:  begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = RAP4; end
      RAP4:  begin u.mem = M_CDR; u.rtc.addr = AD_E; u.rtc.j = J_MBUF; u.next = RAP5; end
      RAP5:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = RAP6; end
      RAP6:  begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = RAP7; end
      RAP7:  begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = RAP8; end
      RAP8:  begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = RAP9; end
      RAP9:  begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = RAP10; end
      RAP10: begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = RAP11; end
      RAP11: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = RAP12; end
      RAP12: begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = RAP13; end
      RAP13: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = RAP14; end
      RAP14: begin u.mem = M_CAR; u.rtc.addr = AD_J; u.rtc.c = C_MBUF; u.next = RAP15; end
      RAP15: begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.e = E_MBUF; u.next = RAP16; end
      RAP16: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = RAP17; end
      RAP17: begin u.mem = M_CAR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = RAP18; end
      RAP18: begin u.mem = M_SETCAR; u.rtc.addr = AD_E; u.rtc.data = DT_J; u.rtc.s = S_NIL; u.next = FETCH; end
      // DUM: e = (nil . e)
      DUM1: begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = DUM2; end
      DUM2: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_NIL; u.next = DUM3; end
      DUM3: begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_E; u.rtc.e = E_I; u.next = FETCH; end
      // SEL ct cf: d = (c' . d), c = x ? ct : cf
      SEL1: begin u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.j = J_MBUF; u.next = SEL2; end
      SEL2: begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = SEL3; end
      SEL3: begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = SEL4; end
      SEL4: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = SEL5; end
      SEL5: begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.d = D_I; u.next = SEL6; end
      SEL6: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = SEL7; end
      SEL7: begin
        u.rtc.addr = AD_C; u.rtc.c = C_MBUF;
        if (p.i_true) begin u.mem = M_CAR; u.next = SEL9; end
        else begin u.mem = M_CDR; u.next = SEL8; end
      end
      SEL8: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF; u.next = SEL9; end
      SEL9: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.next = FETCH; end
      // JOIN
      JOIN1: begin u.mem = M_CAR; u.rtc.addr = AD_D; u.rtc.c = C_MBUF; u.next = JOIN2; end
      JOIN2: begin u.mem = M_CDR; u.rtc.addr = AD_D; u.rtc.d = D_MBUF; u.next = FETCH; end
      // RTN: (x) e' c' (s' e c . d) -> (x . s') e c d
      RTN1:  begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = RTN2; end
      RTN2:  begin u.mem = M_CAR; u.rtc.addr = AD_D; u.rtc.j = J_MBUF; u.next = RTN3; end
      RTN3:  begin u.mem = M_ALLOC; u.rtc.s = S_MBUF; u.next = RTN4; end
      RTN4:  begin u.mem = M_SETCAR; u.rtc.addr = AD_S; u.rtc.data = DT_I; u.next = RTN5; end
      RTN5:  begin u.mem = M_SETCDR; u.rtc.addr = AD_S; u.rtc.data = DT_J; u.next = RTN6; end
      RTN6:  begin u.mem = M_CDR; u.rtc.addr = AD_D; u.rtc.d = D_MBUF; u.next = RTN7; end
      RTN7:  begin u.mem = M_CAR; u.rtc.addr = AD_D; u.rtc.e = E_MBUF; u.next = RTN8; end
      RTN8:  begin u.mem = M_CDR; u.rtc.addr = AD_D; u.rtc.d = D_MBUF; u.next = RTN9; end
      RTN9:  begin u.mem = M_CAR; u.rtc.addr = AD_D; u.rtc.c = C_MBUF; u.next = RTN10; end
      RTN10: begin u.mem = M_CDR; u.rtc.addr = AD_D; u.rtc.d = D_MBUF; u.next = FETCH; end
      // CAR, CDR
      CAR1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = CAR2; end
      CAR2: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = POPPUSH; end
      CDR1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = CDR2; end
      CDR2: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = POPPUSH; end
      // CONS: (a b . s') -> ((a . b) . s')
      CONS1: begin u.mem = M_ALLOC; u.rtc.j = J_MBUF; u.next = CONS2; end
      CONS2: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = CONS3; end
      CONS3: begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = CONS4; end
      CONS4: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = CONS5; end
      CONS5: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = CONS6; end
      CONS6: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = CONS7; end
      CONS7: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = CONS8; end
      CONS8: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.s = S_MBUF; u.rtc.i = I_J; u.next = PUSH1; end
      // type tests on the top of the stack
      ATOM1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = ATOM2; end
      ATOM2: begin u.alu = A_ATOM; u.rtc.i = I_ALU; u.next = POPPUSH; end
      NUM1:  begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = NUM2; end
      NUM2:  begin u.alu = A_NUMP; u.rtc.i = I_ALU; u.next = POPPUSH; end
      SYM1:  begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = SYM2; end
      SYM2:  begin u.alu = A_SYMP; u.rtc.i = I_ALU; u.next = POPPUSH; end
      PAIR1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = PAIR2; end
      PAIR2: begin u.alu = A_PAIRP; u.rtc.i = I_ALU; u.next = POPPUSH; end
      // binary ALU operations: (a b . s') -> (b op a . s'), i = b, j = a
      ADD1, SUB1, EQ1, LEQ1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF;
        u.next = cpu_state_e'(st + 8'd1); end
      ADD2, SUB2, EQ2, LEQ2: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF;
        u.next = cpu_state_e'(st + 8'd1); end
      ADD3, SUB3, EQ3, LEQ3: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.s = S_MBUF;
        u.next = cpu_state_e'(st + 8'd1); end
      ADD4, SUB4, EQ4, LEQ4: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF;
        u.next = cpu_state_e'(st + 8'd1); end
      ADD5: begin u.alu = A_ADD; u.rtc.i = I_ALU; u.next = PUSH1; end
      SUB5: begin u.alu = A_SUB; u.rtc.i = I_ALU; u.next = PUSH1; end
      EQ5:  begin u.alu = A_EQ;  u.rtc.i = I_ALU; u.next = PUSH1; end
      LEQ5: begin u.alu = A_LEQ; u.rtc.i = I_ALU; u.next = PUSH1; end
      // tag conversions, done inside the data path unit
      SL1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = SL2; end
      SL2: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.rtc.i = I_SYM2LIST; u.next = PUSH1; end
      LS1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = LS2; end
      LS2: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.rtc.i = I_LIST2SYM; u.next = PUSH1; end
      CI1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = CI2; end
      CI2: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.rtc.i = I_CHAR2INT; u.next = PUSH1; end
      // serial I/O
      RECH1: begin u.ser = SER_IN; u.rtc.i = I_SBUF; u.next = PUSH1; end
      WRCH1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.j = J_MBUF; u.next = WRCH2; end
      WRCH2: begin u.ser = SER_OUT; u.next = FETCH; end
      POP1:  begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.next = FETCH; end
      // EXEC: (code . s') -> ((code . e) . s')
      EX1: begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = EX2; end
      EX2: begin u.mem = M_ALLOC; u.rtc.j = J_MBUF; u.next = EX3; end
      EX3: begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = EX4; end
      EX4: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_E; u.next = EX5; end
      EX5: begin u.mem = M_CDR; u.rtc.addr = AD_S; u.rtc.s = S_MBUF; u.rtc.i = I_J; u.next = PUSH1; end
      // SET (m . n): element n of frame m of e := top of stack (stack unchanged)
      SET1: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.rtc.j = J_E; u.next = SET2; end
      SET2: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = SET3; end
      SET3: begin
        u.rtc.addr = AD_J; u.rtc.j = J_MBUF;
        if (p.i_zero) begin u.mem = M_CAR; u.next = SET5; end
        else begin u.mem = M_CDR; u.next = SET4; end
      end
      SET4: begin u.alu = A_SUB1; u.rtc.i = I_ALU; u.next = SET3; end
      SET5: begin u.mem = M_CAR; u.rtc.addr = AD_C; u.rtc.i = I_MBUF; u.next = SET6; end
      SET6: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = SET7; end
      SET7: begin
        if (p.i_zero) begin u.mem = M_CAR; u.rtc.addr = AD_S; u.rtc.i = I_MBUF; u.next = SET10; end
        else begin u.mem = M_CDR; u.rtc.addr = AD_J; u.rtc.j = J_MBUF; u.next = SET8; end
      end
      SET8:  begin u.alu = A_SUB1; u.rtc.i = I_ALU; u.next = SET7; end
      SET10: begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = SET11; end
      SET11: begin u.mem = M_CDR; u.rtc.addr = AD_C; u.rtc.c = C_MBUF; u.next = FETCH; end
      DONE: begin u.rtc.donesecd = F_SET; u.next = IDLE; end
      // build the root list (s e c d) starting at the dedicated cell 1
      INIT_GC1:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = INIT_GC2; end
      INIT_GC2:  begin u.rtc.j = J_PTR1; u.next = INIT_GC3; end
      INIT_GC3:  begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_S; u.next = INIT_GC4; end
      INIT_GC4:  begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = INIT_GC5; end
      INIT_GC5:  begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_E; u.next = INIT_GC6; end
      INIT_GC6:  begin u.mem = M_ALLOC; u.rtc.j = J_MBUF; u.next = INIT_GC7; end
      INIT_GC7:  begin u.mem = M_SETCDR; u.rtc.addr = AD_I; u.rtc.data = DT_J; u.next = INIT_GC8; end
      INIT_GC8:  begin u.mem = M_SETCAR; u.rtc.addr = AD_J; u.rtc.data = DT_C; u.next = INIT_GC9; end
      INIT_GC9:  begin u.mem = M_ALLOC; u.rtc.i = I_MBUF; u.next = INIT_GC10; end
      INIT_GC10: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_I; u.next = INIT_GC11; end
      INIT_GC11: begin u.mem = M_SETCAR; u.rtc.addr = AD_I; u.rtc.data = DT_D; u.rtc.j = J_I; u.next = INIT_GC12; end
      INIT_GC12: begin u.mem = M_SETCDR; u.rtc.addr = AD_J; u.rtc.data = DT_NIL; u.rtc.do_gc = F_SET; u.next = WAIT_GC; end
      WAIT_GC: begin
        if (p.gcdone) u.next = RECOVER_GC1;
        else u.rtc.do_gc = F_HOLD;
      end
      RECOVER_GC1: begin u.mem = M_CAR; u.rtc.addr = AD_PTR1; u.rtc.s = S_MBUF; u.next = RECOVER_GC2; end
      RECOVER_GC2: begin u.mem = M_CDR; u.rtc.addr = AD_PTR1; u.rtc.i = I_MBUF; u.next = RECOVER_GC3; end
      RECOVER_GC3: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.e = E_MBUF; u.next = RECOVER_GC4; end
      RECOVER_GC4: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = RECOVER_GC5; end
      RECOVER_GC5: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.c = C_MBUF; u.next = RECOVER_GC6; end
      RECOVER_GC6: begin u.mem = M_CDR; u.rtc.addr = AD_I; u.rtc.i = I_MBUF; u.next = RECOVER_GC7; end
      RECOVER_GC7: begin u.mem = M_CAR; u.rtc.addr = AD_I; u.rtc.d = D_MBUF; u.next = RECOVER_GC8; end
      RECOVER_GC8: begin u.mem = M_MEMINIT; u.next = FETCH; end
      default: u.next = IDLE;
    endcase
    return u;
  endfunction

  // ---------------- garbage collector ----------------
  typedef enum logic [3:0] {
    GC_RESET, GC_ROMCOPY, IDLEGC, GC_ROOT, NEXTOBJ, GC_CHECK,
    PAIR1_GC, PAIR2_GC, PAIR3_GC, PAIR4_GC, GC_NEXT, RESTORE
  } gc_state_e;

  typedef enum logic [2:0] { GV_ZERO, GV_UNTRACED, GV_AVAIL, GV_HDR_CAR, GV_HDR_CDR } gc_v0_sel_e;
  typedef enum logic [2:0] {
    GD_ROM, GD_DATA, GD_HDR, GD_HDR_DATA, GD_FWD_AVAIL, GD_HDR_AVAIL, GD_SHR_AVAIL
  } gc_mdata_sel_e;
  typedef enum logic [1:0] { GDONE_0, GDONE_1, GDONE_NOT_DOGC } gc_done_sel_e;

  typedef struct packed {
    logic          hdr_load;    // header <= mem.buff
    logic          data_load;   // data   <= mem.buff
    l1_inst_e      mem;
    addralu_inst_e aa;
    gc_v0_sel_e    v0;
    gc_mdata_sel_e mdata;
    cnt_inst_e     untr_inst;
    logic          untr_v0;     // loads 0 or 1
    cnt_inst_e     avail_inst;
    logic          avail_v0;    // loads 0 or 2
    gc_done_sel_e  gcdone;
  } gc_rtc_t;

  typedef struct packed {
    logic do_gc;
    logic hdr_is_ref;   // header holds a pointer or a symbol
    logic data_fwd;     // data carries the forward mark
    logic scan_done;    // untraced == avail
    logic rom_last;     // untraced is the last ROM word
  } gc_preds_t;

  typedef struct packed {
    gc_state_e next;
    gc_rtc_t   rtc;
  } gc_uop_t;

  function automatic gc_uop_t gc_ucode(gc_state_e st, gc_preds_t p);
    gc_uop_t u;
    u.next = st;
    u.rtc = '{hdr_load: 1'b0, data_load: 1'b0, mem: L1_NOOP, aa: AA_NEW, v0: GV_UNTRACED,
              mdata: GD_DATA, untr_inst: CNT_HOLD, untr_v0: 1'b0,
              avail_inst: CNT_HOLD, avail_v0: 1'b0, gcdone: GDONE_0};
    case (st)
      GC_RESET: begin
        u.rtc.untr_inst = CNT_LOAD; u.rtc.untr_v0 = 1'b0;
        u.next = GC_ROMCOPY;
      end
      GC_ROMCOPY: begin
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_UNTRACED; u.rtc.mdata = GD_ROM;
        u.rtc.untr_inst = CNT_INC;
        if (p.rom_last) u.next = IDLEGC;
      end
      IDLEGC: begin
        u.rtc.gcdone = GDONE_NOT_DOGC;
        if (p.do_gc) begin
          u.rtc.mem = L1_SWITCH;
          u.rtc.untr_inst = CNT_LOAD; u.rtc.untr_v0 = 1'b1;
          u.rtc.avail_inst = CNT_LOAD; u.rtc.avail_v0 = 1'b1;
          u.next = GC_ROOT;
        end
      end
      GC_ROOT: begin
        u.rtc.mem = L1_READ; u.rtc.aa = AA_OLD; u.rtc.v0 = GV_UNTRACED; u.rtc.hdr_load = 1'b1;
        u.next = NEXTOBJ;
      end
      NEXTOBJ: begin
        if (p.hdr_is_ref) begin
          u.rtc.mem = L1_READ; u.rtc.aa = AA_OLD; u.rtc.v0 = GV_HDR_CAR; u.rtc.data_load = 1'b1;
          u.next = GC_CHECK;
        end else begin
          u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_UNTRACED; u.rtc.mdata = GD_HDR;
          u.rtc.untr_inst = CNT_INC;
          u.next = GC_NEXT;
        end
      end
      GC_CHECK: begin
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW;
        if (p.data_fwd) begin
          // already copied: point at the copy
          u.rtc.v0 = GV_UNTRACED; u.rtc.mdata = GD_HDR_DATA; u.rtc.untr_inst = CNT_INC;
          u.next = GC_NEXT;
        end else begin
          // copy the car to new space
          u.rtc.v0 = GV_AVAIL; u.rtc.mdata = GD_DATA;
          u.next = PAIR1_GC;
        end
      end
      PAIR1_GC: begin   // forward pointer in the old car
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_OLD; u.rtc.v0 = GV_HDR_CAR; u.rtc.mdata = GD_FWD_AVAIL;
        u.next = PAIR2_GC;
      end
      PAIR2_GC: begin   // update the pointer being scanned
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_UNTRACED; u.rtc.mdata = GD_HDR_AVAIL;
        u.rtc.avail_inst = CNT_INC;
        u.next = PAIR3_GC;
      end
      PAIR3_GC: begin   // read the old cdr
        u.rtc.mem = L1_READ; u.rtc.aa = AA_OLD; u.rtc.v0 = GV_HDR_CDR; u.rtc.data_load = 1'b1;
        u.rtc.untr_inst = CNT_INC;
        u.next = PAIR4_GC;
      end
      PAIR4_GC: begin   // copy the cdr
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_AVAIL; u.rtc.mdata = GD_DATA;
        u.rtc.avail_inst = CNT_INC;
        u.next = GC_NEXT;
      end
      GC_NEXT: begin
        if (p.scan_done) u.next = RESTORE;
        else begin
          u.rtc.mem = L1_READ; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_UNTRACED; u.rtc.hdr_load = 1'b1;
          u.next = NEXTOBJ;
        end
      end
      RESTORE: begin    // store the new avail (cell address) in word 0
        u.rtc.mem = L1_WRITE; u.rtc.aa = AA_NEW; u.rtc.v0 = GV_ZERO; u.rtc.mdata = GD_SHR_AVAIL;
        u.rtc.gcdone = GDONE_1;
        u.next = IDLEGC;
      end
      default: u.next = GC_RESET;
    endcase
    return u;
  endfunction

endpackage
