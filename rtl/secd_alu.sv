// secd_alu -- the SECD CPU's ALU: a value ALU and a tag ALU.
//
// Combinational.  Inputs v0 (x, the i register) and v1 (y, the j register).
//   add, sub, sub1      number result (12-bit two's complement, wraps)
//   eq                  x == y over the whole word (tag and value) -> true/nil
//   leq                 signed x <= y on the value fields         -> true/nil
//   atom?, number?, symbol?, pair?  type tests on x                -> true/nil
// "atom?" is true for every object that is not a pair.  The set of
// operations and their result types follow the design; the word format and
// 12-bit number width are this design's choice (see secd_pkg).
module secd_alu
  import secd_pkg::*;
(
  input  alu_inst_e inst,
  input  word_t     v0,
  input  word_t     v1,
  output word_t     result
);
  logic signed [11:0] x, y;
  assign x = v0[11:0];
  assign y = v1[11:0];

  always_comb begin
    case (inst)
      A_ADD:   result = mk_num(x + y);
      A_SUB:   result = mk_num(x - y);
      A_SUB1:  result = mk_num(x - 12'sd1);
      A_EQ:    result = mk_bool(v0 == v1);
      A_LEQ:   result = mk_bool(x <= y);
      A_ATOM:  result = mk_bool(!is_ptr(v0));
      A_NUMP:  result = mk_bool(is_num(v0));
      A_SYMP:  result = mk_bool(is_sym(v0));
      A_PAIRP: result = mk_bool(is_ptr(v0));
      default: result = W_NIL;
    endcase
  end
endmodule
