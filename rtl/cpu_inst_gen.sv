// cpu_inst_gen -- instruction generator of the SECD CPU.
//
// Combinational.  From the current state and the predicates it produces the
// instructions for the memory unit, ALU and serial interface and the
// register transfer code (RTC) for the data path unit, taken from the
// control table secd_pkg::cpu_ucode.  The RTC is carried as a struct of
// per-register source selects (one row of the register transfer table)
// rather than as a row number.
module cpu_inst_gen
  import secd_pkg::*;
(
  input  cpu_state_e state,
  input  cpu_preds_t preds,
  output mem_inst_e  mem_inst,
  output alu_inst_e  alu_inst,
  output ser_inst_e  ser_inst,
  output rtc_t       rtc
);
  cpu_uop_t u;
  assign u        = cpu_ucode(state, preds);
  assign mem_inst = u.mem;
  assign alu_inst = u.alu;
  assign ser_inst = u.ser;
  assign rtc      = u.rtc;
endmodule
