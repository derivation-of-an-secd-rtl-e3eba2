// secd_cpu -- the SECD CPU: state generator, instruction generator, data
// path unit, ALU and serial interface.  The memory unit is outside, shared
// with the garbage collector.
//
// Execution: FETCH checks need_2_gc; if memory is short it saves s, e, c, d
// in a list rooted at the dedicated cell 1, raises do_gc (a registered
// signal) and waits in WAIT_GC until the collector's combinational gcdone
// goes high, then reloads the registers from the root list and the avail
// pointer from word 0 (meminit).  Otherwise it reads the instruction
// (car c) into i, EXEC advances c and dispatches, and the instruction runs
// as a short sequence of states with at most one memory, ALU or serial
// operation each.  After reset the CPU waits in IDLE for the collector to
// copy the boot ROM, then starts the same way as after a collection.  STOP
// sets donesecd and returns to IDLE, where the machine stays.
// Memory port: combinational instruction/address/data each cycle, read
// data (mem_buf) expected back in the same cycle.
module secd_cpu
  import secd_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // memory unit
  output mem_inst_e          mem_inst,
  output logic [MADDR_W-1:0] mem_addr,
  output word_t              mem_data,
  input  word_t              mem_buf,
  input  logic               need_2_gc,
  // garbage collector
  output logic               do_gc,
  input  logic               gcdone,
  // serial device
  input  logic               rx_valid,
  input  logic [7:0]         rx_data,
  output logic               rx_full,
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  // status
  output logic               donesecd,
  output cpu_state_e         state,
  output word_t              s_reg
);
  cpu_preds_t preds;
  alu_inst_e  alu_inst;
  ser_inst_e  ser_inst;
  rtc_t       rtc;
  word_t      alu_v0, alu_v1, alu_buf, ser_v0, ser_buf;
  word_t      e_reg, c_reg, d_reg, i_reg, j_reg;
  logic [7:0] opcode;
  logic       i_zero, i_true;

  assign preds = '{opcode: opcode, i_zero: i_zero, i_true: i_true,
                   need_2_gc: need_2_gc, gcdone: gcdone, donesecd: donesecd};

  cpu_state_gen u_sg (.clk, .rst, .preds, .state);

  cpu_inst_gen u_ig (.state, .preds, .mem_inst, .alu_inst, .ser_inst, .rtc);

  cpu_datapath u_dp (
    .clk, .rst, .rtc, .mem_buf, .alu_buf, .ser_buf, .mem_addr, .mem_data,
    .alu_v0, .alu_v1, .ser_v0, .opcode, .i_zero, .i_true, .do_gc, .donesecd,
    .s(s_reg), .e(e_reg), .c(c_reg), .d(d_reg), .i(i_reg), .j(j_reg));

  secd_alu u_alu (.inst(alu_inst), .v0(alu_v0), .v1(alu_v1), .result(alu_buf));

  serial_if u_ser (
    .clk, .rst, .inst(ser_inst), .v0(ser_v0), .out_char(ser_buf),
    .rx_valid, .rx_data, .rx_full, .tx_valid, .tx_data);
endmodule
