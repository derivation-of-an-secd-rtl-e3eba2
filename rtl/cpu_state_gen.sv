// cpu_state_gen -- state generator of the SECD CPU.
//
// Holds the 8-bit state register (171 states; the original serialized
// table had 204, in the same 8 bits) and computes the next
// state from the current state and the predicates (opcode in i, i zero,
// i true, need_2_gc, gcdone, donesecd).  The next-state function is the
// "next" column of the control table secd_pkg::cpu_ucode.  Reset puts the
// CPU in IDLE, where it waits for the collector to finish loading memory.
module cpu_state_gen
  import secd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  cpu_preds_t preds,
  output cpu_state_e state
);
  cpu_uop_t u;
  assign u = cpu_ucode(state, preds);

  always_ff @(posedge clk)
    if (rst) state <= IDLE;
    else     state <= u.next;
endmodule
