// gc_state_gen -- state and RTC generator of the garbage collector.
//
// Holds the state register and, from the state and the predicates (do_gc,
// header is a reference, data is forwarded, scan done, last ROM word),
// produces the next state and the register transfer code for the GC data
// path (secd_pkg::gc_ucode).  States:
//   GC_RESET, GC_ROMCOPY   after reset: copy the ROM into the new space
//   IDLEGC                 gcdone = not do_gc; on do_gc switch spaces
//   GC_ROOT .. GC_NEXT     Cheney scan of the new space from word 1
//   RESTORE                write the new avail to word 0, gcdone = 1
module gc_state_gen
  import secd_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  gc_preds_t preds,
  output gc_state_e state,
  output gc_rtc_t   rtc
);
  gc_uop_t u;
  assign u   = gc_ucode(state, preds);
  assign rtc = u.rtc;

  always_ff @(posedge clk)
    if (rst) state <= GC_RESET;
    else     state <= u.next;
endmodule
