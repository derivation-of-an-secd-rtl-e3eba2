// tb_secd_full -- the SECD machine at its full size (16K cells per space,
// 32K-word boot ROM) running the TAK benchmark, tak(18, 12, 6) = 7, once.
//
// The program is hand-compiled SECD code for
//   (letrec ((tak (lambda (x y z) (if (leq x y) z (tak (tak ..) ..)))))
//     (tak 18 12 6))
// placed in the boot ROM.  The test checks the result on the stack after
// STOP, that at least one garbage collection ran, and that the run takes
// no more clock cycles than the 17,144,484 reported for the original
// serialized controller on the same benchmark (reset and ROM load included
// here).
module tb_secd_full;
  import secd_pkg::*;
  import secd_image_pkg::*;

  logic clk = 0, rst = 1;
  logic rx_full, tx_valid, donesecd, do_gc, gcdone;
  logic [7:0] tx_data;
  int checks = 0, failures = 0, n_gc = 0;
  longint cyc = 0;
  logic do_gc_q = 0;

  secd_top dut (
    .clk, .rst, .rx_valid(1'b0), .rx_data(8'h00), .rx_full, .tx_valid, .tx_data,
    .donesecd, .do_gc, .gcdone);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    do_gc_q <= do_gc;
    if (!rst) cyc++;
    if (!rst && do_gc && !do_gc_q) n_gc++;
  end

  initial begin
    longint limit = 200_000_000;
    word_t top;
    img_reset();
    load_prog(tak_code(18, 12, 6));
    for (int k = 0; k < IMG_WORDS; k++) dut.u_gc.u_rom.rom[k] = img[k];
    repeat (3) @(posedge clk);
    rst = 0;
    while (!donesecd && cyc < limit) @(posedge clk);
    checks++;
    if (!donesecd) begin
      failures++;
      $display("FAIL: no STOP within %0d cycles (watchdog)", limit);
    end else begin
      top = dut.u_mem.u_pm.ram[{dut.u_mem.new_space, dut.u_cpu.s_reg[13:0], 1'b0}][15:0];
      checks++;
      if (top !== n(tak_ref(18, 12, 6))) begin
        failures++;
        $display("FAIL: tak(18,12,6) gave %h, expected %h", top, n(tak_ref(18, 12, 6)));
      end
      checks++;
      if (cyc > 17_144_484) begin failures++; $display("FAIL: %0d cycles, over the original's 17,144,484", cyc); end
      checks++;
      if (n_gc == 0) begin failures++; $display("FAIL: no garbage collection happened"); end
      $display("tak(18,12,6) = %0d in %0d cycles (boot ROM copy included), %0d collections",
               int'($signed(top[11:0])), cyc, n_gc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
