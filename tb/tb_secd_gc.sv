// tb_secd_gc -- the garbage collector on a behavioural 64K x 17 memory
// (with the level-1 space bit modelled in the testbench).  After reset it
// must copy the boot ROM word for word into the current space.  Then, for
// many random heaps -- shared substructure, cycles, symbols, garbage --
// built in the current space with the roots hanging off word 1, a
// collection must produce, in the other space, a graph isomorphic to the
// reachable part of the old one (same atoms, same sharing, forward marks
// clear), packed from cell 1, with the first free cell stored in word 0,
// and answer gcdone only at the end.
module tb_secd_gc;
  import secd_pkg::*;
  localparam int RW = 256;

  logic clk = 0, rst = 1;
  logic do_gc, gcdone, new_space = 0;
  l1_inst_e mem_inst;
  logic [15:0] mem_addr;
  gcword_t mem_data, mem_buf;
  gc_state_e state;
  logic [16:0] mem [65536];
  int checks = 0, failures = 0;

  secd_gc #(.ROM_WORDS(RW)) dut (.clk, .rst, .do_gc, .gcdone, .mem_inst, .mem_addr, .mem_data, .mem_buf,
                                 .new_space, .state);

  assign mem_buf = mem[mem_addr];
  always_ff @(posedge clk) begin
    if (mem_inst == L1_WRITE) mem[mem_addr] <= mem_data;
    if (mem_inst == L1_SWITCH) new_space <= ~new_space;
  end

  always #5 clk = ~clk;
  initial begin #2_000_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [16:0] rd(bit sp, int w); return mem[{sp, 15'(w)}]; endfunction

  function automatic logic [15:0] rand_word(int ncells);
    case ($urandom_range(0, 5))
      0: return {4'b1100, 12'($urandom)};
      1: return 16'h8000;
      2: return {2'b01, 14'($urandom_range(1, ncells - 1))};
      default: return {2'b00, 14'($urandom_range(1, ncells - 1))};
    endcase
  endfunction

  initial begin
    logic [15:0] rom_img [RW];
    do_gc = 0;
    for (int k = 0; k < 65536; k++) mem[k] = 17'($urandom);
    for (int k = 0; k < RW; k++) begin rom_img[k] = 16'($urandom); dut.u_rom.rom[k] = rom_img[k]; end
    repeat (3) @(posedge clk);
    rst = 0;
    begin
      int k = 0;
      while (state != IDLEGC && k < 10000) begin @(posedge clk); k++; end
    end
    #1;
    chk(gcdone, "gcdone after the ROM copy");
    for (int k = 0; k < RW; k++) chk(rd(new_space, k) == {1'b0, rom_img[k]}, "ROM copy");

    for (int g = 0; g < 60; g++) begin
      int ncells, cyc;
      int map [int];      // old cell -> new cell
      int used [int];     // new cells already matched
      int q [$];
      logic [15:0] heap [2048];   // shadow of the cells as built
      bit osp;
      map.delete(); used.delete(); q.delete();
      ncells = $urandom_range(3, 600);
      osp = new_space;
      // heap in the current space: word 1 = pointer to cell 1 (the roots)
      mem[{osp, 15'd0}] = 17'(ncells);
      mem[{osp, 15'd1}] = {1'b0, 2'b00, 14'd1};
      for (int w = 2; w < 2 * ncells; w++) begin
        heap[w] = rand_word(ncells);
        mem[{osp, 15'(w)}] = {1'b0, heap[w]};
      end
      @(negedge clk) do_gc = 1;
      #1;
      chk(!gcdone, "gcdone low once do_gc is seen");
      @(posedge clk); #1;
      cyc = 0;
      while (!gcdone && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      chk(gcdone && state == RESTORE, "collection finishes in RESTORE");
      @(negedge clk) do_gc = 0;
      @(posedge clk); #1;
      chk(new_space == !osp, "spaces switched");
      chk(rd(!osp, 1) == {1'b0, 2'b00, 14'd1}, "root pointer in word 1");
      // walk the old (shadow) and new graphs together
      map[1] = 1; used[1] = 1; q.push_back(1);
      while (q.size() > 0) begin
        int oc, nc;
        oc = q.pop_front();
        nc = map[oc];
        for (int h = 0; h < 2; h++) begin
          logic [15:0] ow;
          logic [16:0] nw;
          ow = heap[2*oc + h];
          nw = rd(!osp, 2*nc + h);
          chk(nw[16] == 1'b0, "no forward mark in the new space");
          if (ow[15:14] == 2'b00 || ow[15:14] == 2'b01) begin
            int ot, nt;
            ot = int'(ow[13:0]); nt = int'(nw[13:0]);
            chk(nw[15:14] == ow[15:14], "reference tag kept");
            if (map.exists(ot)) chk(map[ot] == nt, "sharing kept");
            else begin
              chk(!used.exists(nt), "distinct cells stay distinct");
              map[ot] = nt; used[nt] = 1; q.push_back(ot);
            end
          end else
            chk(nw[15:0] == ow, "atom copied");
        end
      end
      chk(rd(!osp, 0)[15:0] == 16'(map.num() + 1), "word 0 = first free cell");
      foreach (used[k]) chk(k >= 1 && k <= map.num(), "copies packed from cell 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
