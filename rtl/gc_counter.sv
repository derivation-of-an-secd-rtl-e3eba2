// gc_counter -- loadable counter used by the garbage collector for its two
// memory pointers, avail (next free word of the new space) and untraced
// (next word to scan, also the ROM address while memory is initialised).
// Instructions: hold, load (count <= v0), inc (count <= count + 1), at the
// rising clock edge; synchronous reset to 0.  16 bits wide, as in the
// design, where an off-the-shelf counter replaced a slower incrementer.
module gc_counter #(
  parameter int WIDTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  secd_pkg::cnt_inst_e   inst,
  input  logic [WIDTH-1:0]      v0,
  output logic [WIDTH-1:0]      count
);
  always_ff @(posedge clk)
    if (rst) count <= '0;
    else case (inst)
      secd_pkg::CNT_LOAD: count <= v0;
      secd_pkg::CNT_INC:  count <= count + 1'b1;
      default: ;
    endcase
endmodule
