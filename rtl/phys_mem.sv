// phys_mem -- physical memory of the SECD machine: two equal spaces of
// 16-bit words, each word with one extra mark bit used by the garbage
// collector to flag a copied cell (a forward pointer).
//
// Address = {space bit, word address}.  With the default ADDR_W = 16 this is
// 2 x 32K words, the size of the original board (four 32K x 8 static RAMs
// for the words).  The original kept the mark bits in a separate 32K x 1
// RAM; here every physical word carries its own mark bit, which makes the
// mark of one space independent of the other (this design's choice).
// Read is asynchronous (like the static RAMs): rdata follows addr in the
// same cycle.  A write happens at the rising clock edge when we = 1.
module phys_mem #(
  parameter int ADDR_W = secd_pkg::PADDR_W,
  parameter int DATA_W = secd_pkg::GCW_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] ram [2**ADDR_W];

  always_ff @(posedge clk)
    if (we) ram[addr] <= wdata;

  assign rdata = ram[addr];
endmodule
