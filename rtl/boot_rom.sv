// boot_rom -- read-only memory holding the initial memory image, copied
// word for word into the new space by the garbage collector after reset.
// 32K x 16 bits by default (two 32K x 8 EPROMs in the original).
// Read is asynchronous.  Contents: all zero, then INIT_FILE (hex, one word
// per line) if one is given.  Image layout expected by the machine:
//   word 0  = first free cell (value field), word 1 = pointer to cell 1,
//   cell 1  = root list (s e c d) from which the CPU loads its registers.
module boot_rom #(
  parameter int    WORDS     = 32768,
  parameter string INIT_FILE = ""
) (
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [15:0]              data
);
  logic [15:0] rom [WORDS];

  initial begin
    for (int k = 0; k < WORDS; k++) rom[k] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign data = rom[addr];
endmodule
