// risc12_irom: instruction ROM, 16-bit words.
//
// A ROM with a registered output: the address presented in one cycle (the I
// stage) gives its word at the start of the next (the R stage), as the
// specified ROM does. The program is loaded at elaboration from a hex file,
// one 16-bit word per line, named by INIT_FILE (path relative to the
// simulator's working directory); words the file does not give read as 0,
// which is the NOP. The default depth covers the full 12-bit instruction
// address; the specification lets the depth be chosen per program. Addresses above
// DEPTH-1 wrap.
module risc12_irom
  import risc12_pkg::*;
#(
  parameter int unsigned DEPTH     = 4096,
  parameter string       INIT_FILE = ""
) (
  input  logic   clk,
  input  addr_t  addr,
  output instr_t data
);

  localparam int unsigned IDXW = $clog2(DEPTH);

  instr_t rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = NOP;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk)
    data <= rom[addr[IDXW-1:0]];

endmodule
