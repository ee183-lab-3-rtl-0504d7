// risc12_dram: data RAM, 12-bit words, single port.
//
// Address, write data and write enable are presented in the E stage; a write
// takes effect at the clock edge, and the read word appears on rdata one
// cycle later, in the W stage, as the specified RAM does. A read of the
// address being written returns the old word (read-before-write). The
// contents start at zero. The depth, 2048 words, is this code's choice: it
// fills the lower half of the 12-bit data address space, leaving the upper
// half for the memory-mapped devices.
module risc12_dram
  import risc12_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic  clk,
  input  logic  we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t wdata,
  output word_t rdata
);

  word_t ram [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) ram[i] = '0;

  always_ff @(posedge clk) begin
    if (we) ram[addr] <= wdata;
    rdata <= ram[addr];
  end

endmodule
