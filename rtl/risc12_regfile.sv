// risc12_regfile: the eight 12-bit general purpose registers.
//
// Two combinational read ports serve the R stage (operands RA and RB); one
// write port, clocked, is driven by the W stage. A value written at the end
// of a cycle is seen by a read in the next cycle; instructions that read
// too early get the value through forwarding in the E stage instead, so the
// file needs no write-through path. Register count and width follow the
// design; the port arrangement follows its block diagram (REG FILE read in
// R, written back from W). The registers are not reset: the specified reset
// clears the PC and the pipeline flops only.
module risc12_regfile
  import risc12_pkg::*;
(
  input  logic  clk,
  input  logic  we,
  input  reg_t  waddr,
  input  word_t wdata,
  input  reg_t  raddr_a,
  input  reg_t  raddr_b,
  output word_t rdata_a,
  output word_t rdata_b
);

  word_t regs [NREG];

  always_ff @(posedge clk)
    if (we) regs[waddr] <= wdata;

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
