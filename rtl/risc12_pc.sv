// risc12_pc: program counter of the I stage.
//
// The PC addresses the instruction ROM. Each cycle it advances by one, or,
// when the control unit resolves a jump in the R stage, loads the jump
// target. Because the jump is decided while the next instruction is already
// being fetched, exactly one instruction after a jump (its delay slot)
// always enters the pipeline. RESET sets the PC to zero, as the
// specification requires. fetch_valid is this code's addition: it is 0 during reset and
// for the first cycle after it, telling the R stage that the ROM's output
// register does not yet hold a fetched instruction, so that instruction 0 is
// not executed twice. Synchronous, active-high reset.
module risc12_pc
  import risc12_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  jump_en,
  input  addr_t jump_target,
  output addr_t pc,
  output logic  fetch_valid
);

  always_ff @(posedge clk) begin
    if (reset) begin
      pc          <= '0;
      fetch_valid <= 1'b0;
    end else begin
      pc          <= jump_en ? jump_target : pc + addr_t'(1);
      fetch_valid <= 1'b1;
    end
  end

endmodule
