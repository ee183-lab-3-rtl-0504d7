// risc12_cpu: the four-stage pipelined 12-bit RISC processor.
//
// Stages, one instruction per cycle, no stalls:
//   I  the PC addresses the instruction ROM (whose output register is the
//      I/R pipeline register);
//   R  the control unit decodes the instruction, the register file is read,
//      and a jump is resolved so that the PC loads its target at the next
//      edge (one delay-slot instruction after every jump always executes);
//   E  the forwarding unit picks each operand from the register file value,
//      the W-stage result or the extra post-W register; the ALU computes and
//      sets the flags a following conditional jump tests; the data memory
//      gets address (operand A), store data (operand B) and write enable;
//   W  the result is the ALU output or, for LOAD, the memory read word; it
//      is written into the register file and copied into the post-W
//      register, which exists only to forward it to the E stage one more
//      cycle.
// The structure follows the specification's processor block diagram and external
// interface (names *_I, *_E, *_M give the stage a signal belongs to). RESET
// (synchronous, active high) sets the PC to zero and clears every pipeline
// register; the register file and memories keep their contents, and no
// store is issued while RESET is high. The observation outputs fwd_sel_a/b
// and jump_taken are this code's addition for tests and debugging.
module risc12_cpu
  import risc12_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     ext_cond,
  // instruction ROM
  output addr_t    irom_addr_i,
  input  instr_t   irom_data_d,
  // data memory
  output addr_t    dram_addr_e,
  output word_t    dram_data_e,
  output logic     dram_we,
  input  word_t    dram_data_m,
  // observation
  output fwd_sel_e fwd_sel_a,
  output fwd_sel_e fwd_sel_b,
  output logic     jump_taken
);

  // ---------------- I stage ----------------
  addr_t  pc;
  logic   fetch_valid;
  logic   jump_en;
  addr_t  jump_target;

  risc12_pc u_pc (
    .clk, .reset, .jump_en, .jump_target, .pc, .fetch_valid
  );

  assign irom_addr_i = pc;

  // ---------------- R stage ----------------
  addr_t  pc_r;
  instr_t instr_r;
  ctrl_t  ctrl_r;
  word_t  rf_a, rf_b;
  flags_t flags_e;

  always_ff @(posedge clk)
    if (reset) pc_r <= '0;
    else       pc_r <= pc;

  assign instr_r = fetch_valid ? irom_data_d : NOP;

  risc12_control u_ctrl (
    .instr(instr_r), .pc_page(pc_r[AW-1:8]), .flags_e, .ext_cond,
    .ctrl(ctrl_r), .jump_en, .jump_target
  );

  assign jump_taken = jump_en;

  // register file write port, driven from W
  logic  w_we;
  reg_t  w_wc;
  word_t w_data;

  risc12_regfile u_rf (
    .clk, .we(w_we), .waddr(w_wc), .wdata(w_data),
    .raddr_a(ctrl_r.ra), .raddr_b(ctrl_r.rb),
    .rdata_a(rf_a), .rdata_b(rf_b)
  );

  // ---------------- R/E register ----------------
  ctrl_t ctrl_e;
  word_t rf_a_e, rf_b_e;

  always_ff @(posedge clk) begin
    if (reset) begin
      ctrl_e <= '0;
      rf_a_e <= '0;
      rf_b_e <= '0;
    end else begin
      ctrl_e <= ctrl_r;
      rf_a_e <= rf_a;
      rf_b_e <= rf_b;
    end
  end

  // ---------------- E stage ----------------
  logic  x_we;
  reg_t  x_wc;
  word_t x_data;
  word_t op_a, op_b, alu_b, alu_y;

  risc12_forward u_fwd (
    .ra(ctrl_e.ra), .rb(ctrl_e.rb), .rf_a(rf_a_e), .rf_b(rf_b_e),
    .w_we, .w_wc, .w_data, .x_we, .x_wc, .x_data,
    .a(op_a), .b(op_b), .sel_a(fwd_sel_a), .sel_b(fwd_sel_b)
  );

  assign alu_b = ctrl_e.use_lit ? ctrl_e.literal : op_b;

  risc12_alu u_alu (
    .op(ctrl_e.alu_op), .a(op_a), .b(alu_b), .y(alu_y), .flags(flags_e)
  );

  assign dram_addr_e = op_a;
  assign dram_data_e = op_b;
  assign dram_we     = ctrl_e.mem_we & ~reset;  // no store while in reset

  // Programming rule of the instruction set: a jump that tests NEG, ZERO,
  // CARRY or NEGZERO must directly follow an ALU instruction, because the
  // flags are taken from the E stage and never stored.
  logic e_is_alu;
  logic r_tests_flags;
  assign e_is_alu      = ctrl_e.reg_we && !ctrl_e.use_lit && !ctrl_e.mem_rd;
  assign r_tests_flags = instr_r[15:14] == 2'b00 && instr_r[13:12] != JOP_J &&
                         instr_r[11:8] inside {COND_NEG, COND_ZERO, COND_CARRY, COND_NEGZERO};

  always_ff @(posedge clk)
    if (!reset)
      assert (!r_tests_flags || e_is_alu)
        else $error("conditional jump at %h does not follow an ALU instruction", pc_r);

  // ---------------- E/W register ----------------
  logic  w_mem_rd;
  word_t w_alu;

  always_ff @(posedge clk) begin
    if (reset) begin
      w_we     <= 1'b0;
      w_wc     <= '0;
      w_mem_rd <= 1'b0;
      w_alu    <= '0;
    end else begin
      w_we     <= ctrl_e.reg_we;
      w_wc     <= ctrl_e.wc;
      w_mem_rd <= ctrl_e.mem_rd;
      w_alu    <= alu_y;
    end
  end

  // ---------------- W stage ----------------
  assign w_data = w_mem_rd ? dram_data_m : w_alu;

  // ---------------- post-W register ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      x_we   <= 1'b0;
      x_wc   <= '0;
      x_data <= '0;
    end else begin
      x_we   <= w_we;
      x_wc   <= w_wc;
      x_data <= w_data;
    end
  end

endmodule
