// risc12_control: instruction decoder and jump resolution of the R stage.
//
// Splits the R-stage instruction into the control word carried to the E
// stage (register numbers, ALU operation, register and memory write enables,
// literal) and decides, in the same cycle, whether a jump is taken so that
// the PC loads the target at the next edge. The condition of a conditional
// jump is evaluated on the flags the ALU is producing right now for the
// instruction one ahead (in the E stage); the specification requires a conditional
// jump to follow an ALU instruction, so no flags are stored. COND_EXT tests
// the external condition input.
//
// Follows the specification: the three instruction classes, LOAD/STORE encoded as
// ALU operations 0A/0B, LOADLIT with its literal MSB in bit 14, JF/JT/J and
// the condition codes. This code's own choices: a conditional jump's 8-bit
// address replaces the low 8 bits of the jump's own address (the upper 4
// bits are kept); condition codes the specification does not define, and jump OP 3,
// never jump; LOADLIT runs through the ALU as PASSB with the literal as
// operand B. Combinational.
module risc12_control
  import risc12_pkg::*;
(
  input  instr_t instr,        // R-stage instruction (NOP when not valid)
  input  logic [3:0] pc_page,  // bits 11:8 of the R-stage instruction's address
  input  flags_t flags_e,      // ALU flags of the E-stage instruction
  input  logic   ext_cond,
  output ctrl_t  ctrl,
  output logic   jump_en,
  output addr_t  jump_target
);

  logic  cond_true;
  jop_e  jop;
  cond_e cond;

  assign jop  = jop_e'(instr[13:12]);
  assign cond = cond_e'(instr[11:8]);

  always_comb begin
    unique case (cond)
      COND_TRUE:    cond_true = 1'b1;
      COND_NEG:     cond_true = flags_e.neg;
      COND_ZERO:    cond_true = flags_e.zero;
      COND_CARRY:   cond_true = flags_e.carry;
      COND_NEGZERO: cond_true = flags_e.neg | flags_e.zero;
      COND_EXT:     cond_true = ext_cond;
      default:      cond_true = 1'b0;
    endcase
  end

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = OP_ZEROES;
    ctrl.wc      = instr[13:11];
    ctrl.ra      = instr[5:3];
    ctrl.rb      = instr[2:0];
    jump_en      = 1'b0;
    jump_target  = {pc_page, instr[7:0]};

    if (instr[15]) begin
      // LOADLIT: literal = {L, LITERAL[10:0]}
      ctrl.reg_we  = 1'b1;
      ctrl.use_lit = 1'b1;
      ctrl.alu_op  = OP_PASSB;
      ctrl.literal = {instr[14], instr[10:0]};
    end else if (instr[14]) begin
      ctrl.alu_op = alu_op_e'(instr[10:6]);
      unique case (instr[10:6])
        OP_LOAD:  begin ctrl.mem_rd = 1'b1; ctrl.reg_we = 1'b1; end
        OP_STORE: ctrl.mem_we = 1'b1;
        default:  ctrl.reg_we = 1'b1;
      endcase
    end else begin
      unique case (jop)
        JOP_JF: jump_en = ~cond_true;
        JOP_JT: jump_en = cond_true;
        JOP_J:  begin jump_en = 1'b1; jump_target = instr[11:0]; end
        default: jump_en = 1'b0;
      endcase
    end
  end

endmodule
