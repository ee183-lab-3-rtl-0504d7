// risc12_pkg: shared widths, instruction fields and encodings of the 12-bit
// RISC processor.
//
// The processor has a 12-bit datapath, eight general purpose registers and
// 16-bit instructions in three classes, picked by the two top bits:
//   1 L WC[2:0] LIT[10:0]                 LOADLIT  WC = {L, LIT}
//   0 1 WC[2:0] OP[4:0] RA[2:0] RB[2:0]   ALU, LOAD (OP 0A), STORE (OP 0B)
//   0 0 OP[1:0] COND[3:0] ADDR[7:0]       JF.cond (OP 0), JT.cond (OP 1)
//   0 0 OP[1:0] ADDR[11:0]                J       (OP 2)
// The opcode, condition and field layouts follow the instruction-set tables
// of the specification; the bit ranges of each field are read off the format
// drawings. The all-zero word is JF.TRUE, which never jumps: it is the NOP.
// The ALU opcode values are the specification's; the enum names are this code's.
package risc12_pkg;

  localparam int unsigned DW = 12;   // data width
  localparam int unsigned AW = 12;   // instruction and data address width
  localparam int unsigned IW = 16;   // instruction width
  localparam int unsigned NREG = 8;  // general purpose registers
  localparam int unsigned RW = 3;    // register index width

  typedef logic [DW-1:0] word_t;
  typedef logic [AW-1:0] addr_t;
  typedef logic [IW-1:0] instr_t;
  typedef logic [RW-1:0] reg_t;

  localparam instr_t NOP = '0;

  // ALU operations, OP field of the ALU instruction class (hexadecimal).
  // 00-09 are arithmetic and shifts; 10-1F are the sixteen logic functions of
  // two inputs, where OP[3:0] is the truth table: result bit = OP[{~B,~A}]
  // (so 11 is AND, 16 XOR, 17 OR, 1E NAND). 0A and 0B are LOAD and STORE.
  typedef enum logic [4:0] {
    OP_ADD      = 5'h00,  // A + B
    OP_ADDINC   = 5'h01,  // A + B + 1
    OP_PASSA2   = 5'h02,  // A
    OP_INCA     = 5'h03,  // A + 1
    OP_SUBDEC   = 5'h04,  // A - B - 1
    OP_SUB      = 5'h05,  // A - B
    OP_DECA     = 5'h06,  // A - 1
    OP_PASSA7   = 5'h07,  // A
    OP_LSL      = 5'h08,  // logical shift left A
    OP_ASR      = 5'h09,  // arithmetic shift right A
    OP_LOAD     = 5'h0A,  // C = Mem[A]
    OP_STORE    = 5'h0B,  // Mem[A] = B
    OP_ZEROES   = 5'h10,  // 0
    OP_AND      = 5'h11,  // A & B
    OP_ANDNOTA  = 5'h12,  // ~A & B
    OP_PASSB    = 5'h13,  // B
    OP_ANDNOTB  = 5'h14,  // A & ~B
    OP_PASSA    = 5'h15,  // A
    OP_XOR      = 5'h16,  // A ^ B
    OP_OR       = 5'h17,  // A | B
    OP_NOR      = 5'h18,  // ~(A | B)
    OP_XNOR     = 5'h19,  // A ^ ~B
    OP_PASSNOTA = 5'h1A,  // ~A
    OP_ORNOTA   = 5'h1B,  // ~A | B
    OP_PASSNOTB = 5'h1C,  // ~B
    OP_ORNOTB   = 5'h1D,  // A | ~B
    OP_NAND     = 5'h1E,  // ~(A & B)
    OP_ONES     = 5'h1F   // all ones
  } alu_op_e;

  // Control transfer OP field.
  typedef enum logic [1:0] {
    JOP_JF = 2'd0,  // jump if condition false
    JOP_JT = 2'd1,  // jump if condition true
    JOP_J  = 2'd2,  // unconditional jump, 12-bit address
    JOP_RSVD = 2'd3 // not defined by the instruction set, executed as NOP
  } jop_e;

  // COND field of the conditional jumps.
  typedef enum logic [3:0] {
    COND_TRUE    = 4'd0,
    COND_NEG     = 4'd4,  // result < 0
    COND_ZERO    = 4'd5,  // result = 0
    COND_CARRY   = 4'd6,  // carry = 1
    COND_NEGZERO = 4'd7,  // result <= 0
    COND_EXT     = 4'd8   // EXT_COND = 1
  } cond_e;

  // Condition codes of the ALU operation in the E stage.
  typedef struct packed {
    logic neg;
    logic zero;
    logic carry;
  } flags_t;

  // Decoded control of one instruction, carried from R to E.
  typedef struct packed {
    logic    reg_we;    // writes register WC
    logic    mem_we;    // STORE
    logic    mem_rd;    // LOAD: W-stage result comes from memory
    logic    use_lit;   // LOADLIT: operand B is the literal, op is PASSB
    alu_op_e alu_op;
    reg_t    wc;
    reg_t    ra;
    reg_t    rb;
    word_t   literal;
  } ctrl_t;

  // Source of one E-stage operand, chosen by the forwarding unit.
  typedef enum logic [1:0] {
    FWD_RF = 2'd0,  // value read from the register file in the R stage
    FWD_W  = 2'd1,  // result of the instruction now in the W stage
    FWD_X  = 2'd2   // result held in the register after the W stage
  } fwd_sel_e;

endpackage
