// risc12_alu: the 12-bit ALU of the E stage.
//
// Computes all operations of the ALU instruction table and the three
// condition codes the conditional jumps test. Arithmetic operations (OP
// 00-09) run through one adder, A + (B, ~B, 0 or all ones) + carry-in:
// ADD A+B+0, ADDINC A+B+1, INCA A+0+1, SUBDEC A+~B+0, SUB A+~B+1,
// DECA A+~0+0. Logic operations (OP 10-1F) use OP[3:0] as the truth table
// of the two inputs, bit by bit. Purely combinational.
//
// Follows the specification: the operation list and the conditions NEG (result < 0),
// ZERO (result = 0), CARRY and NEGZERO. This code's own choices: CARRY is
// the carry out of the 12-bit adder (so after SUB it is 1 when A >= B,
// unsigned); it is 0 for shifts and logic operations. LSL shifts in a 0 and
// ASR copies bit 11. The unused codes 0C-0F, and LOAD and STORE (0A, 0B),
// give 0. NEG is bit 11 of the result.
module risc12_alu
  import risc12_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output flags_t  flags
);

  word_t   addend;
  logic    cin;
  logic    arith;
  logic [DW:0] sum;
  logic [3:0]  truth;

  assign truth = op[3:0];

  always_comb begin
    arith  = 1'b1;
    addend = '0;
    cin    = 1'b0;
    unique case (op)
      OP_ADD:    begin addend = b;           cin = 1'b0; end
      OP_ADDINC: begin addend = b;           cin = 1'b1; end
      OP_INCA:   begin addend = '0;          cin = 1'b1; end
      OP_SUBDEC: begin addend = ~b;          cin = 1'b0; end
      OP_SUB:    begin addend = ~b;          cin = 1'b1; end
      OP_DECA:   begin addend = '1;          cin = 1'b0; end
      default:   arith = 1'b0;
    endcase
  end

  assign sum = {1'b0, a} + {1'b0, addend} + {{DW{1'b0}}, cin};

  always_comb begin
    y = '0;
    if (arith) begin
      y = sum[DW-1:0];
    end else if (op[4]) begin
      // Truth-table logic: index {~b, ~a} selects one OP bit per position.
      for (int i = 0; i < DW; i++)
        y[i] = truth[{~b[i], ~a[i]}];
    end else begin
      unique case (op)
        OP_PASSA2, OP_PASSA7: y = a;
        OP_LSL:               y = {a[DW-2:0], 1'b0};
        OP_ASR:               y = {a[DW-1], a[DW-1:1]};
        default:              y = '0;
      endcase
    end
  end

  assign flags.carry = arith & sum[DW];
  assign flags.zero  = (y == '0);
  assign flags.neg   = y[DW-1];

endmodule
