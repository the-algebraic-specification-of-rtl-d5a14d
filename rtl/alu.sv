// alu: the word operations of the instruction set, purely combinational.
//
// The operands are unsigned 32-bit naturals and every result is cut to 32
// bits, as in the binary number system of the design:
//   ADD  a + b (mod 2^32)            MULT a * b (low 32 bits)
//   AND  a & b      OR  a | b        NOT  ~a (b ignored)
//   SLL  a shifted left by b places; b of 32 or more gives 0
//   EQ   0 if a == b, all ones otherwise
//   GT   0 if a > b (unsigned), all ones otherwise
//   LD   a + b, the load address
//   ST   a + b, the store address
// JMP and NOP give 0; branches are resolved by the caller.
// Result is valid in the same cycle as the inputs.
module alu
  import amp_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    unique case (op)
      OP_ADD, OP_LD, OP_ST: y = a + b;
      OP_MULT:              y = a * b;
      OP_AND:               y = a & b;
      OP_OR:                y = a | b;
      OP_NOT:               y = ~a;
      OP_SLL:               y = (b >= word_t'(XLEN)) ? '0 : (a << b[4:0]);
      OP_EQ:                y = (a == b) ? CONST_ZERO : CONST_M1;
      OP_GT:                y = (a > b)  ? CONST_ZERO : CONST_M1;
      default:              y = '0;
    endcase
  end

endmodule
