// amp_pkg: types, constants and decoders shared by the sequential machine,
// the pipelined core and the dual-core machine.
//
// Every instruction is one 32-bit word: bits 31:24 hold the opcode and bits
// 23:16, 15:8 and 7:0 hold the register fields A, B and C. Registers and
// opcodes are therefore one byte each, giving 256 registers.
//
// Two opcode maps exist. The sequential machine numbers ADD as 0x00 and has
// no NOP. The pipelined machines reserve 0x00 for NOP (the all-zero word,
// which is also what the pipeline registers reset to) and move ADD to 0x01.
// All other opcodes (MULT 0x02 ... JMP 0x0B) are the same in both maps.
// Both decoders turn an opcode into the common op_e enum; an opcode outside
// the map decodes to OP_NOP, which is this design's choice.
//
// Comparison instructions write 0 for "true" and all ones for "false", so that
// a following JMP, which branches when its A register holds zero, branches on
// a true comparison.
package amp_pkg;

  localparam int unsigned XLEN   = 32;   // machine word
  localparam int unsigned FLEN   = 8;    // opcode / register field
  localparam int unsigned NREGS  = 256;  // 2^FLEN registers

  typedef logic [XLEN-1:0] word_t;
  typedef logic [FLEN-1:0] field_t;

  localparam word_t NOPWORD     = '0;
  localparam word_t CONST_ZERO  = '0;
  localparam word_t CONST_M1    = '1;
  localparam word_t FOUR        = 32'd4;

  // Common operation set.
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_MULT = 4'd2,
    OP_AND  = 4'd3,
    OP_OR   = 4'd4,
    OP_NOT  = 4'd5,
    OP_SLL  = 4'd6,
    OP_LD   = 4'd7,
    OP_ST   = 4'd8,
    OP_EQ   = 4'd9,
    OP_GT   = 4'd10,
    OP_JMP  = 4'd11
  } op_e;

  // Opcode values of the sequential machine.
  localparam field_t SPM_ADD32 = 8'h00;
  // Opcode values of the pipelined machines.
  localparam field_t PMP_NOP   = 8'h00;
  localparam field_t PMP_ADD   = 8'h01;
  // Shared by both maps.
  localparam field_t OPC_MULT  = 8'h02;
  localparam field_t OPC_AND   = 8'h03;
  localparam field_t OPC_OR    = 8'h04;
  localparam field_t OPC_NOT   = 8'h05;
  localparam field_t OPC_SLL   = 8'h06;
  localparam field_t OPC_LD    = 8'h07;
  localparam field_t OPC_ST    = 8'h08;
  localparam field_t OPC_EQ    = 8'h09;
  localparam field_t OPC_GT    = 8'h0A;
  localparam field_t OPC_JMP   = 8'h0B;

  // Where a result goes: nowhere, data memory or a register.
  typedef enum logic [1:0] {
    WB_NONE = 2'd0,
    WB_MEM  = 2'd1,
    WB_REG  = 2'd2
  } wbflag_e;

  // State of the execute unit, handed to the writeback unit.
  typedef struct packed {
    word_t   result;     // value to store
    logic    taken;      // the instruction was a taken branch
    wbflag_e wbflag;     // destination kind
    word_t   memwbloc;   // data memory address for WB_MEM
    field_t  regwbloc;   // register number for WB_REG
  } ex_state_t;

  localparam ex_state_t EX_BUBBLE = '{result: NOPWORD, taken: 1'b0, wbflag: WB_NONE,
                                      memwbloc: NOPWORD, regwbloc: '0};

  // Instruction word fields.
  function automatic field_t opcode_of(word_t w); return w[31:24]; endfunction
  function automatic field_t rega_of  (word_t w); return w[23:16]; endfunction
  function automatic field_t regb_of  (word_t w); return w[15:8];  endfunction
  function automatic field_t regc_of  (word_t w); return w[7:0];   endfunction

  function automatic op_e decode_common(field_t opc);
    unique case (opc)
      OPC_MULT: return OP_MULT;
      OPC_AND:  return OP_AND;
      OPC_OR:   return OP_OR;
      OPC_NOT:  return OP_NOT;
      OPC_SLL:  return OP_SLL;
      OPC_LD:   return OP_LD;
      OPC_ST:   return OP_ST;
      OPC_EQ:   return OP_EQ;
      OPC_GT:   return OP_GT;
      OPC_JMP:  return OP_JMP;
      default:  return OP_NOP;
    endcase
  endfunction

  // Sequential machine map: 0x00 is ADD, 0x01 is unused.
  function automatic op_e decode_spm(field_t opc);
    if (opc == SPM_ADD32) return OP_ADD;
    if (opc == 8'h01)     return OP_NOP;
    return decode_common(opc);
  endfunction

  // Pipelined machine map: 0x00 is NOP, 0x01 is ADD.
  function automatic op_e decode_pmp(field_t opc);
    if (opc == PMP_NOP) return OP_NOP;
    if (opc == PMP_ADD) return OP_ADD;
    return decode_common(opc);
  endfunction

  // Instruction word builders, used by testbenches and program generators.
  function automatic word_t mk_instr(field_t opc, field_t a, field_t b, field_t c);
    return {opc, a, b, c};
  endfunction

endpackage
