// execute_unit: second stage of the pipelined core. Reads the operands of
// the instruction in CIR, computes its result and records, in its state
// register, what the writeback unit must do with it:
//   result   the value to store
//   taken    the instruction was a taken JMP
//   wbflag   none, data memory or register
//   memwbloc the data memory address (stores)
//   regwbloc the register number (results, loads, JMP return address)
//
// Per instruction {opcode, A, B, C} (pipelined opcode map, NOP = 0x00):
//   ADD..GT  result = R[A] op R[B], to register C (NOT uses R[A] only)
//   LD       result = DM[R[A] + R[B]], to register C
//   ST       result = R[C], to data memory address R[A] + R[B]
//   JMP      if R[A] == R[0] (= 0): taken, result = PC (address of the JMP
//            plus 4) to register B, and redirect the fetch unit to R[C]
//            in the same cycle; otherwise nothing is written
//   NOP      nothing is written
// Registers and data memory are read combinationally through the ports
// below; the state register updates at the clock edge. A stall from the
// fetch unit, or run low, makes the state a bubble (nothing written).
// redirect is combinational and is only raised with run high and no stall.
// rf_raddr (the A, B, C fields of CIR) and target (the value of register C)
// are plain wires from the inputs: the register bank lives in writeback.
module execute_unit
  import amp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      run,
  input  logic      stall,
  input  word_t     cir,
  input  word_t     pc,
  // register read ports (A, B, C fields)
  output field_t    rf_raddr [3],
  input  word_t     rf_rdata [3],
  // data memory read port
  output word_t     dm_raddr,
  input  word_t     dm_rdata,
  // branch redirect to the fetch unit
  output logic      redirect,
  output word_t     target,
  // state, read by the writeback unit
  output ex_state_t ex
);

  op_e       op;
  word_t     va, vb, vc, alu_y;
  ex_state_t ex_d, ex_q;

  assign op = decode_pmp(opcode_of(cir));
  assign rf_raddr[0] = rega_of(cir);
  assign rf_raddr[1] = regb_of(cir);
  assign rf_raddr[2] = regc_of(cir);
  assign va = rf_rdata[0];
  assign vb = rf_rdata[1];
  assign vc = rf_rdata[2];

  alu u_alu (.op(op), .a(va), .b(vb), .y(alu_y));

  assign dm_raddr = alu_y;
  assign redirect = run && !stall && (op == OP_JMP) && (va == CONST_ZERO);
  assign target   = vc;

  always_comb begin
    ex_d = EX_BUBBLE;
    unique case (op)
      OP_ADD, OP_MULT, OP_AND, OP_OR, OP_NOT, OP_SLL, OP_EQ, OP_GT: begin
        ex_d.result   = alu_y;
        ex_d.wbflag   = WB_REG;
        ex_d.regwbloc = regc_of(cir);
      end
      OP_LD: begin
        ex_d.result   = dm_rdata;
        ex_d.wbflag   = WB_REG;
        ex_d.regwbloc = regc_of(cir);
      end
      OP_ST: begin
        ex_d.result   = vc;
        ex_d.wbflag   = WB_MEM;
        ex_d.memwbloc = alu_y;
      end
      OP_JMP: begin
        if (va == CONST_ZERO) begin
          ex_d.result   = pc;
          ex_d.taken    = 1'b1;
          ex_d.wbflag   = WB_REG;
          ex_d.regwbloc = regb_of(cir);
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !run || stall) ex_q <= EX_BUBBLE;
    else                         ex_q <= ex_d;
  end

  assign ex = ex_q;

endmodule
