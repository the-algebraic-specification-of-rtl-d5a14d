// fetch_unit: first stage of the three-stage pipelined core. Holds the program
// counter (PC), the current instruction register (CIR) and the previous
// instruction register (PIR).
//
// Each cycle with run high, one of three things happens:
//   redirect (the execute unit found a taken JMP in CIR this cycle):
//       CIR <= PM[target], PC <= target + 4, PIR <= CIR
//   stall (read-after-write hazard, below):
//       PC and CIR hold, PIR <= NOP, so the hazard clears after one cycle
//   otherwise:
//       CIR <= PM[PC], PC <= PC + 4, PIR <= CIR
// so PC always equals the address of CIR plus 4. The program memory read
// port is combinational; pm_addr is the byte address of the word to fetch.
//
// Hazard check: the destination register of PIR (C field for results and
// loads, B field for JMP, which writes its return address there) is compared
// with the registers CIR reads. PIR's result is written back at the end of
// the current cycle, so a match means CIR would read a stale value: the
// stall output tells the execute unit to issue a bubble instead. Register 0
// never causes a stall. With INTERLOCK = 0 no check is made and, as in a
// pipeline without interlocks, the program must keep dependent instructions
// apart.
//
// rst_n (active low, synchronous) loads PC from boot_pc and clears CIR and
// PIR to the NOP word.
module fetch_unit
  import amp_pkg::*;
#(
  parameter bit INTERLOCK = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  word_t boot_pc,
  // from the execute unit
  input  logic  redirect,
  input  word_t target,
  // program memory read port
  output word_t pm_addr,
  input  word_t pm_rdata,
  // state
  output word_t pc,
  output word_t cir,
  output word_t pir,
  output logic  stall
);

  word_t pc_q, cir_q, pir_q;

  // registers an instruction reads
  function automatic logic reads_reg(word_t w, field_t r);
    op_e o;
    o = decode_pmp(opcode_of(w));
    unique case (o)
      OP_ADD, OP_MULT, OP_AND, OP_OR, OP_SLL, OP_LD, OP_EQ, OP_GT:
        return (rega_of(w) == r) || (regb_of(w) == r);
      OP_NOT:  return rega_of(w) == r;
      OP_ST:   return (rega_of(w) == r) || (regb_of(w) == r) || (regc_of(w) == r);
      OP_JMP:  return (rega_of(w) == r) || (regc_of(w) == r);
      default: return 1'b0;
    endcase
  endfunction

  // register an instruction writes; returns 0 when it writes none
  function automatic field_t dest_reg(word_t w);
    op_e o;
    o = decode_pmp(opcode_of(w));
    unique case (o)
      OP_ADD, OP_MULT, OP_AND, OP_OR, OP_NOT, OP_SLL, OP_LD, OP_EQ, OP_GT:
        return regc_of(w);
      OP_JMP:  return regb_of(w);
      default: return '0;
    endcase
  endfunction

  field_t pir_dest;
  assign pir_dest = dest_reg(pir_q);
  assign stall    = INTERLOCK && run && (pir_dest != '0) && reads_reg(cir_q, pir_dest);

  assign pm_addr = redirect ? target : pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q  <= boot_pc;
      cir_q <= NOPWORD;
      pir_q <= NOPWORD;
    end else if (run) begin
      if (stall) begin
        pir_q <= NOPWORD;
      end else begin
        pc_q  <= pm_addr + FOUR;
        cir_q <= pm_rdata;
        pir_q <= cir_q;
      end
    end
  end

  assign pc  = pc_q;
  assign cir = cir_q;
  assign pir = pir_q;

endmodule
