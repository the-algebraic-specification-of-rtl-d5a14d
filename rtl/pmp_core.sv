// pmp_core: the three-stage pipelined core: fetch unit, execute unit and
// writeback unit, all advancing together on each clock with run high.
//
//   cycle t    fetch:     CIR <= PM[PC]
//   cycle t+1  execute:   operands of CIR read, result computed
//   cycle t+2  writeback: result written to a register or data memory
//
// A taken JMP is resolved in execute and redirects fetch in the same cycle,
// so no wrong-path instruction enters the pipeline and a taken branch costs
// nothing extra. An instruction that reads the register written by the
// instruction just before it is held for one cycle (a bubble) when INTERLOCK
// is set. Loads and stores are not interlocked: a load placed right after a
// store to the same address reads the old word.
//
// Program and data memory are outside the core (both are shared in the
// dual-core machine); their read ports are combinational and addresses are
// full 32-bit values (pm_addr a byte address, data addresses word numbers).
// Status outputs pulse for one cycle per event: ev_stall when a bubble is
// inserted, ev_taken when a JMP is taken, ev_exec when a non-NOP instruction
// is executed.
module pmp_core
  import amp_pkg::*;
#(
  parameter bit INTERLOCK = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  word_t  boot_pc,
  // program memory read port
  output word_t  pm_addr,
  input  word_t  pm_rdata,
  // data memory read and write ports
  output word_t  dm_raddr,
  input  word_t  dm_rdata,
  output logic   dm_we,
  output word_t  dm_waddr,
  output word_t  dm_wdata,
  // host access to the registers
  input  logic   host_reg_we,
  input  field_t host_reg_addr,
  input  word_t  host_reg_wdata,
  input  field_t host_reg_raddr,
  output word_t  host_reg_rdata,
  // status
  output word_t  pc,
  output word_t  cir,
  output word_t  pir,
  output logic   ev_stall,
  output logic   ev_taken,
  output logic   ev_exec
);

  logic      stall, redirect;
  word_t     target;
  field_t    rf_raddr [3];
  word_t     rf_rdata [3];
  ex_state_t ex;

  fetch_unit #(.INTERLOCK(INTERLOCK)) u_fetch (
    .clk, .rst_n, .run, .boot_pc,
    .redirect, .target,
    .pm_addr, .pm_rdata,
    .pc, .cir, .pir, .stall
  );

  execute_unit u_exec (
    .clk, .rst_n, .run, .stall, .cir, .pc,
    .rf_raddr, .rf_rdata,
    .dm_raddr, .dm_rdata,
    .redirect, .target, .ex
  );

  writeback_unit u_wb (
    .clk, .run, .ex,
    .rf_raddr, .rf_rdata,
    .dm_we, .dm_waddr, .dm_wdata,
    .host_reg_we, .host_reg_addr, .host_reg_wdata,
    .host_reg_raddr, .host_reg_rdata
  );

  assign ev_stall = stall;
  assign ev_taken = redirect;
  assign ev_exec  = run && rst_n && !stall && (decode_pmp(opcode_of(cir)) != OP_NOP);

endmodule
