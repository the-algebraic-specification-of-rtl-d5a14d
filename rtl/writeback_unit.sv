// writeback_unit: third stage of the pipelined core. It owns the register
// bank and takes the execute unit's state: WB_REG writes result into
// register regwbloc, WB_MEM drives a data memory write of result to address
// memwbloc, WB_NONE does nothing. Writes land at the end of the cycle, one
// cycle after the instruction executed.
//
// The data memory itself lives outside, so that two cores can share it; this
// unit only drives its write port (dm_we, dm_waddr, dm_wdata, combinational
// from the execute state; the address and data are the execute record's
// memwbloc and result fields wired straight out).
//
// Host port (this design's own): while run is low and no register result is
// pending, host_reg_we writes a register; host_reg_raddr reads one at any
// time. Register read ports 0..2 serve the execute unit's A, B, C fields.
module writeback_unit
  import amp_pkg::*;
(
  input  logic      clk,
  input  logic      run,
  input  ex_state_t ex,
  // register read ports for the execute unit
  input  field_t    rf_raddr [3],
  output word_t     rf_rdata [3],
  // data memory write port
  output logic      dm_we,
  output word_t     dm_waddr,
  output word_t     dm_wdata,
  // host access to the registers
  input  logic      host_reg_we,
  input  field_t    host_reg_addr,
  input  word_t     host_reg_wdata,
  input  field_t    host_reg_raddr,
  output word_t     host_reg_rdata
);

  field_t raddr [4];
  word_t  rdata [4];
  logic   we;
  field_t waddr;
  word_t  wdata;

  for (genvar i = 0; i < 3; i++) begin : g_rp
    assign raddr[i]    = rf_raddr[i];
    assign rf_rdata[i] = rdata[i];
  end
  assign raddr[3]       = host_reg_raddr;
  assign host_reg_rdata = rdata[3];

  always_comb begin
    if (ex.wbflag == WB_REG) begin
      we    = 1'b1;
      waddr = ex.regwbloc;
      wdata = ex.result;
    end else begin
      we    = host_reg_we && !run;
      waddr = host_reg_addr;
      wdata = host_reg_wdata;
    end
  end

  regfile #(.NR(4)) u_rf (
    .clk, .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  assign dm_we    = (ex.wbflag == WB_MEM);
  assign dm_waddr = ex.memwbloc;
  assign dm_wdata = ex.result;

endmodule
