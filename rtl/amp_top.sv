// amp_top: the two machines of this design side by side, sharing only the
// clock.
//
//   spm   the sequential machine: one instruction per clock, own program and
//         data memory, opcode map with ADD = 0x00.
//   pmp2  the dual-core machine: two three-stage pipelined cores sharing a
//         program memory and a data memory, opcode map with NOP = 0x00 and
//         ADD = 0x01.
//
// Each machine has its own reset (rst_n, active low, synchronous), run
// enable and host port for loading programs, data and registers while run
// is low and for reading results. Signals prefixed spm_ belong to the
// sequential machine, mc_ to the dual-core one. Memory sizes and the
// pipeline interlock are parameters passed down unchanged.
module amp_top
  import amp_pkg::*;
#(
  parameter int unsigned PAW       = 28,
  parameter int unsigned DAW       = 28,
  parameter bit          INTERLOCK = 1'b1
) (
  input  logic           clk,
  // sequential machine
  input  logic           spm_rst_n,
  input  logic           spm_run,
  input  logic           spm_pm_we,
  input  logic [PAW-1:0] spm_pm_addr,
  input  word_t          spm_pm_wdata,
  input  logic           spm_dm_we,
  input  logic [DAW-1:0] spm_dm_addr,
  input  word_t          spm_dm_wdata,
  input  logic [DAW-1:0] spm_dm_raddr,
  output word_t          spm_dm_rdata,
  input  logic           spm_reg_we,
  input  field_t         spm_reg_addr,
  input  word_t          spm_reg_wdata,
  input  field_t         spm_reg_raddr,
  output word_t          spm_reg_rdata,
  output word_t          spm_pc,
  output logic           spm_retired,
  output logic           spm_taken,
  // dual-core machine
  input  logic           mc_rst_n,
  input  logic           mc_run,
  input  word_t          mc_boot_pc     [2],
  input  logic           mc_pm_we,
  input  logic [PAW-1:0] mc_pm_addr,
  input  word_t          mc_pm_wdata,
  input  logic           mc_dm_we,
  input  logic [DAW-1:0] mc_dm_addr,
  input  word_t          mc_dm_wdata,
  input  logic [DAW-1:0] mc_dm_raddr,
  output word_t          mc_dm_rdata,
  input  logic           mc_reg_we      [2],
  input  field_t         mc_reg_addr    [2],
  input  word_t          mc_reg_wdata   [2],
  input  field_t         mc_reg_raddr   [2],
  output word_t          mc_reg_rdata   [2],
  output word_t          mc_pc          [2],
  output logic           mc_ev_stall    [2],
  output logic           mc_ev_taken    [2],
  output logic           mc_ev_exec     [2],
  output logic           mc_ev_dm_collision
);

  spm #(.PAW(PAW), .DAW(DAW)) u_spm (
    .clk,
    .rst_n          (spm_rst_n),
    .run            (spm_run),
    .host_pm_we     (spm_pm_we),
    .host_pm_addr   (spm_pm_addr),
    .host_pm_wdata  (spm_pm_wdata),
    .host_dm_we     (spm_dm_we),
    .host_dm_addr   (spm_dm_addr),
    .host_dm_wdata  (spm_dm_wdata),
    .host_dm_raddr  (spm_dm_raddr),
    .host_dm_rdata  (spm_dm_rdata),
    .host_reg_we    (spm_reg_we),
    .host_reg_addr  (spm_reg_addr),
    .host_reg_wdata (spm_reg_wdata),
    .host_reg_raddr (spm_reg_raddr),
    .host_reg_rdata (spm_reg_rdata),
    .pc             (spm_pc),
    .retired        (spm_retired),
    .taken          (spm_taken)
  );

  pmp2 #(.PAW(PAW), .DAW(DAW), .INTERLOCK(INTERLOCK)) u_mc (
    .clk,
    .rst_n          (mc_rst_n),
    .run            (mc_run),
    .boot_pc        (mc_boot_pc),
    .host_pm_we     (mc_pm_we),
    .host_pm_addr   (mc_pm_addr),
    .host_pm_wdata  (mc_pm_wdata),
    .host_dm_we     (mc_dm_we),
    .host_dm_addr   (mc_dm_addr),
    .host_dm_wdata  (mc_dm_wdata),
    .host_dm_raddr  (mc_dm_raddr),
    .host_dm_rdata  (mc_dm_rdata),
    .host_reg_we    (mc_reg_we),
    .host_reg_addr  (mc_reg_addr),
    .host_reg_wdata (mc_reg_wdata),
    .host_reg_raddr (mc_reg_raddr),
    .host_reg_rdata (mc_reg_rdata),
    .pc             (mc_pc),
    .ev_stall       (mc_ev_stall),
    .ev_taken       (mc_ev_taken),
    .ev_exec        (mc_ev_exec),
    .ev_dm_collision(mc_ev_dm_collision)
  );

endmodule
