// pmp2: the dual-core machine. Two pipelined cores, each with its own
// program counter, pipeline registers and register bank, run their own
// programs from one shared program memory and share one data memory.
//
// Program memory has one read port per core; since programs never change it
// is written only by the host. Each core starts at its own boot address
// (boot_pc[0], boot_pc[1]), so the two programs sit in different regions.
//
// Data memory has one read port per core plus one for the host, and one
// write port per core plus one for the host. Both cores may store in the
// same cycle. Stores to different words both complete; when both store to
// the same word, core 1's value is kept and ev_dm_collision pulses. Nothing
// else orders the two cores' accesses: as in the design, keeping shared data
// consistent is left to the programs. Loads see stores of earlier cycles
// only. The write priority, the host ports and the collision flag are this
// implementation's choices.
//
// Host writes to program memory, data memory and registers take effect only
// while run is low. rst_n (active low, synchronous) resets both pipelines.
module pmp2
  import amp_pkg::*;
#(
  parameter int unsigned PAW       = 28,   // program memory: 2^PAW words
  parameter int unsigned DAW       = 28,   // data memory: 2^DAW words
  parameter bit          INTERLOCK = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  word_t          boot_pc        [2],
  // host port
  input  logic           host_pm_we,
  input  logic [PAW-1:0] host_pm_addr,
  input  word_t          host_pm_wdata,
  input  logic           host_dm_we,
  input  logic [DAW-1:0] host_dm_addr,
  input  word_t          host_dm_wdata,
  input  logic [DAW-1:0] host_dm_raddr,
  output word_t          host_dm_rdata,
  input  logic           host_reg_we    [2],
  input  field_t         host_reg_addr  [2],
  input  word_t          host_reg_wdata [2],
  input  field_t         host_reg_raddr [2],
  output word_t          host_reg_rdata [2],
  // status, per core
  output word_t          pc             [2],
  output logic           ev_stall       [2],
  output logic           ev_taken       [2],
  output logic           ev_exec        [2],
  output logic           ev_dm_collision
);

  // program memory
  logic           pm_we    [1];
  logic [PAW-1:0] pm_waddr [1];
  word_t          pm_wdata [1];
  logic [PAW-1:0] pm_raddr [2];
  word_t          pm_rdata [2];

  // data memory: write port 0 host, 1 core 0, 2 core 1; read port 2 host
  logic           dm_we    [3];
  logic [DAW-1:0] dm_waddr [3];
  word_t          dm_wdata [3];
  logic [DAW-1:0] dm_raddr [3];
  word_t          dm_rdata [3];

  assign pm_we[0]    = host_pm_we && !run;
  assign pm_waddr[0] = host_pm_addr;
  assign pm_wdata[0] = host_pm_wdata;

  assign dm_we[0]    = host_dm_we && !run;
  assign dm_waddr[0] = host_dm_addr;
  assign dm_wdata[0] = host_dm_wdata;
  assign dm_raddr[2] = host_dm_raddr;
  assign host_dm_rdata = dm_rdata[2];

  for (genvar c = 0; c < 2; c++) begin : g_core
    word_t c_pm_addr, c_dm_raddr, c_dm_waddr, c_dm_wdata;
    word_t c_cir, c_pir;
    logic  c_dm_we;

    pmp_core #(.INTERLOCK(INTERLOCK)) u_core (
      .clk, .rst_n, .run,
      .boot_pc       (boot_pc[c]),
      .pm_addr       (c_pm_addr),
      .pm_rdata      (pm_rdata[c]),
      .dm_raddr      (c_dm_raddr),
      .dm_rdata      (dm_rdata[c]),
      .dm_we         (c_dm_we),
      .dm_waddr      (c_dm_waddr),
      .dm_wdata      (c_dm_wdata),
      .host_reg_we   (host_reg_we[c]),
      .host_reg_addr (host_reg_addr[c]),
      .host_reg_wdata(host_reg_wdata[c]),
      .host_reg_raddr(host_reg_raddr[c]),
      .host_reg_rdata(host_reg_rdata[c]),
      .pc            (pc[c]),
      .cir           (c_cir),
      .pir           (c_pir),
      .ev_stall      (ev_stall[c]),
      .ev_taken      (ev_taken[c]),
      .ev_exec       (ev_exec[c])
    );

    assign pm_raddr[c]   = c_pm_addr[PAW+1:2];
    assign dm_raddr[c]   = c_dm_raddr[DAW-1:0];
    assign dm_we[c+1]    = c_dm_we;
    assign dm_waddr[c+1] = c_dm_waddr[DAW-1:0];
    assign dm_wdata[c+1] = c_dm_wdata;
  end

  word_mem #(.AW(PAW), .NR(2), .NW(1)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata)
  );

  word_mem #(.AW(DAW), .NR(3), .NW(3)) u_dm (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .raddr(dm_raddr), .rdata(dm_rdata)
  );

  assign ev_dm_collision = dm_we[1] && dm_we[2] && (dm_waddr[1] == dm_waddr[2]);

endmodule
