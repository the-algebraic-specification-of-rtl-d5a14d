// spm: the sequential "programmer's model" machine. Each clock with run high
// executes one whole instruction, so no instruction ever sees a partly
// finished predecessor.
//
// State is (program memory, data memory, PC, registers). Per instruction
// word {opcode, A, B, C} at PC:
//   ADD/MULT/AND/OR/SLL/EQ/GT  R[C] <= R[A] op R[B]
//   NOT                        R[C] <= ~R[A]
//   LD                         R[C] <= DM[R[A] + R[B]]
//   ST                         DM[R[A] + R[B]] <= R[C]
//   JMP                        if R[A] == 0: PC <= R[C], R[B] <= PC + 4
// and otherwise PC <= PC + 4. This machine uses the opcode map with ADD at
// 0x00. PC is a byte address: the program word at PC is program memory
// word PC/4, and the low two PC bits are ignored (this design's choice).
// Data memory addresses name whole words.
//
// Host access (this design's own, for loading programs and reading results):
// while run is low the host may write program memory, data memory and
// registers, and can always read data memory and registers through separate
// ports. While run is high host writes are ignored. rst_n (active low,
// synchronous) sets PC to 0; memories and registers are not cleared.
// Opcode 0x01 and opcodes above 0x0B are executed as "no operation".
module spm
  import amp_pkg::*;
#(
  parameter int unsigned PAW = 28,   // program memory: 2^PAW words
  parameter int unsigned DAW = 28    // data memory: 2^DAW words
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  // host port
  input  logic           host_pm_we,
  input  logic [PAW-1:0] host_pm_addr,
  input  word_t          host_pm_wdata,
  input  logic           host_dm_we,
  input  logic [DAW-1:0] host_dm_addr,
  input  word_t          host_dm_wdata,
  input  logic [DAW-1:0] host_dm_raddr,
  output word_t          host_dm_rdata,
  input  logic           host_reg_we,
  input  field_t         host_reg_addr,
  input  word_t          host_reg_wdata,
  input  field_t         host_reg_raddr,
  output word_t          host_reg_rdata,
  // status
  output word_t          pc,
  output logic           retired,   // an instruction completed this cycle
  output logic           taken      // it was a taken JMP
);

  word_t  pc_q;
  word_t  ir;
  op_e    op;
  field_t ra, rb, rc;
  word_t  va, vb, vc, alu_y, dm_q;

  // program memory: host writes only
  logic           pm_we    [1];
  logic [PAW-1:0] pm_waddr [1];
  word_t          pm_wdata [1];
  logic [PAW-1:0] pm_raddr [1];
  word_t          pm_rdata [1];

  assign pm_we[0]    = host_pm_we && !run;
  assign pm_waddr[0] = host_pm_addr;
  assign pm_wdata[0] = host_pm_wdata;
  assign pm_raddr[0] = pc_q[PAW+1:2];

  word_mem #(.AW(PAW), .NR(1), .NW(1)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata)
  );

  assign ir = pm_rdata[0];
  assign op = decode_spm(opcode_of(ir));
  assign ra = rega_of(ir);
  assign rb = regb_of(ir);
  assign rc = regc_of(ir);

  // registers: ports 0..2 for A, B, C, port 3 for the host
  field_t rf_raddr [4];
  word_t  rf_rdata [4];
  logic   rf_we;
  field_t rf_waddr;
  word_t  rf_wdata;

  assign rf_raddr[0] = ra;
  assign rf_raddr[1] = rb;
  assign rf_raddr[2] = rc;
  assign rf_raddr[3] = host_reg_raddr;
  assign va = rf_rdata[0];
  assign vb = rf_rdata[1];
  assign vc = rf_rdata[2];
  assign host_reg_rdata = rf_rdata[3];

  regfile #(.NR(4)) u_rf (
    .clk, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata)
  );

  alu u_alu (.op(op), .a(va), .b(vb), .y(alu_y));

  // data memory: port 0 for the machine, port 1 for the host
  logic           dm_we    [1];
  logic [DAW-1:0] dm_waddr [1];
  word_t          dm_wdata [1];
  logic [DAW-1:0] dm_raddr [2];
  word_t          dm_rdata [2];

  assign dm_raddr[0] = alu_y[DAW-1:0];
  assign dm_raddr[1] = host_dm_raddr;
  assign dm_q          = dm_rdata[0];
  assign host_dm_rdata = dm_rdata[1];

  word_mem #(.AW(DAW), .NR(2), .NW(1)) u_dm (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .raddr(dm_raddr), .rdata(dm_rdata)
  );

  logic jmp_taken;
  logic active;
  assign active = run && rst_n;
  assign jmp_taken = (op == OP_JMP) && (va == CONST_ZERO);

  always_comb begin
    rf_we       = 1'b0;
    rf_waddr    = rc;
    rf_wdata    = alu_y;
    dm_we[0]    = 1'b0;
    dm_waddr[0] = alu_y[DAW-1:0];
    dm_wdata[0] = vc;
    if (!active) begin
      rf_we       = host_reg_we && !run;
      rf_waddr    = host_reg_addr;
      rf_wdata    = host_reg_wdata;
      dm_we[0]    = host_dm_we && !run;
      dm_waddr[0] = host_dm_addr;
      dm_wdata[0] = host_dm_wdata;
    end else begin
      unique case (op)
        OP_ADD, OP_MULT, OP_AND, OP_OR, OP_NOT, OP_SLL, OP_EQ, OP_GT: rf_we = 1'b1;
        OP_LD: begin
          rf_we    = 1'b1;
          rf_wdata = dm_q;
        end
        OP_ST: dm_we[0] = 1'b1;
        OP_JMP: begin
          rf_we    = jmp_taken;
          rf_waddr = rb;
          rf_wdata = pc_q + FOUR;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      pc_q <= '0;
    else if (run)    pc_q <= jmp_taken ? vc : pc_q + FOUR;
  end

  assign pc      = pc_q;
  assign retired = active;
  assign taken   = active && jmp_taken;

endmodule
