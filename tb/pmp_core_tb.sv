// pmp_core_tb: the pipelined core with small memories (2^10 words) built
// here from word_mem. Programs are compared with the reference model: final
// registers, data memory, number of interlock bubbles and clock count.
//
// Timing rule checked: with the core reset and run raised, clock 1 executes
// the NOP left in CIR by reset, and every later clock executes one
// instruction or one bubble, so the halt instruction is first executed on
// clock 1 + (instructions before it) + (bubbles) + 1.
//
//   1. reference program: 16 instructions, 4 bubbles (SLL after LD R4, ST
//      after SLL R5, JMP after EQ R11, JMP after GT R11), halt on clock 22, and
//      hand-worked register values
//   2. the same program on a second core built with INTERLOCK = 0: the SLL
//      right after the load of R4 must read the old R4 (0), giving R5 = 5
//   3. four random straight-line programs, 200 instructions each
//   4. a counting loop of 25 passes
module pmp_core_tb;
  import amp_pkg::*;
  import amp_tb_pkg::*;

  localparam int unsigned AW = 10;

  logic   clk = 0, rst_n = 0, run = 0;
  word_t  boot_pc = '0;
  int     checks = 0, failures = 0;
  int     n_stall = 0, n_taken = 0, n_exec = 0;

  // ---------------- memories and host ports
  logic          pm_we [1];  logic [AW-1:0] pm_waddr [1];  word_t pm_wdata [1];
  logic [AW-1:0] pm_raddr [2];  word_t pm_rdata [2];
  logic          dm_we [2];  logic [AW-1:0] dm_waddr [2];  word_t dm_wdata [2];
  logic [AW-1:0] dm_raddr [2];  word_t dm_rdata [2];
  logic          dmb_we [2]; logic [AW-1:0] dmb_waddr [2]; word_t dmb_wdata [2];
  logic [AW-1:0] dmb_raddr [1]; word_t dmb_rdata [1];

  word_mem #(.AW(AW), .NR(2), .NW(1)) u_pm  (.clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata), .raddr(pm_raddr), .rdata(pm_rdata));
  word_mem #(.AW(AW), .NR(2), .NW(2)) u_dm  (.clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata), .raddr(dm_raddr), .rdata(dm_rdata));
  word_mem #(.AW(AW), .NR(1), .NW(2)) u_dmb (.clk, .we(dmb_we), .waddr(dmb_waddr), .wdata(dmb_wdata), .raddr(dmb_raddr), .rdata(dmb_rdata));

  // ---------------- core under test (interlocked)
  word_t  pm_addr, c_dm_raddr, c_dm_waddr, c_dm_wdata, pc, cir, pir;
  logic   c_dm_we, ev_stall, ev_taken, ev_exec;
  logic   host_reg_we = 0;
  field_t host_reg_addr = '0, host_reg_raddr = '0;
  word_t  host_reg_wdata = '0, host_reg_rdata;

  pmp_core #(.INTERLOCK(1'b1)) dut (
    .clk, .rst_n, .run, .boot_pc,
    .pm_addr, .pm_rdata(pm_rdata[0]),
    .dm_raddr(c_dm_raddr), .dm_rdata(dm_rdata[0]),
    .dm_we(c_dm_we), .dm_waddr(c_dm_waddr), .dm_wdata(c_dm_wdata),
    .host_reg_we, .host_reg_addr, .host_reg_wdata, .host_reg_raddr, .host_reg_rdata,
    .pc, .cir, .pir, .ev_stall, .ev_taken, .ev_exec
  );

  // ---------------- second core without interlock
  word_t  b_pm_addr, b_dm_raddr, b_dm_waddr, b_dm_wdata, b_pc, b_cir, b_pir, b_reg_rdata;
  logic   b_dm_we, b_stall, b_taken, b_exec, b_run = 0;

  pmp_core #(.INTERLOCK(1'b0)) dut_b (
    .clk, .rst_n, .run(b_run), .boot_pc,
    .pm_addr(b_pm_addr), .pm_rdata(pm_rdata[1]),
    .dm_raddr(b_dm_raddr), .dm_rdata(dmb_rdata[0]),
    .dm_we(b_dm_we), .dm_waddr(b_dm_waddr), .dm_wdata(b_dm_wdata),
    .host_reg_we, .host_reg_addr, .host_reg_wdata, .host_reg_raddr, .host_reg_rdata(b_reg_rdata),
    .pc(b_pc), .cir(b_cir), .pir(b_pir), .ev_stall(b_stall), .ev_taken(b_taken), .ev_exec(b_exec)
  );

  logic          host_pm_we = 0, host_dm_we = 0;
  logic [AW-1:0] host_pm_addr = '0, host_dm_addr = '0, host_dm_raddr = '0;
  word_t         host_pm_wdata = '0, host_dm_wdata = '0;

  assign pm_we[0] = host_pm_we;  assign pm_waddr[0] = host_pm_addr;  assign pm_wdata[0] = host_pm_wdata;
  assign pm_raddr[0] = pm_addr[AW+1:2];
  assign pm_raddr[1] = b_pm_addr[AW+1:2];
  assign dm_we[0] = host_dm_we;  assign dm_waddr[0] = host_dm_addr;  assign dm_wdata[0] = host_dm_wdata;
  assign dm_we[1] = c_dm_we;     assign dm_waddr[1] = c_dm_waddr[AW-1:0]; assign dm_wdata[1] = c_dm_wdata;
  assign dm_raddr[0] = c_dm_raddr[AW-1:0];
  assign dm_raddr[1] = host_dm_raddr;
  assign dmb_we[0] = host_dm_we; assign dmb_waddr[0] = host_dm_addr; assign dmb_wdata[0] = host_dm_wdata;
  assign dmb_we[1] = b_dm_we;    assign dmb_waddr[1] = b_dm_waddr[AW-1:0]; assign dmb_wdata[1] = b_dm_wdata;
  assign dmb_raddr[0] = b_dm_raddr[AW-1:0];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_stall) n_stall++;
    if (ev_taken) n_taken++;
    if (ev_exec)  n_exec++;
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr_pm(word_t byte_addr, word_t d);
    @(negedge clk); host_pm_we = 1; host_pm_addr = byte_addr[AW+1:2]; host_pm_wdata = d;
    @(negedge clk); host_pm_we = 0;
  endtask
  task automatic wr_dm(word_t a, word_t d);
    @(negedge clk); host_dm_we = 1; host_dm_addr = a[AW-1:0]; host_dm_wdata = d;
    @(negedge clk); host_dm_we = 0;
  endtask
  task automatic wr_reg(field_t r, word_t d);
    @(negedge clk); host_reg_we = 1; host_reg_addr = r; host_reg_wdata = d;
    @(negedge clk); host_reg_we = 0;
  endtask
  task automatic chk_reg(string what, field_t r, word_t exp);
    host_reg_raddr = r; #1;
    expect_eq(what, host_reg_rdata, exp);
  endtask

  task automatic load(isa_model m, pm_word_t prog[$], reg_init_t regs[$], bit rand_dm);
    for (int i = 0; i < 128; i++) begin
      wr_pm(word_t'(4 * i), 32'h0); m.pm[word_t'(4 * i)] = 32'h0;   // NOP
    end
    for (int i = 0; i < 128; i++) begin
      word_t d;
      d = rand_dm ? $urandom : 32'd0;
      wr_dm(word_t'(i), d); m.dm[word_t'(i)] = d;
    end
    for (int i = 0; i < 64; i++) begin wr_reg(field_t'(i), 0); m.regs[i] = 0; end
    foreach (prog[i]) begin wr_pm(prog[i].addr, prog[i].data); m.pm[prog[i].addr] = prog[i].data; end
    foreach (regs[i]) begin wr_reg(regs[i].r, regs[i].v); m.regs[regs[i].r] = regs[i].v; end
  endtask

  // reset, run until the halt executes, compare
  task automatic run_cmp(isa_model m, string name, output int clocks, output int stalls);
    int steps, s0;
    steps = 0;
    m.pc = 0;
    while (!m.halted() && steps < 10000) begin m.step(); steps++; end
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; run = 1;
    s0 = n_stall;
    clocks = 0;
    do begin
      @(negedge clk);
      clocks++;
    end while (!(ev_taken && pc == m.pc + 4) && clocks < 20000);
    stalls = n_stall - s0;
    clocks = clocks + 1;   // the check above sees the clock after the one counted
    repeat (3) @(negedge clk);   // let the last results write back
    run = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) chk_reg($sformatf("%s R%0d", name, i), field_t'(i), m.regs[i]);
    for (int i = 0; i < 128; i++) begin
      host_dm_raddr = AW'(i); #1;
      expect_eq($sformatf("%s DM[%0d]", name, i), dm_rdata[1], m.dm[word_t'(i)]);
    end
    expect_eq({name, " bubbles"}, stalls, m.stalls);
    expect_eq({name, " clocks"}, clocks, 1 + steps + m.stalls + 1);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model  m;
    pm_word_t  prog[$];
    reg_init_t regs[$];
    int        clocks, stalls;

    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. reference program
    m = new(1'b1, AW);
    doc_program(0, 8'h01, prog);
    regs.delete();
    regs.push_back('{8'd1, 32'd1});
    regs.push_back('{8'd2, 32'd0});
    regs.push_back('{8'd13, 32'd252});
    regs.push_back('{8'd17, 32'd56});
    load(m, prog, regs, 1'b0);
    wr_dm(1, 6); m.dm[1] = 6;
    wr_dm(2, 5); m.dm[2] = 5;
    run_cmp(m, "reference", clocks, stalls);
    expect_eq("reference bubbles (hand count)", stalls, 4);
    expect_eq("reference clocks (hand count)", clocks, 22);
    chk_reg("R5", 5, 160);
    chk_reg("R6", 6, 10);
    chk_reg("R7", 7, 25);
    chk_reg("R10", 10, 32'hFFFF_FFFA);
    chk_reg("R11", 11, 0);
    chk_reg("R12", 12, 52);
    chk_reg("R14", 14, 10);
    chk_reg("R15", 15, 260);
    chk_reg("R16", 16, 30);
    host_dm_raddr = 5; #1;
    expect_eq("DM[5]", dm_rdata[1], 160);

    // 2. the core without interlock reads R4 before the load has written it
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; b_run = 1;
    repeat (30) @(negedge clk);
    b_run = 0;
    host_reg_raddr = 5; #1;
    expect_eq("no interlock: stale R4 gives R5 = 5 << 0", b_reg_rdata, 5);
    host_reg_raddr = 3; #1;
    expect_eq("no interlock: R3", b_reg_rdata, 5);

    // 3. random programs
    for (int t = 0; t < 4; t++) begin
      m = new(1'b1, AW);
      gen_random(0, 8'h01, 200, prog, regs);
      load(m, prog, regs, 1'b1);
      run_cmp(m, $sformatf("random%0d", t), clocks, stalls);
    end

    // 4. loop
    m = new(1'b1, AW);
    gen_loop(0, 8'h01, 25, prog, regs);
    load(m, prog, regs, 1'b0);
    run_cmp(m, "loop", clocks, stalls);
    host_dm_raddr = 0; #1;
    expect_eq("loop total", dm_rdata[1], 75);

    checks++;
    if (n_stall == 0 || n_taken == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: stalls %0d taken %0d", n_stall, n_taken);
    end
    $display("executed %0d, bubbles %0d, taken %0d", n_exec, n_stall, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
