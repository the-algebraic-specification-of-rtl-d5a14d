// pmp2_tb: the dual-core machine with memories cut to 2^12 words.
//
//   1. Both cores run the reference program from different regions of the
//      shared program memory (core 0 at 0, core 1 at 1024). Both store 160
//      to data word 5 in the same clock: a same-word collision with equal
//      values. Each core's registers must match the model.
//   2. Collision with different values: both cores' first instruction
//      stores to data word 100 (core 0 writes 0xAAAA, core 1 0xBBBB); the
//      word must end as 0xBBBB and the collision flag must pulse once.
//   3. Communication through shared memory: core 1 spins on data word 300
//      until it reads 0x1234, then loads word 301. Core 0 first runs a
//      counting loop, then stores 0x5A5A to 301 and 0x1234 to 300. Core 1
//      must end with 0x5A5A.
module pmp2_tb;
  import amp_pkg::*;
  import amp_tb_pkg::*;

  localparam int unsigned PAW = 12, DAW = 12;

  logic           clk = 0, rst_n = 0, run = 0;
  word_t          boot_pc [2];
  logic           host_pm_we = 0, host_dm_we = 0;
  logic [PAW-1:0] host_pm_addr = '0;
  logic [DAW-1:0] host_dm_addr = '0, host_dm_raddr = '0;
  word_t          host_pm_wdata = '0, host_dm_wdata = '0, host_dm_rdata;
  logic           host_reg_we [2];
  field_t         host_reg_addr [2], host_reg_raddr [2];
  word_t          host_reg_wdata [2], host_reg_rdata [2];
  word_t          pc [2];
  logic           ev_stall [2], ev_taken [2], ev_exec [2], ev_dm_collision;
  int             checks = 0, failures = 0, n_coll = 0, n_stall = 0, n_taken = 0;

  pmp2 #(.PAW(PAW), .DAW(DAW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_dm_collision) n_coll++;
    for (int c = 0; c < 2; c++) begin
      if (ev_stall[c]) n_stall++;
      if (ev_taken[c]) n_taken++;
    end
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr_pm(word_t byte_addr, word_t d);
    @(negedge clk); host_pm_we = 1; host_pm_addr = byte_addr[PAW+1:2]; host_pm_wdata = d;
    @(negedge clk); host_pm_we = 0;
  endtask
  task automatic wr_dm(word_t a, word_t d);
    @(negedge clk); host_dm_we = 1; host_dm_addr = a[DAW-1:0]; host_dm_wdata = d;
    @(negedge clk); host_dm_we = 0;
  endtask
  task automatic wr_reg(int c, field_t r, word_t d);
    @(negedge clk); host_reg_we[c] = 1; host_reg_addr[c] = r; host_reg_wdata[c] = d;
    @(negedge clk); host_reg_we[c] = 0;
  endtask
  task automatic chk_reg(string what, int c, field_t r, word_t exp);
    host_reg_raddr[c] = r; #1;
    expect_eq(what, host_reg_rdata[c], exp);
  endtask
  task automatic chk_dm(string what, word_t a, word_t exp);
    host_dm_raddr = a[DAW-1:0]; #1;
    expect_eq(what, host_dm_rdata, exp);
  endtask
  task automatic clear(int c);
    for (int i = 0; i < 64; i++) wr_reg(c, field_t'(i), 0);
  endtask
  task automatic put(pm_word_t prog[$]);
    foreach (prog[i]) wr_pm(prog[i].addr, prog[i].data);
  endtask
  task automatic go(int cycles);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; run = 1;
    repeat (cycles) @(negedge clk);
    run = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model  m [2];
    pm_word_t  prog[$];
    reg_init_t regs[$];
    word_t     base [2];
    int        c0;

    foreach (host_reg_we[c]) begin
      host_reg_we[c] = 0; host_reg_addr[c] = 0; host_reg_raddr[c] = 0; host_reg_wdata[c] = 0;
    end
    base[0] = 0;
    base[1] = 1024;
    boot_pc = base;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // program memory: NOP everywhere the programs run
    for (int i = 0; i < 512; i++) wr_pm(word_t'(4 * i), 32'h0);
    for (int i = 0; i < 512; i++) wr_dm(word_t'(i), 32'h0);

    // 1. reference program on both cores
    wr_dm(1, 6);
    wr_dm(2, 5);
    for (int c = 0; c < 2; c++) begin
      m[c] = new(1'b1, DAW);
      doc_program(base[c], 8'h01, prog);
      put(prog);
      foreach (prog[i]) m[c].pm[prog[i].addr] = prog[i].data;
      for (int i = 0; i < 512; i++) m[c].dm[word_t'(i)] = 0;
      m[c].dm[1] = 6;
      m[c].dm[2] = 5;
      clear(c);
      wr_reg(c, 1, 1);               m[c].regs[1] = 1;
      wr_reg(c, 13, base[c] + 252);  m[c].regs[13] = base[c] + 252;
      wr_reg(c, 17, base[c] + 56);   m[c].regs[17] = base[c] + 56;
      m[c].pc = base[c];
      while (!m[c].halted()) m[c].step();
    end
    c0 = n_coll;
    go(40);
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 64; i++)
        chk_reg($sformatf("core%0d R%0d", c, i), c, field_t'(i), m[c].regs[i]);
      expect_eq($sformatf("core%0d halted at", c), pc[c], m[c].pc + 4);
    end
    chk_reg("core1 link R12", 1, 12, 1024 + 52);
    chk_dm("DM[5]", 5, 160);
    expect_eq("equal-value collision seen once", n_coll - c0, 1);

    // 2. collision with different values
    prog.delete();
    for (int c = 0; c < 2; c++) begin
      clear(c);
      wr_reg(c, 2, 100);
      wr_reg(c, 3, (c == 0) ? 32'hAAAA : 32'hBBBB);
      wr_reg(c, 15, base[c] + 4);
      wr_pm(base[c],     ins(8'h08, 2, 0, 3));    // DM[R2] = R3
      wr_pm(base[c] + 4, ins(8'h0B, 0, 0, 15));   // halt
    end
    c0 = n_coll;
    go(10);
    chk_dm("collision: core 1 wins", 100, 32'hBBBB);
    expect_eq("collision flag pulses once", n_coll - c0, 1);

    // 3. flag handshake through shared memory
    for (int c = 0; c < 2; c++) clear(c);
    // core 0: count R20 down from 12, then publish data and flag
    wr_reg(0, 20, 12);  wr_reg(0, 22, 32'hFFFF_FFFF);
    wr_reg(0, 24, base[0] + 20);  wr_reg(0, 26, base[0]);
    wr_reg(0, 30, 300); wr_reg(0, 31, 301);
    wr_reg(0, 32, 32'h1234); wr_reg(0, 33, 32'h5A5A);
    wr_reg(0, 15, base[0] + 28);
    wr_pm(base[0] +  0, ins(8'h01, 20, 22, 20));  // R20 -= 1
    wr_pm(base[0] +  4, ins(8'h00,  0,  0,  0));  // NOP
    wr_pm(base[0] +  8, ins(8'h09, 20,  0, 23));  // R23 = (R20 == 0)
    wr_pm(base[0] + 12, ins(8'h0B, 23, 25, 24));  // done counting
    wr_pm(base[0] + 16, ins(8'h0B,  0, 25, 26));  // loop
    wr_pm(base[0] + 20, ins(8'h08, 31,  0, 33));  // DM[301] = 0x5A5A
    wr_pm(base[0] + 24, ins(8'h08, 30,  0, 32));  // DM[300] = 0x1234
    wr_pm(base[0] + 28, ins(8'h0B,  0,  0, 15));  // halt
    // core 1: wait for the flag
    wr_reg(1, 30, 300); wr_reg(1, 31, 301); wr_reg(1, 32, 32'h1234);
    wr_reg(1, 24, base[1] + 16); wr_reg(1, 26, base[1]);
    wr_reg(1, 15, base[1] + 20);
    wr_pm(base[1] +  0, ins(8'h07, 30,  0, 20));  // R20 = DM[300]
    wr_pm(base[1] +  4, ins(8'h09, 20, 32, 23));  // R23 = (R20 == 0x1234)
    wr_pm(base[1] +  8, ins(8'h0B, 23, 25, 24));  // flag seen
    wr_pm(base[1] + 12, ins(8'h0B,  0, 25, 26));  // poll again
    wr_pm(base[1] + 16, ins(8'h07, 31,  0, 21));  // R21 = DM[301]
    wr_pm(base[1] + 20, ins(8'h0B,  0,  0, 15));  // halt
    wr_dm(300, 0);
    wr_dm(301, 0);
    go(150);
    chk_reg("consumer saw the flag", 1, 20, 32'h1234);
    chk_reg("consumer read the data", 1, 21, 32'h5A5A);
    expect_eq("consumer halted", pc[1], base[1] + 24);
    expect_eq("producer halted", pc[0], base[0] + 32);

    checks++;
    if (n_stall == 0 || n_taken == 0 || n_coll == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: stalls %0d taken %0d collisions %0d",
               n_stall, n_taken, n_coll);
    end
    $display("bubbles %0d, taken %0d, collisions %0d", n_stall, n_taken, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
