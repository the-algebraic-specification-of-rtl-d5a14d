// amp_top_tb: end-to-end test of the whole design at its default sizes
// (2^28-word memories), no parameter overridden.
//
// Sequential machine: the reference program, which must halt after exactly
// 16 clocks, then a 30-pass counting loop.
// Dual-core machine: both cores run the reference program at the same time
// from different program regions (core 1 at byte 0x0100_0000, well above
// core 0); then both run the counting loop, each storing its total to its
// own data word; then both store to one data word in the same clock.
// Every result is compared with the reference model or hand-worked values.
//
// Mechanisms counted, each must occur at least once: instructions retired
// on the sequential machine, taken and not-taken JMPs, interlock bubbles on
// each core, a branch redirect on each core, and a same-word store
// collision in the shared data memory.
module amp_top_tb;
  import amp_pkg::*;
  import amp_tb_pkg::*;

  logic clk = 0;
  // sequential machine
  logic   spm_rst_n = 0, spm_run = 0, spm_pm_we = 0, spm_dm_we = 0, spm_reg_we = 0;
  logic [27:0] spm_pm_addr = '0, spm_dm_addr = '0, spm_dm_raddr = '0;
  word_t  spm_pm_wdata = '0, spm_dm_wdata = '0, spm_reg_wdata = '0, spm_dm_rdata, spm_reg_rdata, spm_pc;
  field_t spm_reg_addr = '0, spm_reg_raddr = '0;
  logic   spm_retired, spm_taken;
  // dual-core machine
  logic   mc_rst_n = 0, mc_run = 0, mc_pm_we = 0, mc_dm_we = 0;
  word_t  mc_boot_pc [2];
  logic [27:0] mc_pm_addr = '0, mc_dm_addr = '0, mc_dm_raddr = '0;
  word_t  mc_pm_wdata = '0, mc_dm_wdata = '0, mc_dm_rdata;
  logic   mc_reg_we [2];
  field_t mc_reg_addr [2], mc_reg_raddr [2];
  word_t  mc_reg_wdata [2], mc_reg_rdata [2], mc_pc [2];
  logic   mc_ev_stall [2], mc_ev_taken [2], mc_ev_exec [2], mc_ev_dm_collision;

  int checks = 0, failures = 0;
  int n_spm_retired = 0, n_spm_taken = 0, n_spm_not_taken = 0;
  int n_stall [2], n_taken [2], n_exec [2], n_coll = 0;

  amp_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (spm_retired) n_spm_retired++;
    if (spm_taken) n_spm_taken++;
    if (spm_retired && dut.u_spm.op == OP_JMP && !spm_taken) n_spm_not_taken++;
    if (mc_ev_dm_collision) n_coll++;
    for (int c = 0; c < 2; c++) begin
      if (mc_ev_stall[c]) n_stall[c]++;
      if (mc_ev_taken[c]) n_taken[c]++;
      if (mc_ev_exec[c])  n_exec[c]++;
    end
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- sequential machine host access
  task automatic s_pm(word_t a, word_t d);
    @(negedge clk); spm_pm_we = 1; spm_pm_addr = a[29:2]; spm_pm_wdata = d;
    @(negedge clk); spm_pm_we = 0;
  endtask
  task automatic s_dm(word_t a, word_t d);
    @(negedge clk); spm_dm_we = 1; spm_dm_addr = a[27:0]; spm_dm_wdata = d;
    @(negedge clk); spm_dm_we = 0;
  endtask
  task automatic s_reg(field_t r, word_t d);
    @(negedge clk); spm_reg_we = 1; spm_reg_addr = r; spm_reg_wdata = d;
    @(negedge clk); spm_reg_we = 0;
  endtask
  task automatic s_chk(string what, field_t r, word_t exp);
    spm_reg_raddr = r; #1; expect_eq(what, spm_reg_rdata, exp);
  endtask
  // ---- dual-core host access
  task automatic m_pm(word_t a, word_t d);
    @(negedge clk); mc_pm_we = 1; mc_pm_addr = a[29:2]; mc_pm_wdata = d;
    @(negedge clk); mc_pm_we = 0;
  endtask
  task automatic m_dm(word_t a, word_t d);
    @(negedge clk); mc_dm_we = 1; mc_dm_addr = a[27:0]; mc_dm_wdata = d;
    @(negedge clk); mc_dm_we = 0;
  endtask
  task automatic m_reg(int c, field_t r, word_t d);
    @(negedge clk); mc_reg_we[c] = 1; mc_reg_addr[c] = r; mc_reg_wdata[c] = d;
    @(negedge clk); mc_reg_we[c] = 0;
  endtask
  task automatic m_chk(string what, int c, field_t r, word_t exp);
    mc_reg_raddr[c] = r; #1; expect_eq(what, mc_reg_rdata[c], exp);
  endtask
  task automatic m_chk_dm(string what, word_t a, word_t exp);
    mc_dm_raddr = a[27:0]; #1; expect_eq(what, mc_dm_rdata, exp);
  endtask

  task automatic m_go(int cycles);
    @(negedge clk); mc_rst_n = 0;
    @(negedge clk); mc_rst_n = 1; mc_run = 1;
    repeat (cycles) @(negedge clk);
    mc_run = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model  sm, mm [2];
    pm_word_t  prog[$];
    reg_init_t regs[$];
    word_t     base [2];
    int        clocks;

    foreach (mc_reg_we[c]) begin
      mc_reg_we[c] = 0; mc_reg_addr[c] = 0; mc_reg_raddr[c] = 0; mc_reg_wdata[c] = 0;
      n_stall[c] = 0; n_taken[c] = 0; n_exec[c] = 0;
    end
    base[0] = 32'h0;
    base[1] = 32'h0100_0000;
    mc_boot_pc = base;
    repeat (2) @(negedge clk);
    spm_rst_n = 1;
    mc_rst_n  = 1;

    // ================= sequential machine: reference program
    sm = new(1'b0, 28);
    doc_program(0, 8'h00, prog);
    for (int i = 0; i < 70; i++) begin s_pm(word_t'(4 * i), 32'h0100_0000); sm.pm[word_t'(4 * i)] = 32'h0100_0000; end
    foreach (prog[i]) begin s_pm(prog[i].addr, prog[i].data); sm.pm[prog[i].addr] = prog[i].data; end
    for (int i = 0; i < 8; i++) begin s_dm(word_t'(i), 0); sm.dm[word_t'(i)] = 0; end
    s_dm(1, 6); sm.dm[1] = 6;
    s_dm(2, 5); sm.dm[2] = 5;
    for (int i = 0; i < 32; i++) s_reg(field_t'(i), 0);
    s_reg(1, 1);    sm.regs[1] = 1;
    s_reg(13, 252); sm.regs[13] = 252;
    s_reg(17, 56);  sm.regs[17] = 56;
    while (!sm.halted()) sm.step();
    @(negedge clk); spm_rst_n = 0;
    @(negedge clk); spm_rst_n = 1; spm_run = 1;
    clocks = 0;
    while (spm_pc != 56 && clocks < 100) begin @(negedge clk); clocks++; end
    spm_run = 0;
    expect_eq("spm: clocks to halt", clocks, 16);
    for (int i = 0; i < 32; i++) s_chk($sformatf("spm R%0d", i), field_t'(i), sm.regs[i]);
    s_chk("spm R5", 5, 160);
    s_chk("spm R16", 16, 30);
    spm_dm_raddr = 5; #1; expect_eq("spm DM[5]", spm_dm_rdata, 160);

    // ================= sequential machine: loop
    sm = new(1'b0, 28);
    gen_loop(0, 8'h00, 30, prog, regs);
    foreach (prog[i]) s_pm(prog[i].addr, prog[i].data);
    foreach (regs[i]) s_reg(regs[i].r, regs[i].v);
    @(negedge clk); spm_rst_n = 0;
    @(negedge clk); spm_rst_n = 1; spm_run = 1;
    repeat (200) @(negedge clk);
    spm_run = 0;
    spm_dm_raddr = 0; #1; expect_eq("spm loop total", spm_dm_rdata, 90);
    expect_eq("spm loop halted", spm_pc, 24);

    // ================= dual-core: reference program on both cores
    for (int i = 0; i < 8; i++) m_dm(word_t'(i), 0);
    m_dm(1, 6);
    m_dm(2, 5);
    for (int c = 0; c < 2; c++) begin
      mm[c] = new(1'b1, 28);
      doc_program(base[c], 8'h01, prog);
      for (int i = 0; i < 70; i++) begin m_pm(base[c] + word_t'(4 * i), 0); mm[c].pm[base[c] + word_t'(4 * i)] = 0; end
      foreach (prog[i]) begin m_pm(prog[i].addr, prog[i].data); mm[c].pm[prog[i].addr] = prog[i].data; end
      mm[c].dm[1] = 6;
      mm[c].dm[2] = 5;
      for (int i = 0; i < 32; i++) m_reg(c, field_t'(i), 0);
      m_reg(c, 1, 1);               mm[c].regs[1] = 1;
      m_reg(c, 13, base[c] + 252);  mm[c].regs[13] = base[c] + 252;
      m_reg(c, 17, base[c] + 56);   mm[c].regs[17] = base[c] + 56;
      mm[c].pc = base[c];
      while (!mm[c].halted()) mm[c].step();
    end
    m_go(40);
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 32; i++) m_chk($sformatf("core%0d R%0d", c, i), c, field_t'(i), mm[c].regs[i]);
      expect_eq($sformatf("core%0d halted", c), mc_pc[c], mm[c].pc + 4);
    end
    m_chk_dm("shared DM[5]", 5, 160);

    // ================= dual-core: loops with private totals
    for (int c = 0; c < 2; c++) begin
      gen_loop(base[c], 8'h01, 10 + 5 * c, prog, regs);
      prog[5].data = ins(8'h08, 0, 29, 27);       // DM[R29] = R27
      foreach (prog[i]) m_pm(prog[i].addr, prog[i].data);
      foreach (regs[i]) m_reg(c, regs[i].r, regs[i].v);
      m_reg(c, 29, 32'h0020_0000 + word_t'(c));
    end
    m_go(200);
    m_chk_dm("core0 loop total", 32'h0020_0000, 30);
    m_chk_dm("core1 loop total", 32'h0020_0001, 45);

    // ================= dual-core: same-word stores
    for (int c = 0; c < 2; c++) begin
      m_reg(c, 2, 32'h0030_0000);
      m_reg(c, 3, 32'hC0DE_0000 + word_t'(c));
      m_reg(c, 15, base[c] + 4);
      m_pm(base[c],     ins(8'h08, 2, 0, 3));
      m_pm(base[c] + 4, ins(8'h0B, 0, 0, 15));
    end
    m_go(10);
    m_chk_dm("collision winner", 32'h0030_0000, 32'hC0DE_0001);

    // ================= mechanisms
    checks++;
    if (n_spm_retired == 0 || n_spm_taken == 0 || n_spm_not_taken == 0 || n_coll == 0 ||
        n_stall[0] == 0 || n_stall[1] == 0 || n_taken[0] == 0 || n_taken[1] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("spm: retired %0d, taken %0d, not taken %0d", n_spm_retired, n_spm_taken, n_spm_not_taken);
    for (int c = 0; c < 2; c++)
      $display("core%0d: executed %0d, bubbles %0d, redirects %0d", c, n_exec[c], n_stall[c], n_taken[c]);
    $display("shared data memory collisions %0d", n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
