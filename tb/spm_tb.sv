// spm_tb: runs programs on the sequential machine (memories cut to 2^12
// words) and compares the final registers and data memory with the
// reference model, plus hand-worked values for the reference program.
//
//   0. the two-instruction add-and-store example (R6 = 4, DM[4] = 4)
//   1. reference program: must reach its halt after exactly 16 clocks (one
//      instruction per clock); R5 = 160, DM[5] = 160, R7 = 25, R12 = 52 ...
//   2. three random straight-line programs of 150 instructions
//   3. a counting loop of 20 passes (JMP taken and not taken)
// Host writes while run is high must be ignored: checked once.
module spm_tb;
  import amp_pkg::*;
  import amp_tb_pkg::*;

  localparam int unsigned PAW = 12, DAW = 12;

  logic           clk = 0, rst_n = 0, run = 0;
  logic           host_pm_we = 0, host_dm_we = 0, host_reg_we = 0;
  logic [PAW-1:0] host_pm_addr = '0;
  logic [DAW-1:0] host_dm_addr = '0, host_dm_raddr = '0;
  word_t          host_pm_wdata = '0, host_dm_wdata = '0, host_reg_wdata = '0;
  field_t         host_reg_addr = '0, host_reg_raddr = '0;
  word_t          host_dm_rdata, host_reg_rdata, pc;
  logic           retired, taken;
  int             checks = 0, failures = 0, n_taken = 0, n_retired = 0;

  spm #(.PAW(PAW), .DAW(DAW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (taken)   n_taken++;
    if (retired) n_retired++;
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr_pm(word_t byte_addr, word_t d);
    @(negedge clk);
    host_pm_we = 1; host_pm_addr = byte_addr[PAW+1:2]; host_pm_wdata = d;
    @(negedge clk);
    host_pm_we = 0;
  endtask

  task automatic wr_dm(word_t a, word_t d);
    @(negedge clk);
    host_dm_we = 1; host_dm_addr = a[DAW-1:0]; host_dm_wdata = d;
    @(negedge clk);
    host_dm_we = 0;
  endtask

  task automatic wr_reg(field_t r, word_t d);
    @(negedge clk);
    host_reg_we = 1; host_reg_addr = r; host_reg_wdata = d;
    @(negedge clk);
    host_reg_we = 0;
  endtask

  task automatic chk_reg(string what, field_t r, word_t exp);
    host_reg_raddr = r;
    #1;
    expect_eq(what, host_reg_rdata, exp);
  endtask

  // load a program and register presets into both DUT and model; clears
  // registers 0..63, program words 0..127 and data words 0..127 first
  task automatic load(isa_model m, pm_word_t prog[$], reg_init_t regs[$], bit rand_dm);
    for (int i = 0; i < 128; i++) begin
      wr_pm(word_t'(4 * i), 32'h0100_0000);      // unused opcode: no operation
      m.pm[word_t'(4 * i)] = 32'h0100_0000;
    end
    for (int i = 0; i < 128; i++) begin
      word_t d;
      d = rand_dm ? $urandom : 32'd0;
      wr_dm(word_t'(i), d);
      m.dm[word_t'(i)] = d;
    end
    for (int i = 0; i < 64; i++) begin
      wr_reg(field_t'(i), 0);
      m.regs[i] = 0;
    end
    foreach (prog[i]) begin
      wr_pm(prog[i].addr, prog[i].data);
      m.pm[prog[i].addr] = prog[i].data;
    end
    foreach (regs[i]) begin
      wr_reg(regs[i].r, regs[i].v);
      m.regs[regs[i].r] = regs[i].v;
    end
  endtask

  // reset, run until the model halts, compare; returns clocks used
  task automatic run_cmp(isa_model m, string name, output int clocks);
    int steps;
    steps = 0;
    m.pc = 0;
    while (!m.halted() && steps < 10000) begin m.step(); steps++; end
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1; run = 1;
    clocks = 0;
    while (!(pc == m.pc && clocks > 0 && dut.ir[31:24] == 8'h0B) && clocks < 20000) begin
      @(negedge clk);
      clocks++;
    end
    run = 0;
    expect_eq({name, " final pc"}, pc, m.pc);
    for (int i = 0; i < 64; i++)
      chk_reg($sformatf("%s R%0d", name, i), field_t'(i), m.regs[i]);
    for (int i = 0; i < 128; i++) begin
      host_dm_raddr = DAW'(i);
      #1;
      expect_eq($sformatf("%s DM[%0d]", name, i), host_dm_rdata, m.dm[word_t'(i)]);
    end
    checks++;
    if (clocks != steps) begin
      failures++;
      $display("FAIL %s: %0d clocks for %0d instructions", name, clocks, steps);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model  m;
    pm_word_t  prog[$];
    reg_init_t regs[$];
    int        clocks;

    repeat (2) @(negedge clk);
    rst_n = 1;

    // 0. two-instruction example: R1 = 1, R2 = 3; ADD R6 = R1 + R2, then
    //    ST DM[R1 + R2] = R6, then halt. Expected R6 = 4, DM[4] = 4.
    m = new(1'b0, DAW);
    prog.delete();
    prog.push_back('{32'd0, ins(8'h00, 1, 2, 6)});
    prog.push_back('{32'd4, ins(8'h08, 1, 2, 6)});
    prog.push_back('{32'd8, ins(8'h0B, 0, 0, 17)});
    regs.delete();
    regs.push_back('{8'd1, 32'd1});
    regs.push_back('{8'd2, 32'd3});
    regs.push_back('{8'd17, 32'd8});
    load(m, prog, regs, 1'b0);
    run_cmp(m, "example", clocks);
    expect_eq("example clocks", clocks, 2);
    chk_reg("example R6", 6, 4);
    host_dm_raddr = 4; #1;
    expect_eq("example DM[4]", host_dm_rdata, 4);

    // 1. reference program
    m = new(1'b0, DAW);
    doc_program(0, 8'h00, prog);
    regs.delete();
    regs.push_back('{8'd1, 32'd1});
    regs.push_back('{8'd2, 32'd0});
    regs.push_back('{8'd13, 32'd252});
    regs.push_back('{8'd17, 32'd56});
    load(m, prog, regs, 1'b0);
    wr_dm(1, 6);  m.dm[1] = 6;
    wr_dm(2, 5);  m.dm[2] = 5;
    run_cmp(m, "reference", clocks);
    expect_eq("reference clocks", clocks, 16);
    chk_reg("R3", 3, 5);
    chk_reg("R4", 4, 5);
    chk_reg("R5", 5, 160);
    chk_reg("R6", 6, 10);
    chk_reg("R7", 7, 25);
    chk_reg("R8", 8, 5);
    chk_reg("R9", 9, 5);
    chk_reg("R10", 10, 32'hFFFF_FFFA);
    chk_reg("R11", 11, 0);
    chk_reg("R12", 12, 52);
    chk_reg("R14", 14, 10);
    chk_reg("R15", 15, 260);
    chk_reg("R16", 16, 30);
    host_dm_raddr = 5; #1;
    expect_eq("DM[5]", host_dm_rdata, 160);

    // host writes are ignored while running
    @(negedge clk); run = 1; host_reg_we = 1; host_reg_addr = 3; host_reg_wdata = 32'hDEAD;
    @(negedge clk); run = 0; host_reg_we = 0;
    chk_reg("host write ignored while running", 3, 5);

    // 2. random programs
    for (int t = 0; t < 3; t++) begin
      m = new(1'b0, DAW);
      gen_random(0, 8'h00, 150, prog, regs);
      load(m, prog, regs, 1'b1);
      run_cmp(m, $sformatf("random%0d", t), clocks);
    end

    // 3. loop
    m = new(1'b0, DAW);
    gen_loop(0, 8'h00, 20, prog, regs);
    load(m, prog, regs, 1'b0);
    run_cmp(m, "loop", clocks);
    host_dm_raddr = 0; #1;
    expect_eq("loop total", host_dm_rdata, 60);

    checks++;
    if (n_taken < 20) begin failures++; $display("FAIL too few taken JMPs: %0d", n_taken); end
    $display("retired %0d, taken %0d", n_retired, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
