// fetch_unit_tb: the fetch unit against a cycle model kept here. Program
// memory is a 256-word array answering pm_addr combinationally, filled with
// random instructions whose register fields are 0..3 so that read-after-
// write hazards are frequent. Each clock the testbench may raise redirect
// with a random target. Checked every clock: PC, CIR, PIR and stall, for an
// interlocked unit and for one built with INTERLOCK = 0 (which must never
// stall), plus reset to boot_pc and holding while run is low.
module fetch_unit_tb;
  import amp_pkg::*;

  logic  clk = 0, rst_n = 0, run = 0;
  word_t boot_pc = 32'h40;
  logic  redirect = 0;
  word_t target = '0;
  word_t pm_addr, pm_rdata, pc, cir, pir;
  logic  stall;
  word_t pm_addr_b, pm_rdata_b, pc_b, cir_b, pir_b;
  logic  stall_b;
  word_t prog [256];
  int    checks = 0, failures = 0, n_stall = 0, n_redirect = 0;

  fetch_unit #(.INTERLOCK(1'b1)) dut (.clk, .rst_n, .run, .boot_pc, .redirect, .target,
    .pm_addr, .pm_rdata, .pc, .cir, .pir, .stall);
  fetch_unit #(.INTERLOCK(1'b0)) dut_b (.clk, .rst_n, .run, .boot_pc, .redirect(1'b0), .target,
    .pm_addr(pm_addr_b), .pm_rdata(pm_rdata_b), .pc(pc_b), .cir(cir_b), .pir(pir_b), .stall(stall_b));

  assign pm_rdata   = prog[pm_addr[9:2]];
  assign pm_rdata_b = prog[pm_addr_b[9:2]];

  always #5 clk = ~clk;

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // registers read: bit mask over 0..3; written: register number or 0
  function automatic logic [3:0] reads(word_t w);
    logic [3:0] m;
    m = '0;
    case (w[31:24])
      8'h01, 8'h02, 8'h03, 8'h04, 8'h06, 8'h07, 8'h09, 8'h0A: begin m[w[17:16]] = 1; m[w[9:8]] = 1; end
      8'h05: m[w[17:16]] = 1;
      8'h08: begin m[w[17:16]] = 1; m[w[9:8]] = 1; m[w[1:0]] = 1; end
      8'h0B: begin m[w[17:16]] = 1; m[w[1:0]] = 1; end
      default: ;
    endcase
    return m;
  endfunction
  function automatic int writes(word_t w);
    case (w[31:24])
      8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h09, 8'h0A: return int'(w[1:0]);
      8'h0B: return int'(w[9:8]);
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e_pc, e_cir, e_pir, eb_pc, eb_cir, eb_pir;
    logic  e_stall;
    int    d;
    foreach (prog[i])
      prog[i] = {8'($urandom_range(0, 12)), 6'd0, 2'($urandom), 6'd0, 2'($urandom), 6'd0, 2'($urandom)};
    @(negedge clk);
    @(negedge clk);
    expect_eq("reset pc", pc, 32'h40);
    expect_eq("reset cir", cir, 0);
    expect_eq("reset pir", pir, 0);
    rst_n = 1;
    @(negedge clk);
    expect_eq("held while run low", pc, 32'h40);
    e_pc = 32'h40; e_cir = 0; e_pir = 0;
    eb_pc = 32'h40; eb_cir = 0; eb_pir = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      run = ($urandom_range(0, 9) != 0);
      d = writes(e_pir);
      e_stall = run && d != 0 && reads(e_cir)[d];
      redirect = run && !e_stall && ($urandom_range(0, 5) == 0);
      target = {22'd0, 8'($urandom), 2'b00};
      #1;
      expect_eq("stall", stall, e_stall);
      expect_eq("no-interlock stall", stall_b, 0);
      if (stall) n_stall++;
      if (redirect) n_redirect++;
      if (run) begin
        if (e_stall) e_pir = 0;
        else if (redirect) begin
          e_pir = e_cir; e_cir = prog[target[9:2]]; e_pc = target + 4;
        end else begin
          e_pir = e_cir; e_cir = prog[e_pc[9:2]]; e_pc = e_pc + 4;
        end
        eb_pir = eb_cir; eb_cir = prog[eb_pc[9:2]]; eb_pc = eb_pc + 4;
      end
      @(posedge clk);
      #1;
      expect_eq("pc", pc, e_pc);
      expect_eq("cir", cir, e_cir);
      expect_eq("pir", pir, e_pir);
      expect_eq("b pc", pc_b, eb_pc);
      expect_eq("b cir", cir_b, eb_cir);
      expect_eq("b pir", pir_b, eb_pir);
    end
    checks++;
    if (n_stall == 0 || n_redirect == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("stalls %0d, redirects %0d", n_stall, n_redirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
