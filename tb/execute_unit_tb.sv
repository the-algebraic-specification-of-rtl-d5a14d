// execute_unit_tb: the execute unit with a register bank and data memory
// modelled here as arrays answering its read ports combinationally. Random
// instructions of every opcode are applied with random operands; the
// combinational redirect/target/data address and, one clock later, the
// state handed to writeback (result, taken, wbflag, memwbloc, regwbloc) are
// compared with values worked out here. Stall and run low must give a
// bubble and no redirect.
module execute_unit_tb;
  import amp_pkg::*;

  logic      clk = 0, rst_n = 0, run = 0, stall = 0;
  word_t     cir = '0, pc = '0;
  field_t    rf_raddr [3];
  word_t     rf_rdata [3];
  word_t     dm_raddr, dm_rdata, target;
  logic      redirect;
  ex_state_t ex;
  word_t     regs [NREGS];
  word_t     dmem [256];
  int        checks = 0, failures = 0, n_taken = 0;

  execute_unit dut (.*);

  for (genvar i = 0; i < 3; i++) begin : g_rd
    assign rf_rdata[i] = (rf_raddr[i] == 0) ? 32'd0 : regs[rf_raddr[i]];
  end
  assign dm_rdata = dmem[dm_raddr[7:0]];

  always #5 clk = ~clk;

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (cir %h): got %h expected %h", what, cir, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b, c, e_res, e_mloc, e_addr;
    int    e_flag, e_rloc;
    logic  e_taken, e_redirect;
    foreach (regs[i]) regs[i] = (i % 3 == 0) ? 32'd0 : $urandom_range(0, 300);
    foreach (dmem[i]) dmem[i] = $urandom;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      run   = ($urandom_range(0, 15) != 0);
      stall = ($urandom_range(0, 7) == 0);
      cir   = {8'($urandom_range(0, 13)), 8'($urandom_range(0, 20)), 8'($urandom_range(0, 20)),
               8'($urandom_range(0, 20))};
      pc    = $urandom;
      a = (cir[23:16] == 0) ? 0 : regs[cir[23:16]];
      b = (cir[15:8]  == 0) ? 0 : regs[cir[15:8]];
      c = (cir[7:0]   == 0) ? 0 : regs[cir[7:0]];
      e_res = 0; e_mloc = 0; e_flag = 0; e_rloc = 0; e_taken = 0;
      e_addr = a + b;
      case (cir[31:24])
        8'h01: begin e_res = a + b; e_flag = 2; e_rloc = cir[7:0]; end
        8'h02: begin e_res = a * b; e_flag = 2; e_rloc = cir[7:0]; end
        8'h03: begin e_res = a & b; e_flag = 2; e_rloc = cir[7:0]; end
        8'h04: begin e_res = a | b; e_flag = 2; e_rloc = cir[7:0]; end
        8'h05: begin e_res = ~a;    e_flag = 2; e_rloc = cir[7:0]; end
        8'h06: begin e_res = (b > 31) ? 0 : a << b; e_flag = 2; e_rloc = cir[7:0]; end
        8'h07: begin e_res = dmem[e_addr[7:0]]; e_flag = 2; e_rloc = cir[7:0]; end
        8'h08: begin e_res = c; e_flag = 1; e_mloc = e_addr; end
        8'h09: begin e_res = (a == b) ? 0 : 32'hFFFF_FFFF; e_flag = 2; e_rloc = cir[7:0]; end
        8'h0A: begin e_res = (a > b) ? 0 : 32'hFFFF_FFFF; e_flag = 2; e_rloc = cir[7:0]; end
        8'h0B: if (a == 0) begin e_res = pc; e_taken = 1; e_flag = 2; e_rloc = cir[15:8]; end
        default: ;
      endcase
      e_redirect = run && !stall && cir[31:24] == 8'h0B && a == 0;
      #1;
      expect_eq("redirect", redirect, e_redirect);
      if (e_redirect) begin
        expect_eq("target", target, c);
        n_taken++;
      end
      if (cir[31:24] == 8'h07 || cir[31:24] == 8'h08) expect_eq("dm address", dm_raddr, e_addr);
      if (!run || stall) begin
        e_res = 0; e_mloc = 0; e_flag = 0; e_rloc = 0; e_taken = 0;
      end
      @(posedge clk);
      #1;
      expect_eq("wbflag", ex.wbflag, e_flag);
      if (e_flag != 0) expect_eq("result", ex.result, e_res);
      if (e_flag == 1) expect_eq("memwbloc", ex.memwbloc, e_mloc);
      if (e_flag == 2) expect_eq("regwbloc", ex.regwbloc, e_rloc);
      expect_eq("taken", ex.taken, e_taken);
    end
    checks++;
    if (n_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    $display("taken %0d", n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
