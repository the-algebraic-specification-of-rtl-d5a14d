// writeback_unit_tb: applies random execute-unit states and checks that
// register results land in the named register one clock later (register 0
// staying 0), that memory results drive the data memory write port with the
// right address and value while nothing else does, and that host register
// writes are taken only while run is low and no register result is due.
// A shadow register bank kept here is compared through the read ports.
module writeback_unit_tb;
  import amp_pkg::*;

  logic      clk = 0, run = 0;
  ex_state_t ex;
  field_t    rf_raddr [3];
  word_t     rf_rdata [3];
  logic      dm_we;
  word_t     dm_waddr, dm_wdata;
  logic      host_reg_we = 0;
  field_t    host_reg_addr = '0, host_reg_raddr = '0;
  word_t     host_reg_wdata = '0, host_reg_rdata;
  word_t     shadow [NREGS];
  int        checks = 0, failures = 0, n_mem = 0, n_reg = 0, n_host = 0;

  writeback_unit dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    ex = EX_BUBBLE;
    foreach (rf_raddr[i]) rf_raddr[i] = 0;
    // host fills all registers
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      host_reg_we = 1; host_reg_addr = field_t'(i); host_reg_wdata = $urandom;
      shadow[i] = (i == 0) ? 0 : host_reg_wdata;
    end
    @(negedge clk);
    host_reg_we = 0;
    for (int n = 0; n < 4000; n++) begin
      int k;
      @(negedge clk);
      run = ($urandom_range(0, 3) != 0);
      k = $urandom_range(0, 2);
      ex.wbflag   = wbflag_e'(k);
      ex.result   = $urandom;
      ex.memwbloc = $urandom;
      ex.regwbloc = ($urandom_range(0, 9) == 0) ? field_t'(0) : field_t'($urandom);
      ex.taken    = 1'b0;
      host_reg_we    = ($urandom_range(0, 1) == 0);
      host_reg_addr  = field_t'($urandom);
      host_reg_wdata = $urandom;
      host_reg_raddr = ex.regwbloc;
      foreach (rf_raddr[i]) rf_raddr[i] = ($urandom_range(0, 1) == 0) ? host_reg_addr : field_t'($urandom);
      #1;
      expect_eq("dm_we", dm_we, k == 1);
      if (k == 1) begin
        expect_eq("dm_waddr", dm_waddr, ex.memwbloc);
        expect_eq("dm_wdata", dm_wdata, ex.result);
        n_mem++;
      end
      foreach (rf_rdata[i]) expect_eq("read port", rf_rdata[i], shadow[rf_raddr[i]]);
      @(posedge clk);
      if (k == 2) begin
        if (ex.regwbloc != 0) shadow[ex.regwbloc] = ex.result;
        n_reg++;
      end else if (host_reg_we && !run) begin
        if (host_reg_addr != 0) shadow[host_reg_addr] = host_reg_wdata;
        n_host++;
      end
      #1;
      expect_eq("written register", host_reg_rdata, shadow[host_reg_raddr]);
      foreach (rf_rdata[i]) expect_eq("read port after", rf_rdata[i], shadow[rf_raddr[i]]);
    end
    $display("mem %0d reg %0d host %0d", n_mem, n_reg, n_host);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
