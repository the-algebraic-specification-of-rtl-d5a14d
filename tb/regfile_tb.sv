// regfile_tb: random writes and reads of the register bank against a shadow
// copy kept here. Checks that register 0 always reads 0 whatever is written
// to it, that a read in the cycle of a write to the same register returns the
// old value, and that the new value is visible one cycle later.
module regfile_tb;
  import amp_pkg::*;

  localparam int NR = 3;
  logic   clk = 0;
  logic   we;
  field_t waddr;
  word_t  wdata;
  field_t raddr [NR];
  word_t  rdata [NR];
  word_t  shadow [NREGS];
  int     checks = 0, failures = 0;

  regfile #(.NR(NR)) dut (.*);

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
    we = 0; waddr = 0; wdata = 0;
    foreach (raddr[i]) raddr[i] = 0;
    // initialise every register
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      we = 1; waddr = field_t'(i); wdata = $urandom;
      shadow[i] = (i == 0) ? 32'd0 : wdata;
    end
    @(negedge clk);
    we = 0;
    // read back all through every port
    for (int i = 0; i < NREGS; i++) begin
      foreach (raddr[p]) raddr[p] = field_t'(i);
      #1;
      foreach (rdata[p]) expect_eq($sformatf("readback r%0d p%0d", i, p), rdata[p], shadow[i]);
    end
    // random traffic, reads sampled before the edge
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 9) == 0) ? field_t'(0) : field_t'($urandom);
      wdata = $urandom;
      foreach (raddr[p]) raddr[p] = ($urandom_range(0, 3) == 0) ? waddr : field_t'($urandom);
      #1;
      foreach (rdata[p]) expect_eq("read before write", rdata[p], shadow[raddr[p]]);
      @(posedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
      #1;
      foreach (rdata[p]) expect_eq("read after write", rdata[p], shadow[raddr[p]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
