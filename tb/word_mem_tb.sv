// word_mem_tb: a small memory (AW = 8) with two read and two write ports.
// Random writes and reads are compared with a shadow array kept here,
// including both ports writing the same word in one cycle (port 1 must win)
// and reads in the cycle of a write (old contents).
module word_mem_tb;
  import amp_pkg::*;

  localparam int AW = 8, NR = 2, NW = 2;
  logic          clk = 0;
  logic          we    [NW];
  logic [AW-1:0] waddr [NW];
  word_t         wdata [NW];
  logic [AW-1:0] raddr [NR];
  word_t         rdata [NR];
  word_t         shadow [1 << AW];
  int            checks = 0, failures = 0, collisions = 0;

  word_mem #(.AW(AW), .NR(NR), .NW(NW)) dut (.*);

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
    foreach (we[p]) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    foreach (raddr[p]) raddr[p] = 0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      we[0] = 1; waddr[0] = AW'(i); wdata[0] = $urandom;
      shadow[i] = wdata[0];
    end
    @(negedge clk);
    we[0] = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      foreach (we[p]) begin
        we[p] = $urandom_range(0, 1);
        waddr[p] = AW'($urandom);
        wdata[p] = $urandom;
      end
      if ($urandom_range(0, 4) == 0) waddr[1] = waddr[0];
      foreach (raddr[p]) raddr[p] = ($urandom_range(0, 2) == 0) ? waddr[p] : AW'($urandom);
      #1;
      foreach (rdata[p]) expect_eq("read before write", rdata[p], shadow[raddr[p]]);
      if (we[0] && we[1] && waddr[0] == waddr[1]) collisions++;
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      #1;
      foreach (rdata[p]) expect_eq("read after write", rdata[p], shadow[raddr[p]]);
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL no same-word double write was exercised");
    end
    $display("same-word double writes: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
