// regfile: the general register bank, 2^8 registers of 32 bits.
//
// NR asynchronous read ports and one synchronous write port. Register 0 is
// fixed at zero: reads of it return 0 and writes to it are dropped. A read in
// the same cycle as a write to the same register returns the old value; the
// new value is visible from the next cycle. That write-then-read timing is
// what the pipelined core's interlock relies on.
//
// The register count and the fixed zero register follow the design; the
// number of read ports and the read/write timing are this implementation's.
module regfile
  import amp_pkg::*;
#(
  parameter int unsigned NR = 3
) (
  input  logic   clk,
  input  logic   we,
  input  field_t waddr,
  input  word_t  wdata,
  input  field_t raddr [NR],
  output word_t  rdata [NR]
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && waddr != '0) regs[waddr] <= wdata;
  end

  for (genvar i = 0; i < NR; i++) begin : g_rd
    assign rdata[i] = (raddr[i] == '0) ? CONST_ZERO : regs[raddr[i]];
  end

endmodule
