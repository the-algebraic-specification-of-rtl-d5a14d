// word_mem: a word-addressed memory of 2^AW 32-bit words, used both as
// program memory and as data memory.
//
// NR asynchronous read ports and NW synchronous write ports. Every address
// names one whole word. All write ports are applied at the same clock edge;
// when two ports write the same word in one cycle, the higher-numbered port
// wins. A read returns the contents before the writes of the current cycle.
//
// The design addresses 2^32 words. Arrays of 2^29 or more elements are
// rejected by the simulator, so AW defaults to 28 and callers use the low AW
// bits of an address: higher addresses alias onto lower ones.
module word_mem
  import amp_pkg::*;
#(
  parameter int unsigned AW = 28,
  parameter int unsigned NR = 1,
  parameter int unsigned NW = 1
) (
  input  logic          clk,
  input  logic          we    [NW],
  input  logic [AW-1:0] waddr [NW],
  input  word_t         wdata [NW],
  input  logic [AW-1:0] raddr [NR],
  output word_t         rdata [NR]
);

  word_t mem [longint'(1) << AW];

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NW; p++) begin
      if (we[p]) mem[waddr[p]] <= wdata[p];
    end
  end

  for (genvar i = 0; i < NR; i++) begin : g_rd
    assign rdata[i] = mem[raddr[i]];
  end

endmodule
