// risc16_mem: unified word-addressed memory for program and data.
//
// 2^AW words of 16 bits. The fetch port reads the instruction at iaddr; the
// data port reads daddr for LD and, on the rising clock edge when we is high,
// writes wdata to daddr for ST. Both reads are asynchronous, so the core can
// fetch, decode, execute and load in one clock cycle. The instruction set
// only speaks of mem(address) for loads and stores; one shared address space
// for instructions and data, word (not byte) addressing, the 16-bit address
// (the full range of Rs1 + Op2) and asynchronous reads are this design's
// choices. Only the upper address bits above AW are ignored when AW < 16.
module risc16_mem
  import risc16_pkg::*;
#(
  parameter int unsigned AW = 16    // address bits: 2^AW words
) (
  input  logic  clk,
  // instruction fetch
  input  word_t iaddr,
  output word_t idata,
  // load / store
  input  word_t daddr,
  output word_t rdata,
  input  logic  we,
  input  word_t wdata
);

  word_t mem [0:(1<<AW)-1];

  logic [AW-1:0] ia, da;
  assign ia = iaddr[AW-1:0];
  assign da = daddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[da] <= wdata;
  end

  assign idata = mem[ia];
  assign rdata = mem[da];

endmodule
