// risc16_regfile: general-purpose register file, R0..R3 of 16 bits.
//
// With n = 2 register address bits there are three real registers and the
// dummy register R0, which always reads as zero; writes to R0 are discarded.
// Three asynchronous read ports serve Rs1, Rs2 and Rd (Rd is read as the data
// source of ST). The write port stores wdata into waddr on the rising clock
// edge when we is high. A read in the same cycle as a write returns the old
// value, which a single-cycle core needs. The number of registers and R0
// follow the instruction set; the port arrangement and a synchronous reset
// that clears R1..R3 are this design's choices.
module risc16_regfile
  import risc16_pkg::*;
(
  input  logic      clk,
  input  logic      rst,      // synchronous, active high: clears R1..R3
  input  reg_addr_t raddr1,
  output word_t     rdata1,
  input  reg_addr_t raddr2,
  output word_t     rdata2,
  input  reg_addr_t raddr3,
  output word_t     rdata3,
  input  logic      we,
  input  reg_addr_t waddr,
  input  word_t     wdata
);

  localparam int unsigned NUM = 1 << NREG;

  word_t regs [1:NUM-1];    // R0 is not stored

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NUM; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
  assign rdata3 = (raddr3 == '0) ? '0 : regs[raddr3];

endmodule
