// risc16_pc: program counter and next-PC selection.
//
// The PC holds the word address of the instruction being executed. On each
// rising clock edge it moves to one of:
//   PC_SEQ   PC + 1                       (all non-branching instructions)
//   PC_REL   PC + simm10                  (BAL)
//   PC_COND  PC + simm10 if taken, else PC + 1   (BEQ/BNE/BCS/BCC)
//   PC_ABS   target = Rs1 + Op2           (JMPL)
// simm10 reaches -512..+511 words. The instruction set defines these targets;
// that the offset is counted from the branch instruction's own address, that
// addresses count 16-bit words, and that reset starts execution at address 0
// are this design's choices. Addresses wrap modulo 2^16.
module risc16_pc
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst,       // synchronous, active high: PC <= 0
  input  pc_sel_e sel,
  input  logic    taken,     // condition result for PC_COND
  input  word_t   offset,    // sign-extended simm10
  input  word_t   target,    // Rs1 + Op2 for PC_ABS
  output word_t   pc,
  output word_t   pc_next
);

  word_t pc_seq, pc_rel;

  assign pc_seq = pc + word_t'(1);
  assign pc_rel = pc + offset;

  always_comb begin
    unique case (sel)
      PC_SEQ:  pc_next = pc_seq;
      PC_REL:  pc_next = pc_rel;
      PC_COND: pc_next = taken ? pc_rel : pc_seq;
      PC_ABS:  pc_next = target;
      default: pc_next = pc_seq;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

endmodule
