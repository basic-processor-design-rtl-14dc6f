// risc16_alu: the arithmetic/logic unit of the 16-bit RISC.
//
// Eight functions on a 16-bit Rs1 operand a and Op2 operand b:
//   ADD  a + b          ADDX a + b + C
//   SUB  a - b          SUBX a - b - C
//   AND  a & b          OR   a | b
//   XOR  a ^ b          LSR  a >> 1 (b unused)
// The instruction set fixes these functions and says that every one updates
// the flags: Z is set when the result is zero; C comes from ADD/ADDX/SUB/SUBX/
// LSR and is cleared by AND/OR/XOR. How C is formed is this design's choice,
// following the SPARC convention the instruction set is modelled on: carry out
// for additions, borrow (a < b + cin, unsigned) for subtractions, so that
// SUBX chains a multi-word subtraction; and the bit shifted out for LSR.
// There is no shift-left function: a value is doubled by adding it to itself.
//
// Purely combinational. cin is the current C flag; c and z are the new flags,
// used only when the instruction updates them.
module risc16_alu
  import risc16_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    cin,     // current carry/borrow flag
  output word_t   y,
  output logic    c,       // new carry/borrow flag
  output logic    z        // new zero flag
);

  logic [XLEN:0] sum;      // a + b + carry-in, with carry out
  logic [XLEN:0] diff;     // a - b - borrow-in, with borrow out
  logic          ci;

  // carry (or borrow) in is used only by the X variants
  assign ci   = (op == ALU_ADDX || op == ALU_SUBX) ? cin : 1'b0;
  assign sum  = {1'b0, a} + {1'b0, b} + {{XLEN{1'b0}}, ci};
  assign diff = {1'b0, a} - {1'b0, b} - {{XLEN{1'b0}}, ci};

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_ADDX: {c, y} = sum;
      ALU_SUB, ALU_SUBX: {c, y} = diff;    // diff[XLEN] is the borrow
      ALU_AND:           {c, y} = {1'b0, a & b};
      ALU_OR:            {c, y} = {1'b0, a | b};
      ALU_XOR:           {c, y} = {1'b0, a ^ b};
      ALU_LSR:           {c, y} = {a[0], 1'b0, a[XLEN-1:1]};
      default:           {c, y} = sum;
    endcase
  end

  assign z = (y == '0);

endmodule
