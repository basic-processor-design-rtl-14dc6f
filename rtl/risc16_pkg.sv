// risc16_pkg: shared constants and types of the 16-bit load/store RISC.
//
// The instruction word is 16 bits. It holds a 4-bit opcode in [15:12] and
// a 2-bit destination field in [11:10], followed by one of three layouts:
//   A0  rs1[9:8]  0 at [7]  rs2[6:5]  zeros[4:0]
//   A1  rs1[9:8]  1 at [7]  simm7[6:0]
//   B   simm10[9:0]                (SETHI, BAL)
//   C   simm10[9:0], field [11:10] is the branch condition (BEQ/BNE/BCS/BCC)
// Field widths (n = 2 register bits, s = 7, l = 10, x = 4) and the opcode map
// are those of the instruction set this core implements. Packing the opcode
// values into an enum and the choice of 16-bit data words follow from the
// 16-bit instruction length; the datapath types are this design's own.
package risc16_pkg;

  localparam int unsigned XLEN   = 16;   // data and instruction word width
  localparam int unsigned NREG   = 2;    // n: register address bits
  localparam int unsigned SIMM_S = 7;    // s: short immediate bits
  localparam int unsigned SIMM_L = 10;   // l: long immediate bits
  localparam int unsigned OPC_W  = 4;    // x: opcode bits

  typedef logic [XLEN-1:0] word_t;
  typedef logic [NREG-1:0] reg_addr_t;

  // Opcode map (Op[3:2] selects the row, Op[1:0] the column).
  typedef enum logic [OPC_W-1:0] {
    OP_ADD   = 4'b0000,
    OP_ADDX  = 4'b0001,
    OP_OR    = 4'b0010,
    OP_AND   = 4'b0011,
    OP_SUB   = 4'b0100,
    OP_SUBX  = 4'b0101,
    OP_LSR   = 4'b0110,
    OP_XOR   = 4'b0111,
    OP_SETHI = 4'b1000,
    OP_RSV9  = 4'b1001,   // unassigned
    OP_BAL   = 4'b1010,
    OP_BCOND = 4'b1011,
    OP_LD    = 4'b1100,
    OP_ST    = 4'b1101,
    OP_JMPL  = 4'b1110,
    OP_RSVF  = 4'b1111    // unassigned
  } opcode_e;

  // Branch condition, carried in the rd field of a format C instruction.
  typedef enum logic [1:0] {
    CC_EQ = 2'b00,   // BEQ: Z == 1
    CC_NE = 2'b01,   // BNE: Z == 0
    CC_CS = 2'b10,   // BCS: C == 1
    CC_CC = 2'b11    // BCC: C == 0
  } cond_e;

  // ALU function. For the eight arithmetic/logic opcodes the ALU function
  // equals Op[2:0], so decoding is a plain field copy.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,
    ALU_ADDX = 3'b001,
    ALU_OR   = 3'b010,
    ALU_AND  = 3'b011,
    ALU_SUB  = 3'b100,
    ALU_SUBX = 3'b101,
    ALU_LSR  = 3'b110,
    ALU_XOR  = 3'b111
  } alu_op_e;

  // Source of the value written to Rd.
  typedef enum logic [1:0] {
    WB_ALU  = 2'b00,   // ALU result
    WB_MEM  = 2'b01,   // loaded word
    WB_HI   = 2'b10,   // simm10 << 6 (SETHI)
    WB_LINK = 2'b11    // PC of the executing instruction (BAL, JMPL)
  } wb_sel_e;

  // Next program counter.
  typedef enum logic [1:0] {
    PC_SEQ  = 2'b00,   // PC + 1
    PC_REL  = 2'b01,   // PC + simm10 (BAL, or a taken Bcond)
    PC_COND = 2'b10,   // PC + simm10 if the condition holds, else PC + 1
    PC_ABS  = 2'b11    // Rs1 + Op2 (JMPL)
  } pc_sel_e;

  // Control word produced by the decoder for one instruction.
  typedef struct packed {
    alu_op_e   alu_op;     // ALU function
    logic      use_imm;    // Op2 is simm7 rather than Rs2
    logic      reg_we;     // write Rd
    wb_sel_e   wb_sel;     // what is written to Rd
    logic      flags_we;   // update C and Z from the ALU
    logic      mem_we;     // store Rd at Rs1 + Op2
    pc_sel_e   pc_sel;     // next-PC choice
    cond_e     cond;       // branch condition (format C)
  } ctrl_t;

endpackage
