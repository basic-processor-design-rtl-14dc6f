// risc16_decoder: instruction decoder and control unit of the single-cycle core.
//
// It splits the 16-bit instruction word into its fields (opcode, rd/cond,
// rs1, format bit, rs2), sign-extends the two immediates (simm7 from [6:0],
// simm10 from [9:0]) and produces one control word (risc16_pkg::ctrl_t) for
// the datapath. The field layout, the opcode map, the condition codes and
// which instructions write Rd, update the flags, access memory or change the
// PC follow the instruction set definition. That arithmetic/logic opcodes pass
// Op[2:0] straight to the ALU, that LD/ST/JMPL form their address with the
// ALU adder, and that the two unassigned opcodes (1001, 1111) execute as
// no-operations are this design's choices.
//
// Interface: instr in, fields/immediates/ctrl out. Purely combinational, no
// clock; the result is valid in the same cycle the instruction is fetched.
module risc16_decoder
  import risc16_pkg::*;
(
  input  word_t     instr,     // instruction word
  output reg_addr_t rd,        // destination (or store source) register
  output reg_addr_t rs1,       // first source register
  output reg_addr_t rs2,       // second source register (format A0)
  output word_t     simm7,     // sign-extended short immediate
  output word_t     simm10,    // sign-extended long immediate
  output ctrl_t     ctrl       // control word
);

  opcode_e op;

  assign op     = opcode_e'(instr[15:12]);
  assign rd     = instr[11:10];
  assign rs1    = instr[9:8];
  assign rs2    = instr[6:5];
  assign simm7  = {{(XLEN-SIMM_S){instr[SIMM_S-1]}}, instr[SIMM_S-1:0]};
  assign simm10 = {{(XLEN-SIMM_L){instr[SIMM_L-1]}}, instr[SIMM_L-1:0]};

  always_comb begin
    // defaults: a no-operation that advances the PC
    ctrl          = '0;
    ctrl.alu_op   = ALU_ADD;
    ctrl.use_imm  = instr[7];
    ctrl.wb_sel   = WB_ALU;
    ctrl.pc_sel   = PC_SEQ;
    ctrl.cond     = cond_e'(instr[11:10]);

    unique case (op)
      OP_ADD, OP_ADDX, OP_OR, OP_AND,
      OP_SUB, OP_SUBX, OP_LSR, OP_XOR: begin
        ctrl.alu_op   = alu_op_e'(instr[14:12]);
        ctrl.reg_we   = 1'b1;
        ctrl.flags_we = 1'b1;
      end
      OP_LD: begin
        ctrl.reg_we = 1'b1;
        ctrl.wb_sel = WB_MEM;
      end
      OP_ST: begin
        ctrl.mem_we = 1'b1;
      end
      OP_JMPL: begin
        ctrl.reg_we = 1'b1;
        ctrl.wb_sel = WB_LINK;
        ctrl.pc_sel = PC_ABS;
      end
      OP_SETHI: begin
        ctrl.reg_we = 1'b1;
        ctrl.wb_sel = WB_HI;
      end
      OP_BAL: begin
        ctrl.reg_we = 1'b1;
        ctrl.wb_sel = WB_LINK;
        ctrl.pc_sel = PC_REL;
      end
      OP_BCOND: begin
        ctrl.pc_sel = PC_COND;
      end
      OP_RSV9, OP_RSVF: ;   // unassigned: no-operation
      default: ;
    endcase
  end

endmodule
