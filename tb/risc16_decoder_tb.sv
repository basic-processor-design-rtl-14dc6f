// risc16_decoder_tb: exhaustive self-checking test of the instruction decoder.
//
// Applies all 65536 instruction words. For each it checks the register
// fields, both sign-extended immediates (recomputed as signed integers) and
// the control word against an expectation table written out per opcode from
// the instruction set's opcode map: which instructions write Rd and with
// what, which update the flags, store, or change the PC, and that the ALU
// function of each arithmetic/logic opcode is the one its mnemonic names.
module risc16_decoder_tb;
  import risc16_pkg::*;

  word_t     instr;
  reg_addr_t rd, rs1, rs2;
  word_t     simm7, simm10;
  ctrl_t     ctrl;
  int        checks = 0, failures = 0;

  risc16_decoder dut (.instr(instr), .rd(rd), .rs1(rs1), .rs2(rs2),
                      .simm7(simm7), .simm10(simm10), .ctrl(ctrl));

  // expectation row: reg_we, wb_sel, flags_we, mem_we, pc_sel, alu function
  typedef struct {
    string   mn;
    logic    reg_we;
    wb_sel_e wb;
    logic    fl;
    logic    st;
    pc_sel_e pcs;
    alu_op_e alu;
  } exp_t;

  exp_t tbl [16];

  initial begin
    tbl[4'b0000] = '{"ADD",   1, WB_ALU,  1, 0, PC_SEQ,  ALU_ADD};
    tbl[4'b0001] = '{"ADDX",  1, WB_ALU,  1, 0, PC_SEQ,  ALU_ADDX};
    tbl[4'b0011] = '{"AND",   1, WB_ALU,  1, 0, PC_SEQ,  ALU_AND};
    tbl[4'b0010] = '{"OR",    1, WB_ALU,  1, 0, PC_SEQ,  ALU_OR};
    tbl[4'b0100] = '{"SUB",   1, WB_ALU,  1, 0, PC_SEQ,  ALU_SUB};
    tbl[4'b0101] = '{"SUBX",  1, WB_ALU,  1, 0, PC_SEQ,  ALU_SUBX};
    tbl[4'b0111] = '{"XOR",   1, WB_ALU,  1, 0, PC_SEQ,  ALU_XOR};
    tbl[4'b0110] = '{"LSR",   1, WB_ALU,  1, 0, PC_SEQ,  ALU_LSR};
    tbl[4'b1100] = '{"LD",    1, WB_MEM,  0, 0, PC_SEQ,  ALU_ADD};
    tbl[4'b1101] = '{"ST",    0, WB_ALU,  0, 1, PC_SEQ,  ALU_ADD};
    tbl[4'b1111] = '{"-",     0, WB_ALU,  0, 0, PC_SEQ,  ALU_ADD};
    tbl[4'b1110] = '{"JMPL",  1, WB_LINK, 0, 0, PC_ABS,  ALU_ADD};
    tbl[4'b1000] = '{"SETHI", 1, WB_HI,   0, 0, PC_SEQ,  ALU_ADD};
    tbl[4'b1001] = '{"-",     0, WB_ALU,  0, 0, PC_SEQ,  ALU_ADD};
    tbl[4'b1011] = '{"Bcond", 0, WB_ALU,  0, 0, PC_COND, ALU_ADD};
    tbl[4'b1010] = '{"BAL",   1, WB_LINK, 0, 0, PC_REL,  ALU_ADD};
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL instr=%h %s: got %0d expected %0d", instr, what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    int   s7, s10;
    #1;
    for (int i = 0; i < 65536; i++) begin
      instr = 16'(i);
      #1;
      e = tbl[instr[15:12]];
      s7  = int'(instr[6:0]);  if (s7  >= 64)  s7  -= 128;
      s10 = int'(instr[9:0]);  if (s10 >= 512) s10 -= 1024;
      expect_eq("rd",     int'(rd),  int'(instr[11:10]));
      expect_eq("rs1",    int'(rs1), int'(instr[9:8]));
      expect_eq("rs2",    int'(rs2), int'(instr[6:5]));
      expect_eq("simm7",  int'($signed(simm7)),  s7);
      expect_eq("simm10", int'($signed(simm10)), s10);
      expect_eq({e.mn, " reg_we"},   int'(ctrl.reg_we),   int'(e.reg_we));
      expect_eq({e.mn, " flags_we"}, int'(ctrl.flags_we), int'(e.fl));
      expect_eq({e.mn, " mem_we"},   int'(ctrl.mem_we),   int'(e.st));
      expect_eq({e.mn, " pc_sel"},   int'(ctrl.pc_sel),   int'(e.pcs));
      expect_eq({e.mn, " use_imm"},  int'(ctrl.use_imm),  int'(instr[7]));
      if (e.reg_we) expect_eq({e.mn, " wb_sel"}, int'(ctrl.wb_sel), int'(e.wb));
      if (e.fl || e.mn == "LD" || e.mn == "ST" || e.mn == "JMPL")
        expect_eq({e.mn, " alu_op"}, int'(ctrl.alu_op), int'(e.alu));
      if (e.pcs == PC_COND)
        expect_eq("cond", int'(ctrl.cond), int'(instr[11:10]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
