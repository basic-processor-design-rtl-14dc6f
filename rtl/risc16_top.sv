// risc16_top: non-pipelined 16-bit load/store RISC processor with its memory.
//
// Every instruction completes in one clock cycle. In that cycle the word at
// PC is fetched from the unified memory, decoded, its registers are read, the
// ALU computes either the arithmetic/logic result or the address Rs1 + Op2
// (LD, ST, JMPL), a load reads memory, and on the rising clock edge the PC,
// Rd, the C/Z flags and (for ST) memory are updated together. Op2 is Rs2 or
// the sign-extended simm7, selected by instruction bit 7. Rd receives, by
// instruction: the ALU result, the loaded word, simm10 << 6 (SETHI), or the
// address of the executing instruction (BAL, JMPL: the link). With R0 as
// link, BAL is a plain relative branch; JMPL Rs1+1 returns to the instruction
// after a BAL that linked to Rs1.
//
// The instruction set (formats, opcodes, semantics, flag rules, R0 hard-wired
// to zero, 16-bit words) is the one the design implements as given; the
// single-cycle organisation, the unified memory and the loader port are this
// design's choices.
//
// Loader port: while rst is high the core is held (PC = 0, R1..R3 and flags
// cleared) and the memory's data port belongs to ext_*: ext_we writes
// ext_wdata to ext_addr on a rising edge, ext_rdata shows the word at
// ext_addr. Releasing rst starts execution at address 0.
module risc16_top
  import risc16_pkg::*;
#(
  parameter int unsigned MEM_AW = 16   // memory address bits
) (
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  // memory loader / inspector, used while rst is high
  input  logic  ext_we,
  input  word_t ext_addr,
  input  word_t ext_wdata,
  output word_t ext_rdata,
  // status
  output word_t pc,           // address of the executing instruction
  output word_t instr,        // the executing instruction
  output logic  flag_c,
  output logic  flag_z
);

  reg_addr_t rd, rs1, rs2;
  word_t     simm7, simm10;
  ctrl_t     ctrl;

  word_t     rs1_val, rs2_val, rd_val;
  word_t     op2, alu_y;
  logic      alu_c, alu_z, taken;
  word_t     wb_val;

  word_t     mem_addr, mem_rdata, mem_wdata;
  logic      mem_we;

  risc16_decoder u_dec (
    .instr (instr),
    .rd    (rd),
    .rs1   (rs1),
    .rs2   (rs2),
    .simm7 (simm7),
    .simm10(simm10),
    .ctrl  (ctrl)
  );

  risc16_regfile u_rf (
    .clk   (clk),
    .rst   (rst),
    .raddr1(rs1),
    .rdata1(rs1_val),
    .raddr2(rs2),
    .rdata2(rs2_val),
    .raddr3(rd),
    .rdata3(rd_val),
    .we    (ctrl.reg_we && !rst),
    .waddr (rd),
    .wdata (wb_val)
  );

  assign op2 = ctrl.use_imm ? simm7 : rs2_val;

  risc16_alu u_alu (
    .op (ctrl.alu_op),
    .a  (rs1_val),
    .b  (op2),
    .cin(flag_c),
    .y  (alu_y),
    .c  (alu_c),
    .z  (alu_z)
  );

  risc16_flags u_flags (
    .clk  (clk),
    .rst  (rst),
    .we   (ctrl.flags_we),
    .c_in (alu_c),
    .z_in (alu_z),
    .cond (ctrl.cond),
    .c    (flag_c),
    .z    (flag_z),
    .taken(taken)
  );

  risc16_pc u_pc (
    .clk    (clk),
    .rst    (rst),
    .sel    (ctrl.pc_sel),
    .taken  (taken),
    .offset (simm10),
    .target (alu_y),
    .pc     (pc),
    .pc_next()
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wb_val = alu_y;
      WB_MEM:  wb_val = mem_rdata;
      WB_HI:   wb_val = simm10 << (XLEN - SIMM_L);
      WB_LINK: wb_val = pc;
      default: wb_val = alu_y;
    endcase
  end

  // the loader owns the data port while the core is held in reset
  assign mem_addr  = rst ? ext_addr  : alu_y;
  assign mem_wdata = rst ? ext_wdata : rd_val;
  assign mem_we    = rst ? ext_we    : ctrl.mem_we;
  assign ext_rdata = mem_rdata;

  risc16_mem #(.AW(MEM_AW)) u_mem (
    .clk  (clk),
    .iaddr(pc),
    .idata(instr),
    .daddr(mem_addr),
    .rdata(mem_rdata),
    .we   (mem_we),
    .wdata(mem_wdata)
  );

endmodule
