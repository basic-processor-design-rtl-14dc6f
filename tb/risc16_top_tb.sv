// risc16_top_tb: end-to-end test of the processor at its default size
// (2^16-word memory), run in lock-step with an instruction-set model.
//
// The model below executes the instruction set from its written semantics
// (register transfer per mnemonic, flag rules, R0 = 0, word-addressed unified
// memory, link = address of the linking instruction). Each clock cycle the
// core's PC, instruction, flags and registers are compared with the model;
// at the end of a run the whole memory is read back through the loader port
// and compared too.
//
// Phase 1 runs a directed program: building a 16-bit constant with SETHI then
// ADD, a 32-bit addition and subtraction chained through ADDX/SUBX, shift left
// by adding a value to itself, LSR, the logic functions, loads and stores with
// register and immediate offsets, a subroutine called with BAL and returned
// from with JMPL, every conditional branch taken and not taken, a counted
// loop, and writes to R0. Its final results are also checked against values
// worked out by hand. Phase 2 fills all of memory with random words and runs
// them as a program for 4000 cycles, eight times over.
//
// Each mechanism (every opcode, each branch condition taken and not taken,
// carry-in used by ADDX/SUBX, a discarded write to R0, a store over an
// instruction that is later fetched, a call and return) is counted; one that
// never happened counts as a failure. One instruction completes per cycle,
// which the per-cycle comparison checks.
module risc16_top_tb;
  import risc16_pkg::*;

  logic  clk = 0, rst = 1;
  logic  ext_we = 0;
  word_t ext_addr = 0, ext_wdata = 0, ext_rdata;
  word_t pc, instr;
  logic  flag_c, flag_z;

  risc16_top dut (.clk(clk), .rst(rst), .ext_we(ext_we), .ext_addr(ext_addr),
                  .ext_wdata(ext_wdata), .ext_rdata(ext_rdata), .pc(pc),
                  .instr(instr), .flag_c(flag_c), .flag_z(flag_z));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- model
  logic [15:0] m [65536];
  logic [15:0] r [4];
  logic [15:0] mpc;
  logic        mc, mz;
  logic        written [65536];   // model: address stored to during the run

  // mechanism counters
  int n_op [16];
  int n_taken [4], n_not [4];
  int n_carry_in, n_r0_discard, n_selfmod, n_call_ret;
  logic [15:0] last_link;

  function automatic logic [15:0] sx7(logic [15:0] w);
    return {{9{w[6]}}, w[6:0]};
  endfunction
  function automatic logic [15:0] sx10(logic [15:0] w);
    return {{6{w[9]}}, w[9:0]};
  endfunction

  task automatic model_step();
    logic [15:0] w, a, b, res;
    logic [3:0]  op;
    logic [1:0]  d, s1, s2;
    logic [16:0] wide;
    logic        cond_ok, wr;
    w  = m[mpc];
    op = w[15:12]; d = w[11:10]; s1 = w[9:8]; s2 = w[6:5];
    a  = r[s1];
    b  = w[7] ? sx7(w) : r[s2];
    wr = 0; res = 0;
    n_op[op]++;
    if (written[mpc]) n_selfmod++;
    case (op)
      4'b0000: begin wide = {1'b0, a} + {1'b0, b};                 res = wide[15:0]; mc = wide[16]; end  // ADD
      4'b0001: begin wide = {1'b0, a} + {1'b0, b} + 17'(mc);
                     if (mc) n_carry_in++;                         res = wide[15:0]; mc = wide[16]; end  // ADDX
      4'b0100: begin res = a - b;               mc = (a < b); end                                       // SUB
      4'b0101: begin if (mc) n_carry_in++;
                     res = a - b - 16'(mc);     mc = ({1'b0, a} < {1'b0, b} + 17'(mc)); end             // SUBX
      4'b0011: begin res = a & b; mc = 0; end                                                            // AND
      4'b0010: begin res = a | b; mc = 0; end                                                            // OR
      4'b0111: begin res = a ^ b; mc = 0; end                                                            // XOR
      4'b0110: begin res = {1'b0, a[15:1]}; mc = a[0]; end                                               // LSR
      default: ;
    endcase
    if (op[3] == 1'b0) begin mz = (res == 0); wr = 1; end
    case (op)
      4'b1100: begin res = m[a + b]; wr = 1; end                    // LD
      4'b1101: begin m[a + b] = r[d]; written[a + b] = 1; end       // ST
      4'b1000: begin res = {w[9:0], 6'b0}; wr = 1; end              // SETHI
      default: ;
    endcase
    if (wr && d == 0) n_r0_discard++;
    case (op)
      4'b1010: begin                                                // BAL
        if (d != 0) begin r[d] = mpc; last_link = mpc; end
        else n_r0_discard++;
        mpc = mpc + sx10(w);
      end
      4'b1110: begin                                                // JMPL
        if (d == 0) n_r0_discard++;
        if (a + b == last_link + 1) n_call_ret++;
        if (d != 0) r[d] = mpc;
        mpc = a + b;
      end
      4'b1011: begin                                                // Bcond
        case (d)
          2'b00: cond_ok = mz;
          2'b01: cond_ok = !mz;
          2'b10: cond_ok = mc;
          default: cond_ok = !mc;
        endcase
        if (cond_ok) n_taken[d]++; else n_not[d]++;
        mpc = cond_ok ? mpc + sx10(w) : mpc + 1;
      end
      default: begin
        if (wr && d != 0) r[d] = res;
        mpc = mpc + 1;
      end
    endcase
    r[0] = 0;
  endtask

  // ------------------------------------------------------------ assembler
  function automatic logic [15:0] a_rr(logic [3:0] op, int d, int s1, int s2);
    return {op, 2'(d), 2'(s1), 1'b0, 2'(s2), 5'b0};
  endfunction
  function automatic logic [15:0] a_ri(logic [3:0] op, int d, int s1, int imm);
    return {op, 2'(d), 2'(s1), 1'b1, 7'(imm)};
  endfunction
  function automatic logic [15:0] a_b(logic [3:0] op, int d, int imm);
    return {op, 2'(d), 10'(imm)};
  endfunction
  function automatic logic [15:0] a_c(int cc, int imm);
    return {4'b1011, 2'(cc), 10'(imm)};
  endfunction

  localparam logic [3:0] ADD = 4'b0000, ADDX = 4'b0001, OR_ = 4'b0010, AND_ = 4'b0011,
                         SUB = 4'b0100, SUBX = 4'b0101, LSR = 4'b0110, XOR_ = 4'b0111,
                         SETHI = 4'b1000, BAL = 4'b1010, LD = 4'b1100, ST = 4'b1101,
                         JMPL = 4'b1110;
  localparam int EQ = 0, NE = 1, CS = 2, CC = 3;

  logic [15:0] prog [$];

  // ------------------------------------------------------------ utilities
  task automatic load_word(logic [15:0] a, logic [15:0] d);
    ext_we = 1; ext_addr = a; ext_wdata = d;
    @(posedge clk); #1;
    ext_we = 0;
  endtask

  task automatic compare_state(string when);
    checks++;
    if (pc !== mpc || flag_c !== mc || flag_z !== mz ||
        dut.u_rf.regs[1] !== r[1] || dut.u_rf.regs[2] !== r[2] || dut.u_rf.regs[3] !== r[3] ||
        (pc == mpc && instr !== m[mpc])) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: pc=%h instr=%h C=%b Z=%b R1..3=%h %h %h | model pc=%h instr=%h C=%b Z=%b R1..3=%h %h %h",
                 when, pc, instr, flag_c, flag_z, dut.u_rf.regs[1], dut.u_rf.regs[2], dut.u_rf.regs[3],
                 mpc, m[mpc], mc, mz, r[1], r[2], r[3]);
    end
  endtask

  // release reset and run n cycles in lock-step
  task automatic run(int n, string name);
    mpc = 0; mc = 0; mz = 0; r = '{default: 16'h0}; last_link = 16'hFFFF;
    @(negedge clk); rst = 0;
    for (int i = 0; i < n; i++) begin
      #1 compare_state(name);
      @(posedge clk);
      model_step();
      @(negedge clk);
    end
    compare_state(name);
    rst = 1;
    @(posedge clk); #1;
  endtask

  task automatic compare_memory(string name);
    int bad = 0;
    for (int a = 0; a < 65536; a++) begin
      ext_addr = 16'(a); #1;
      if (ext_rdata !== m[a]) begin
        bad++;
        if (bad < 5) $display("FAIL %s memory [%h] = %h, model %h", name, a, ext_rdata, m[a]);
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  task automatic expect_reg(int i, logic [15:0] v, string what);
    checks++;
    if (dut.u_rf.regs[i] !== v) begin
      failures++;
      $display("FAIL %s: R%0d = %h, expected %h", what, i, dut.u_rf.regs[i], v);
    end
  endtask

  task automatic expect_mem(logic [15:0] a, logic [15:0] v, string what);
    ext_addr = a; #1;
    checks++;
    if (ext_rdata !== v) begin
      failures++;
      $display("FAIL %s: mem[%h] = %h, expected %h", what, a, ext_rdata, v);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  // Data lives at 0x0200..; the subroutine at 0x0100. Final results:
  //   mem[0x210] = 0x3205 (SETHI 200 / ADD 5)
  //   mem[0x211..212] = 0x0001_0000 + 0x0000_FFFF = 0x0001_FFFF (lo, hi)
  //   mem[0x213..214] = 0x0001_FFFF - 0x0000_FFFF = 0x0001_0000 (lo, hi)
  //   mem[0x215] = 0x0030 (0x0006 doubled three times)
  //   mem[0x216] = 0x000F (loop count 15 via subroutine, counted down)
  //   mem[0x218] = 1 (ADDX carry in), mem[0x219] = 4 (SUBX borrow in)
  //   mem[0x21A] = 0x000F (logic functions, R0 reads zero)
  task automatic build_directed();
    prog.delete();
    // store an instruction word over a later slot, then execute it:
    // ADD R3,R0,9 encodes as 0x0C89 = (50 << 6) + 9
    prog.push_back(a_b (SETHI, 1, 50));
    prog.push_back(a_ri(ADD, 1, 1, 9));
    prog.push_back(a_ri(ST, 1, 0, 4));            // mem[4] = 0x0C89
    prog.push_back(a_ri(ADD, 3, 0, 1));           // R3 = 1
    prog.push_back(16'h0000);                     // becomes ADD R3,R0,9
    prog.push_back(a_ri(ST, 3, 0, -5));       // mem[0xFFFB] = R3 (= 9)
    // constant via SETHI + ADD
    prog.push_back(a_b (SETHI, 1, 200));          // R1 = 200 << 6 = 0x3200
    prog.push_back(a_ri(ADD, 1, 1, 5));           // R1 = 0x3205
    prog.push_back(a_b (SETHI, 2, 8));            // R2 = 0x0200 (data base)
    prog.push_back(a_ri(ST, 1, 2, 16));           // mem[0x210] = R1
    // 32-bit add: (hi,lo) 0x0001_0000 + 0x0000_FFFF
    prog.push_back(a_ri(SUB, 3, 0, 1));           // R3 = 0xFFFF, C = 1 (borrow)
    prog.push_back(a_ri(ADD, 1, 0, 0));           // R1 = 0 (lo a), C = 0
    prog.push_back(a_rr(ADD, 1, 1, 3));           // lo = 0 + 0xFFFF, C = 0
    prog.push_back(a_ri(ST, 1, 2, 17));
    prog.push_back(a_ri(ADD, 1, 0, 1));           // hi a = 1
    prog.push_back(a_ri(ADDX, 1, 1, 0));          // hi = 1 + 0 + C(0) = 1
    prog.push_back(a_ri(ST, 1, 2, 18));
    // carry-in taken: 0xFFFF + 1 sets C, then ADDX 0 + 0 + C = 1
    prog.push_back(a_ri(ADD, 1, 3, 1));           // R1 = 0, C = 1, Z = 1
    prog.push_back(a_ri(ADDX, 1, 0, 0));          // R1 = 1
    prog.push_back(a_ri(ST, 1, 2, 24));           // mem[0x218] = 1
    // 32-bit subtract: 0x0001_FFFF - 0x0000_FFFF
    prog.push_back(a_ri(LD, 1, 2, 17));           // lo
    prog.push_back(a_rr(SUB, 1, 1, 3));           // 0xFFFF - 0xFFFF = 0, C = 0
    prog.push_back(a_ri(ST, 1, 2, 19));
    prog.push_back(a_ri(LD, 1, 2, 18));           // hi = 1
    prog.push_back(a_ri(SUBX, 1, 1, 0));          // 1 - 0 - 0 = 1
    prog.push_back(a_ri(ST, 1, 2, 20));
    // borrow-in taken: 0 - 1 borrows, then SUBX 5 - 0 - 1 = 4
    prog.push_back(a_ri(SUB, 1, 0, 1));
    prog.push_back(a_ri(ADD, 3, 0, 5));           // clears C: must re-borrow
    prog.push_back(a_ri(SUB, 1, 0, 1));           // C = 1
    prog.push_back(a_ri(SUBX, 1, 3, 0));          // 5 - 0 - 1 = 4
    prog.push_back(a_ri(ST, 1, 2, 25));           // mem[0x219] = 4
    // shift left by adding to itself, LSR
    prog.push_back(a_ri(OR_, 1, 0, 12));          // 12
    prog.push_back(a_ri(LSR, 1, 1, 0));           // 6, C = 0
    prog.push_back(a_rr(ADD, 1, 1, 1));           // 12
    prog.push_back(a_rr(ADD, 1, 1, 1));           // 24
    prog.push_back(a_rr(ADD, 1, 1, 1));           // 48 = 0x30
    prog.push_back(a_ri(ST, 1, 2, 21));
    // logic and R0
    prog.push_back(a_ri(XOR_, 1, 1, -1));      // 0x30 ^ 0xFFFF = 0xFFCF
    prog.push_back(a_ri(AND_, 1, 1, 15));      // 0x000F
    prog.push_back(a_ri(ADD, 0, 1, 3));           // R0 write discarded
    prog.push_back(a_rr(OR_, 1, 1, 0));           // R1 | R0 = 0x000F (R0 still 0)
    prog.push_back(a_ri(ST, 1, 2, 26));           // mem[0x21A] = 0x000F
    // counted loop through a subroutine: R3 = 15 calls, R1 counts
    prog.push_back(a_ri(ADD, 3, 0, 15));
    prog.push_back(a_ri(ADD, 1, 0, 0));
    // loop:
    prog.push_back(a_b (BAL, 2, 256 - prog.size()));  // call sub at 0x100, link in R2
    prog.push_back(a_ri(SUB, 3, 3, 1));
    prog.push_back(a_c (NE, -2));                 // back to the BAL while R3 != 0
    prog.push_back(a_b (SETHI, 2, 8));            // restore data base
    prog.push_back(a_ri(ST, 1, 2, 22));           // mem[0x216] = 15
    // branch cases; R3 accumulates a mask
    prog.push_back(a_ri(ADD, 3, 0, 0));           // Z = 1, C = 0
    prog.push_back(a_c (NE, 2));                  // not taken
    prog.push_back(a_ri(OR_, 3, 3, 1));
    prog.push_back(a_c (EQ, 2));                  // taken (Z from ADD? no: OR cleared Z)
    prog.push_back(a_ri(OR_, 3, 3, 2));
    prog.push_back(a_ri(SUB, 1, 0, 1));           // 0 - 1: C = 1, Z = 0
    prog.push_back(a_c (CC, 2));                  // not taken
    prog.push_back(a_ri(OR_, 3, 3, 4));           // C cleared, Z = 0
    prog.push_back(a_c (CS, 2));                  // not taken
    prog.push_back(a_ri(OR_, 3, 3, 8));
    prog.push_back(a_ri(SUB, 1, 0, 1));           // C = 1
    prog.push_back(a_c (CS, 2));                  // taken
    prog.push_back(a_ri(OR_, 3, 3, 16));          // skipped
    prog.push_back(a_ri(SUB, 1, 1, 0));           // R1 = 0xFFFF - 0: C = 0, Z = 0
    prog.push_back(a_c (CC, 2));                  // taken
    prog.push_back(a_ri(OR_, 3, 3, 32));          // skipped
    prog.push_back(a_ri(SUB, 1, 1, 1));           // Z = 0
    prog.push_back(a_c (NE, 2));                  // taken
    prog.push_back(a_ri(OR_, 3, 3, 64));          // skipped
    prog.push_back(a_ri(XOR_, 1, 1, 0));          // flags from R1 != 0
    prog.push_back(a_ri(SUB, 1, 1, 0));
    prog.push_back(a_ri(AND_, 1, 1, 0));          // Z = 1
    prog.push_back(a_c (EQ, 2));                  // taken
    prog.push_back(a_ri(OR_, 3, 3, 32));          // skipped
    prog.push_back(a_ri(ST, 3, 2, 23));           // mem[0x217] = mask
    // halt: branch to self with R0 as link
    prog.push_back(a_b (BAL, 0, 0));
  endtask

  // subroutine at 0x100: R1 = R1 + 1, return with JMPL R2+1
  task automatic load_directed();
    for (int a = 0; a < 65536; a++) begin
      m[a] = 16'h0; written[a] = 0;
    end
    foreach (prog[i]) m[i] = prog[i];
    m[16'h100] = a_ri(ADD, 1, 1, 1);
    m[16'h101] = a_ri(JMPL, 0, 2, 1);
    for (int a = 0; a < 65536; a++) load_word(16'(a), m[a]);
  endtask

  initial begin
    int mech_fail;
    n_op = '{default: 0}; n_taken = '{default: 0}; n_not = '{default: 0};
    n_carry_in = 0; n_r0_discard = 0; n_selfmod = 0; n_call_ret = 0;
    @(posedge clk); #1;

    // ---- phase 1: directed program
    build_directed();
    load_directed();
    run(200, "directed");
    compare_memory("directed");
    expect_mem(16'h0210, 16'h3205, "SETHI/ADD constant");
    expect_mem(16'h0211, 16'hFFFF, "32-bit add low");
    expect_mem(16'h0212, 16'h0001, "32-bit add high");
    expect_mem(16'h0213, 16'h0000, "32-bit sub low");
    expect_mem(16'h0214, 16'h0001, "32-bit sub high");
    expect_mem(16'h0215, 16'h0030, "shift left by add");
    expect_mem(16'h0216, 16'h000F, "subroutine loop count");
    expect_mem(16'h0218, 16'h0001, "ADDX carry in");
    expect_mem(16'h0219, 16'h0004, "SUBX borrow in");
    expect_mem(16'h021A, 16'h000F, "logic and R0");
    expect_mem(16'hFFFB, 16'h0009, "stored instruction executed");
    checks++;
    if (int'(mpc) != prog.size() - 1) begin
      failures++; $display("FAIL directed program did not reach its final loop");
    end

    // ---- phase 2: random memory image executed as a program
    for (int k = 0; k < 8; k++) begin
      for (int a = 0; a < 65536; a++) begin
        m[a] = 16'($urandom); written[a] = 0;
        load_word(16'(a), m[a]);
      end
      run(4000, "random");
      compare_memory("random");
    end

    // ---- mechanisms
    mech_fail = 0;
    for (int i = 0; i < 16; i++)
      if (i != 9 && i != 15 && n_op[i] == 0) begin
        mech_fail++; $display("MISSING opcode %b never executed", 4'(i));
      end
    for (int i = 0; i < 4; i++) begin
      if (n_taken[i] == 0) begin mech_fail++; $display("MISSING cond %0d never taken", i); end
      if (n_not[i] == 0)   begin mech_fail++; $display("MISSING cond %0d never fell through", i); end
    end
    if (n_carry_in == 0)   begin mech_fail++; $display("MISSING carry-in"); end
    if (n_r0_discard == 0) begin mech_fail++; $display("MISSING R0 discard"); end
    if (n_selfmod == 0)    begin mech_fail++; $display("MISSING stored-then-fetched word"); end
    if (n_call_ret == 0)   begin mech_fail++; $display("MISSING call/return"); end
    $display("opcode counts: ADD %0d ADDX %0d OR %0d AND %0d SUB %0d SUBX %0d LSR %0d XOR %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("               SETHI %0d BAL %0d Bcond %0d LD %0d ST %0d JMPL %0d unassigned %0d",
             n_op[8], n_op[10], n_op[11], n_op[12], n_op[13], n_op[14], n_op[9] + n_op[15]);
    $display("branches taken/not: EQ %0d/%0d NE %0d/%0d CS %0d/%0d CC %0d/%0d",
             n_taken[0], n_not[0], n_taken[1], n_not[1], n_taken[2], n_not[2], n_taken[3], n_not[3]);
    $display("carry-in %0d, R0 discards %0d, fetched stored words %0d, call/return %0d",
             n_carry_in, n_r0_discard, n_selfmod, n_call_ret);
    checks++;
    failures += mech_fail;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
