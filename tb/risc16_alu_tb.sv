// risc16_alu_tb: self-checking test of the ALU.
//
// Drives directed corner cases and 20000 random operand pairs through all
// eight functions and compares y, c and z with a reference computed here in
// 32-bit integer arithmetic: carry is bit 16 of the unsigned sum, borrow is
// "a < b + cin", LSR's carry is the bit shifted out, and the logical
// functions clear the carry. The ALU is combinational; each vector is checked
// after a 1 ns settle.
module risc16_alu_tb;
  import risc16_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  logic    cin, c, z;
  int      checks = 0, failures = 0;

  risc16_alu dut (.op(op), .a(a), .b(b), .cin(cin), .y(y), .c(c), .z(z));

  task automatic check_one(alu_op_e o, word_t ta, word_t tb, logic tci);
    int unsigned ua, ub, r, ci;
    logic [15:0] ey;
    logic ec;
    ua = ta; ub = tb;
    ci = (o == ALU_ADDX || o == ALU_SUBX) ? int'(tci) : 0;
    case (o)
      ALU_ADD, ALU_ADDX: begin r = ua + ub + ci; ey = r[15:0]; ec = (r > 32'hFFFF); end
      ALU_SUB, ALU_SUBX: begin ey = 16'(ua - ub - ci); ec = (ua < ub + ci); end
      ALU_AND: begin ey = ta & tb; ec = 0; end
      ALU_OR:  begin ey = ta | tb; ec = 0; end
      ALU_XOR: begin ey = ta ^ tb; ec = 0; end
      ALU_LSR: begin ey = 16'(ua / 2); ec = ta[0]; end
      default: begin ey = 'x; ec = 'x; end
    endcase
    op = o; a = ta; b = tb; cin = tci;
    #1;
    checks++;
    if (y !== ey || c !== ec || z !== (ey == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h cin=%b: y=%h c=%b z=%b, expected y=%h c=%b z=%b",
               o.name(), ta, tb, tci, y, c, z, ey, ec, ey == 0);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e o;
    for (int k = 0; k < 8; k++) begin
      o = alu_op_e'(k);
      check_one(o, 16'h0000, 16'h0000, 1'b0);
      check_one(o, 16'h0000, 16'h0000, 1'b1);
      check_one(o, 16'hFFFF, 16'h0001, 1'b0);
      check_one(o, 16'hFFFF, 16'h0000, 1'b1);
      check_one(o, 16'h0001, 16'h0001, 1'b1);
      check_one(o, 16'h8000, 16'h8000, 1'b0);
      check_one(o, 16'h0001, 16'h0002, 1'b0);
      check_one(o, 16'h0003, 16'hFFFF, 1'b1);
    end
    for (int i = 0; i < 20000; i++) begin
      o = alu_op_e'($urandom_range(0, 7));
      check_one(o, 16'($urandom), 16'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
