// risc16_pc_tb: self-checking test of the program counter.
//
// Checks reset to address 0, then for 4000 cycles picks a random next-PC
// choice, condition result, offset in -512..+511 and absolute target, and
// compares pc_next before the edge and pc after it with a model that adds
// the offset to the current PC as a signed integer modulo 2^16.
module risc16_pc_tb;
  import risc16_pkg::*;

  logic    clk = 0, rst = 1, taken = 0;
  pc_sel_e sel = PC_SEQ;
  word_t   offset = 0, target = 0, pc, pc_next;
  int      mpc, exp_next, off;
  int      checks = 0, failures = 0;

  risc16_pc dut (.clk(clk), .rst(rst), .sel(sel), .taken(taken),
                 .offset(offset), .target(target), .pc(pc), .pc_next(pc_next));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL pc after reset %h", pc); end
    rst = 0;
    mpc = 0;
    for (int n = 0; n < 4000; n++) begin
      sel    = pc_sel_e'($urandom_range(0, 3));
      taken  = 1'($urandom);
      off    = int'($urandom_range(0, 1023)) - 512;
      offset = 16'(off);
      target = 16'($urandom);
      case (sel)
        PC_SEQ:  exp_next = (mpc + 1) & 16'hFFFF;
        PC_REL:  exp_next = (mpc + off) & 16'hFFFF;
        PC_COND: exp_next = taken ? ((mpc + off) & 16'hFFFF) : ((mpc + 1) & 16'hFFFF);
        PC_ABS:  exp_next = int'(target);
      endcase
      #1;
      checks++;
      if (int'(pc) != mpc || int'(pc_next) != exp_next) begin
        failures++;
        $display("FAIL sel=%s pc=%h next=%h, expected pc=%h next=%h",
                 sel.name(), pc, pc_next, mpc, exp_next);
      end
      @(posedge clk);
      mpc = exp_next;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
