// risc16_flags_tb: self-checking test of the condition flags.
//
// Checks that reset clears C and Z, then for 4000 cycles drives random flag
// values with a random load enable and a random condition. Before each edge it
// checks the held flags and that taken equals the condition's rule
// (BEQ Z, BNE !Z, BCS C, BCC !C) on the held flags; after the edge, that the
// flags were loaded only when enabled.
module risc16_flags_tb;
  import risc16_pkg::*;

  logic  clk = 0, rst = 1, we = 0, ci = 0, zi = 0;
  cond_e cond = CC_EQ;
  logic  c, z, taken;
  logic  mc, mz, exp_t;
  int    checks = 0, failures = 0;

  risc16_flags dut (.clk(clk), .rst(rst), .we(we), .c_in(ci), .z_in(zi),
                    .cond(cond), .c(c), .z(z), .taken(taken));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc = 0; mz = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      we   = 1'($urandom);
      ci   = 1'($urandom);
      zi   = 1'($urandom);
      cond = cond_e'($urandom_range(0, 3));
      #1;
      case (cond)
        CC_EQ: exp_t = mz == 1;
        CC_NE: exp_t = mz == 0;
        CC_CS: exp_t = mc == 1;
        CC_CC: exp_t = mc == 0;
      endcase
      checks++;
      if (c !== mc || z !== mz || taken !== exp_t) begin
        failures++;
        $display("FAIL cond=%s c=%b z=%b taken=%b, expected c=%b z=%b taken=%b",
                 cond.name(), c, z, taken, mc, mz, exp_t);
      end
      @(posedge clk);
      if (we) begin mc = ci; mz = zi; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
