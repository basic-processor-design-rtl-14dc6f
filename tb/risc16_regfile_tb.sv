// risc16_regfile_tb: self-checking test of the register file.
//
// After reset it checks that R1..R3 read zero, then runs 5000 clock cycles of
// random writes (R0 included) and random reads on all three ports, comparing
// every read with a model array in which R0 stays zero. Reads are checked
// before the clock edge, so a same-cycle write must not yet be visible.
module risc16_regfile_tb;
  import risc16_pkg::*;

  logic      clk = 0, rst = 1, we = 0;
  reg_addr_t ra1 = 0, ra2 = 0, ra3 = 0, wa = 0;
  word_t     rd1, rd2, rd3, wd = 0;
  word_t     model [4];
  int        checks = 0, failures = 0;

  risc16_regfile dut (.clk(clk), .rst(rst), .raddr1(ra1), .rdata1(rd1),
                      .raddr2(ra2), .rdata2(rd2), .raddr3(ra3), .rdata3(rd3),
                      .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  task automatic chk(string port, reg_addr_t a, word_t got);
    checks++;
    if (got !== model[a]) begin
      failures++;
      $display("FAIL %s R%0d = %h, expected %h", port, a, got, model[a]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) model[i] = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 4; i++) begin
      ra1 = reg_addr_t'(i); #1; chk("r1", ra1, rd1);
    end
    for (int n = 0; n < 5000; n++) begin
      we  = 1'($urandom);
      wa  = reg_addr_t'($urandom);
      wd  = 16'($urandom);
      ra1 = reg_addr_t'($urandom);
      ra2 = reg_addr_t'($urandom);
      ra3 = n[0] ? wa : reg_addr_t'($urandom);
      #1;
      chk("r1", ra1, rd1);
      chk("r2", ra2, rd2);
      chk("r3", ra3, rd3);
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
