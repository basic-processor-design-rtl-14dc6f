// risc16_mem_tb: self-checking test of the unified memory at its full
// 2^16-word size.
//
// Writes a pattern derived from the address (addr * 40503 ^ 16'h5a3c, mod
// 2^16) to every word through the data port, reads it all back through both
// the fetch and the data port, then does 3000 random writes interleaved with
// reads checked against a model array, including a read of the written
// address in the same cycle (old data) and in the next (new data).
module risc16_mem_tb;
  import risc16_pkg::*;

  logic  clk = 0, we = 0;
  word_t iaddr = 0, daddr = 0, wdata = 0, idata, rdata;
  word_t model [65536];
  int    checks = 0, failures = 0;

  risc16_mem dut (.clk(clk), .iaddr(iaddr), .idata(idata), .daddr(daddr),
                  .rdata(rdata), .we(we), .wdata(wdata));

  always #5 clk = ~clk;

  function automatic word_t pattern(int a);
    return 16'(a * 40503) ^ 16'h5a3c;
  endfunction

  task automatic chk(string port, word_t a, word_t got);
    checks++;
    if (got !== model[a]) begin
      failures++;
      if (failures < 20) $display("FAIL %s [%h] = %h, expected %h", port, a, got, model[a]);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    we = 1;
    for (int a = 0; a < 65536; a++) begin
      daddr = 16'(a); wdata = pattern(a); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < 65536; a++) begin
      iaddr = 16'(a); daddr = 16'(65535 - a); #1;
      chk("fetch", iaddr, idata);
      chk("data",  daddr, rdata);
    end
    for (int n = 0; n < 3000; n++) begin
      we = 1; daddr = 16'($urandom); wdata = 16'($urandom); iaddr = daddr;
      #1;
      chk("fetch-before", iaddr, idata);
      @(posedge clk); model[daddr] = wdata; #1;
      we = 0;
      chk("fetch-after", iaddr, idata);
      chk("data-after",  daddr, rdata);
      iaddr = 16'($urandom); #1;
      chk("fetch-random", iaddr, idata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
