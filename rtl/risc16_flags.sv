// risc16_flags: the C and Z condition-code flags and the branch condition test.
//
// The flags register loads the ALU's c and z on the rising clock edge when
// we is high (every arithmetic/logic instruction) and holds them otherwise
// (loads, stores, SETHI and control transfers leave them alone). taken is the
// combinational result of the 2-bit condition of a conditional branch, tested
// against the flags as they stand before the current instruction:
//   00 BEQ Z==1   01 BNE Z==0   10 BCS C==1   11 BCC C==0
// The flags, the condition encoding and which instructions update the flags
// follow the instruction set; clearing both flags at reset is this design's
// choice. An assertion checks that the flags hold when not loaded.
module risc16_flags
  import risc16_pkg::*;
(
  input  logic  clk,
  input  logic  rst,       // synchronous, active high
  input  logic  we,        // load c_in and z_in
  input  logic  c_in,
  input  logic  z_in,
  input  cond_e cond,
  output logic  c,         // current carry/borrow flag
  output logic  z,         // current zero flag
  output logic  taken      // condition holds
);

  always_ff @(posedge clk) begin
    if (rst) begin
      c <= 1'b0;
      z <= 1'b0;
    end else if (we) begin
      c <= c_in;
      z <= z_in;
    end
  end

  // the flags change only when loaded
  a_hold: assert property (@(posedge clk) disable iff (rst) !we |=> $stable({c, z}))
    else $error("flags changed without a load");

  always_comb begin
    unique case (cond)
      CC_EQ:   taken =  z;
      CC_NE:   taken = ~z;
      CC_CS:   taken =  c;
      CC_CC:   taken = ~c;
      default: taken = 1'b0;
    endcase
  end

endmodule
