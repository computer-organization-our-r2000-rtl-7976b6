// r2000_reg32: a 32-bit register with a load enable.
//
// On a rising clock edge with ld high the register takes d; otherwise it keeps
// its value. q is the stored value. Used for the instruction register (IR), the
// memory buffer register (MBR) and the ALU output register, whose load enable
// is tied high so that it captures the ALU result every cycle, as in the
// published schematic. The optional synchronous reset clears the register; the
// published register has none, and the reset is this implementation's choice so
// that no register holds an unknown value after reset.
module r2000_reg32
  import r2000_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld,
  input  word_t d,
  output word_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end

endmodule
