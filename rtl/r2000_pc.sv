// r2000_pc: the program counter, a register with its own source multiplexer.
//
// On a rising clock edge: reset (synchronous) clears the PC to 0; otherwise, if
// pc_ld is high, the PC loads either the ALU output (pc_sel = PCSEL_ALU, used
// for PC + 1 during fetch and PC + offset for a taken beq) or the jump target
// {6'b0, Inst[25:0]} (pc_sel = PCSEL_TARGET, used by j). The PC counts 32-bit
// words, not bytes. All of this follows the published design.
module r2000_pc
  import r2000_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t alu_out,
  input  word_t inst,
  input  logic  pc_sel,
  input  logic  pc_ld,
  output word_t pc
);

  word_t src;
  assign src = (pc_sel == PCSEL_ALU) ? alu_out : {6'b000000, inst[25:0]};

  always_ff @(posedge clk) begin
    if (rst)        pc <= '0;
    else if (pc_ld) pc <= src;
  end

endmodule
