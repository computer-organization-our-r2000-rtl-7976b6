// r2000_regfile: 32 x 32-bit register file with registered read ports.
//
// The read addresses come straight from the instruction: rs = Inst[25:21] and
// rt = Inst[20:16]. Every rising clock edge captures regs[rs] in reg_a and
// regs[rt] in reg_b, so the operands of an instruction are available in the
// cycle after it reaches the instruction register (the decode cycle loads them).
// A read in the same edge as a write returns the old value. The write port
// writes on a rising edge when reg_write is high; its register is rd =
// Inst[15:11] (wr_reg_sel = WREG_RD) or rt (WREG_RT), its data the MBR
// (wr_data_sel = WDATA_MBR) or the ALU output (WDATA_ALU). Register 31 is the
// zero register: writes to it are dropped and it always reads 0. This follows
// the published design; the reset that clears the registered outputs is this
// implementation's addition, and register 31 is a constant here rather than a
// storage word initialised to zero.
module r2000_regfile
  import r2000_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t mbr,
  input  word_t alu_out,
  input  word_t inst,
  input  logic  reg_write,
  input  logic  wr_data_sel,
  input  logic  wr_reg_sel,
  output word_t reg_a,
  output word_t reg_b
);

  word_t    regs [0:30];
  reg_idx_t rs, rt, rd, wr_reg;
  word_t    wr_data;

  assign rs = inst[25:21];
  assign rt = inst[20:16];
  assign rd = inst[15:11];
  assign wr_reg  = (wr_reg_sel == WREG_RD) ? rd : rt;
  assign wr_data = (wr_data_sel == WDATA_MBR) ? mbr : alu_out;

  always_ff @(posedge clk) begin
    if (reg_write && wr_reg != REG_ZERO) regs[wr_reg] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '0;
    end else begin
      reg_a <= (rs == REG_ZERO) ? '0 : regs[rs];
      reg_b <= (rt == REG_ZERO) ? '0 : regs[rt];
    end
  end

endmodule
