// r2000: multi-cycle 32-bit processor for a subset of the MIPS R2000
// instruction set (add, sub, and, or, slt, lw, sw, beq, addi, j, halt), with
// one memory shared by instructions and data (Princeton organisation).
//
// Datapath: PC, instruction register IR, memory buffer register MBR, a 32 x 32
// register file with registered outputs RegA/RegB, one ALU (which also
// increments the PC) and an ALU output register that loads every cycle. Two
// shared buses connect them to memory:
//   memory address bus : PC (pc_ma_en) or the ALU output register (alu_ma_en)
//   memory data bus    : memory read data (mr) or RegB (regb_md_en); IR and
//                        MBR load from it
// In the published schematic the bus drivers are three-state buffers. Here
// each bus is a multiplexer selected by the same enables (zero when no driver
// is enabled), and the controller asserts that no two drivers are on at once.
// The controller (r2000_controller) takes 3 cycles for add/sub/and/or/addi/j
// and a not-taken beq, 4 for slt, sw and a taken beq, and 5 for lw.
//
// Interface: clk, rst (synchronous, active high; PC <- 0 and fetch next),
// halted (the machine has executed halt or an unknown instruction and waits for
// reset), plus the PC, IR and controller state for observation. The memory is
// inside; its contents are loaded by the environment through the hierarchy
// (u_mem.mem). MEM_DEPTH defaults to the published 256 words.
module r2000
  import r2000_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic   clk,
  input  logic   rst,
  output logic   halted,
  output word_t  pc_o,
  output word_t  ir_o,
  output state_e state_o
);

  ctrl_t ctrl;
  word_t pc, ir, mbr, reg_a, reg_b, alu_out, alu_out_reg;
  word_t ma_bus, md_bus, mem_rdata;
  logic  zero, neg;

  r2000_controller u_ctrl (
    .clk, .rst, .inst(ir), .zero, .neg, .ctrl, .state(state_o), .halted
  );

  r2000_pc u_pc (
    .clk, .rst, .alu_out, .inst(ir), .pc_sel(ctrl.pc_sel), .pc_ld(ctrl.pc_ld), .pc
  );

  r2000_reg32 u_ir (.clk, .rst, .ld(ctrl.ir_ld),  .d(md_bus), .q(ir));
  r2000_reg32 u_mbr(.clk, .rst, .ld(ctrl.mbr_ld), .d(md_bus), .q(mbr));
  r2000_reg32 u_alu_out_reg (.clk, .rst, .ld(1'b1), .d(alu_out), .q(alu_out_reg));

  r2000_regfile u_rf (
    .clk, .rst, .mbr, .alu_out, .inst(ir),
    .reg_write(ctrl.reg_write), .wr_data_sel(ctrl.wr_data_sel),
    .wr_reg_sel(ctrl.wr_reg_sel), .reg_a, .reg_b
  );

  r2000_alu u_alu (
    .reg_a, .pc, .inst(ir), .reg_b, .op(ctrl.alu_op),
    .src_a(ctrl.src_a), .src_b(ctrl.src_b), .alu_out, .zero, .neg
  );

  // Memory address bus: PC or ALU output register
  always_comb begin
    if (ctrl.pc_ma_en)       ma_bus = pc;
    else if (ctrl.alu_ma_en) ma_bus = alu_out_reg;
    else                     ma_bus = '0;
  end

  // Memory data bus: memory read data or RegB
  always_comb begin
    if (ctrl.mr)              md_bus = mem_rdata;
    else if (ctrl.regb_md_en) md_bus = reg_b;
    else                      md_bus = '0;
  end

  r2000_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .address(ma_bus), .read(ctrl.mr), .write(ctrl.mw),
    .wdata(md_bus), .rdata(mem_rdata)
  );

  assign pc_o = pc;
  assign ir_o = ir;

endmodule
