// r2000_pkg: shared types and constants of the multi-cycle R2000-subset processor.
//
// Instruction formats (32 bits): R = op[31:26] rs[25:21] rt[20:16] rd[15:11]
// shft[10:6] funct[5:0]; I = op rs rt imm[15:0]; J = op target[25:0].
// The opcode and function-code values, the controller state codes and the
// one-hot ALU operation codes follow the published design. The enum types, the
// decoded-instruction struct and the encoding helpers (used by testbenches to
// build programs) are this implementation's own.
package r2000_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Primary opcode, Inst[31:26]
  typedef enum logic [5:0] {
    OP_ALU  = 6'h00,  // R-type, function in Inst[5:0]
    OP_J    = 6'h02,
    OP_BEQ  = 6'h04,
    OP_ADDI = 6'h08,
    OP_LW   = 6'h23,
    OP_SW   = 6'h2b,
    OP_HALT = 6'h3f
  } opcode_e;

  // R-type function code, Inst[5:0]
  typedef enum logic [5:0] {
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_SLT = 6'h2a
  } funct_e;

  // Controller states, with the published 3-bit codes
  typedef enum logic [2:0] {
    S_FETCH    = 3'b000,
    S_DECODE   = 3'b100,
    S_EXECUTE1 = 3'b001,
    S_EXECUTE2 = 3'b010,
    S_EXECUTE3 = 3'b011
  } state_e;

  // ALU A-input select
  typedef enum logic {
    SRCA_REG = 1'b0,
    SRCA_PC  = 1'b1
  } srca_e;

  // ALU B-input select
  typedef enum logic [1:0] {
    SRCB_REG   = 2'b00,
    SRCB_ZERO  = 2'b01,
    SRCB_IMMED = 2'b10,
    SRCB_ONE   = 2'b11
  } srcb_e;

  // One-hot ALU operation
  typedef enum logic [5:0] {
    ALU_NONE  = 6'b000000,  // no operation selected, result is zero
    ALU_ADD   = 6'b000001,
    ALU_SUB   = 6'b000010,
    ALU_AND   = 6'b000100,
    ALU_OR    = 6'b001000,
    ALU_PASSA = 6'b010000,
    ALU_PASSB = 6'b100000
  } alu_op_e;

  // PC load source
  localparam logic PCSEL_TARGET = 1'b0;
  localparam logic PCSEL_ALU    = 1'b1;
  // Register-file write data source
  localparam logic WDATA_ALU = 1'b0;
  localparam logic WDATA_MBR = 1'b1;
  // Register-file write register select
  localparam logic WREG_RT = 1'b0;
  localparam logic WREG_RD = 1'b1;

  // Register 31 reads as zero and ignores writes
  localparam reg_idx_t REG_ZERO = 5'd31;

  // All control outputs of the controller, one struct
  typedef struct packed {
    srca_e   src_a;
    srcb_e   src_b;
    alu_op_e alu_op;
    logic    mr;          // memory read, memory drives the data bus
    logic    mw;          // memory write at the end of the cycle
    logic    pc_ma_en;    // PC drives the memory address bus
    logic    alu_ma_en;   // ALUout register drives the memory address bus
    logic    regb_md_en;  // RegB drives the memory data bus
    logic    mbr_ld;      // MBR loads from the memory data bus
    logic    ir_ld;       // IR loads from the memory data bus
    logic    reg_write;   // register file write enable
    logic    wr_data_sel; // WDATA_ALU / WDATA_MBR
    logic    wr_reg_sel;  // WREG_RT / WREG_RD
    logic    pc_sel;      // PCSEL_TARGET / PCSEL_ALU
    logic    pc_ld;       // PC load enable
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    src_a: SRCA_REG, src_b: SRCB_REG, alu_op: ALU_NONE,
    mr: 1'b0, mw: 1'b0, pc_ma_en: 1'b0, alu_ma_en: 1'b0, regb_md_en: 1'b0,
    mbr_ld: 1'b0, ir_ld: 1'b0, reg_write: 1'b0, wr_data_sel: WDATA_ALU,
    wr_reg_sel: WREG_RT, pc_sel: PCSEL_ALU, pc_ld: 1'b0};

  // Instruction encoders (testbench program building)
  function automatic word_t enc_r(funct_e fn, reg_idx_t rs, reg_idx_t rt, reg_idx_t rd);
    return {OP_ALU, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic word_t enc_i(opcode_e op, reg_idx_t rs, reg_idx_t rt, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic word_t enc_j(opcode_e op, logic [25:0] target);
    return {op, target};
  endfunction

  function automatic word_t sign_ext16(logic [15:0] imm);
    return {{16{imm[15]}}, imm};
  endfunction

endpackage
