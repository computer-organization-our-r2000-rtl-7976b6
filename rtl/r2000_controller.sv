// r2000_controller: the Moore state machine that sequences every instruction.
//
// States (published codes): fetch 000, decode 100, execute1 001, execute2 010,
// execute3 011. Synchronous reset enters fetch. Each instruction runs
//   fetch    : memory[PC] -> IR, PC + 1 -> PC (the ALU does the increment)
//   decode   : nothing is driven; the register file captures rs and rt in
//              RegA and RegB at the end of this cycle
//   execute1..3 as the instruction needs:
//     add/sub/and/or : rd <- RegA op RegB                         (1 state)
//     slt            : execute1 computes RegA - RegB; neg selects execute2
//                      (rd <- 1) or execute3 (rd <- 0)            (2 states)
//     lw             : ALUout <- RegA + imm; MBR <- mem[ALUout];
//                      rt <- MBR                                  (3 states)
//     sw             : ALUout <- RegA + imm; mem[ALUout] <- RegB  (2 states)
//     beq            : execute1 computes RegA - RegB; if zero, execute2 does
//                      PC <- PC + imm, else back to fetch         (1 or 2 states)
//     addi           : rt <- RegA + imm                           (1 state)
//     j              : PC <- {6'b0, Inst[25:0]}                   (1 state)
//     halt           : stays in execute1 until reset; halted = 1
// The outputs depend only on the state and the instruction register (which does
// not change outside fetch), so they are free of combinational paths from the
// ALU flags; the flags only steer the next state.
// The state codes, the fetch/decode/add/slt/lw steps and the control-signal
// encodings follow the published design. The execute sequences for sw, beq,
// addi, j and halt are this implementation's completion of it, limited by the
// datapath: memory can only be addressed from the PC or the ALU output register,
// and the one ALU cannot compare and add the branch offset in the same cycle.
// An opcode or R-type function outside the subset is treated like halt.
module r2000_controller
  import r2000_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  inst,
  input  logic   zero,
  input  logic   neg,
  output ctrl_t  ctrl,
  output state_e state,
  output logic   halted
);

  opcode_e op;
  funct_e  fn;
  logic    op_known, fn_known, illegal;

  assign op = opcode_e'(inst[31:26]);
  assign fn = funct_e'(inst[5:0]);

  always_comb begin
    unique case (inst[31:26])
      OP_ALU, OP_J, OP_BEQ, OP_ADDI, OP_LW, OP_SW: op_known = 1'b1;
      default:                                     op_known = 1'b0;
    endcase
    unique case (inst[5:0])
      FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT: fn_known = 1'b1;
      default:                               fn_known = 1'b0;
    endcase
    illegal = !op_known || (op == OP_ALU && !fn_known);
  end

  assign halted = (state == S_EXECUTE1) && illegal;

  // Next-state logic
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_FETCH;
    end else begin
      unique case (state)
        S_FETCH:  state <= S_DECODE;
        S_DECODE: state <= S_EXECUTE1;
        S_EXECUTE1: begin
          if (illegal)                          state <= S_EXECUTE1;  // halt
          else if (op == OP_ALU && fn == FN_SLT) state <= neg  ? S_EXECUTE2 : S_EXECUTE3;
          else if (op == OP_BEQ)                 state <= zero ? S_EXECUTE2 : S_FETCH;
          else if (op == OP_LW || op == OP_SW)   state <= S_EXECUTE2;
          else                                   state <= S_FETCH;
        end
        S_EXECUTE2: state <= (op == OP_LW) ? S_EXECUTE3 : S_FETCH;
        S_EXECUTE3: state <= S_FETCH;
        default:    state <= S_FETCH;
      endcase
    end
  end

  // Output logic (Moore: state and instruction register only)
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S_FETCH: begin
        ctrl.pc_ma_en = 1'b1;
        ctrl.mr       = 1'b1;
        ctrl.ir_ld    = 1'b1;
        ctrl.src_a    = SRCA_PC;
        ctrl.src_b    = SRCB_ONE;
        ctrl.alu_op   = ALU_ADD;
        ctrl.pc_sel   = PCSEL_ALU;
        ctrl.pc_ld    = 1'b1;
      end
      S_DECODE: ;  // operands propagate into RegA/RegB, nothing else
      S_EXECUTE1: begin
        if (!illegal) begin
          unique case (op)
            OP_ALU: begin
              ctrl.src_a = SRCA_REG;
              ctrl.src_b = SRCB_REG;
              unique case (fn)
                FN_ADD:  ctrl.alu_op = ALU_ADD;
                FN_SUB:  ctrl.alu_op = ALU_SUB;
                FN_AND:  ctrl.alu_op = ALU_AND;
                FN_OR:   ctrl.alu_op = ALU_OR;
                default: ctrl.alu_op = ALU_SUB;  // slt: compare by subtracting
              endcase
              ctrl.wr_reg_sel  = WREG_RD;
              ctrl.wr_data_sel = WDATA_ALU;
              ctrl.reg_write   = (fn != FN_SLT);
            end
            OP_LW, OP_SW: begin  // ALUout register <- rs + offset
              ctrl.src_a  = SRCA_REG;
              ctrl.src_b  = SRCB_IMMED;
              ctrl.alu_op = ALU_ADD;
            end
            OP_BEQ: begin        // zero <- (rs - rt == 0)
              ctrl.src_a  = SRCA_REG;
              ctrl.src_b  = SRCB_REG;
              ctrl.alu_op = ALU_SUB;
            end
            OP_ADDI: begin       // rt <- rs + offset
              ctrl.src_a       = SRCA_REG;
              ctrl.src_b       = SRCB_IMMED;
              ctrl.alu_op      = ALU_ADD;
              ctrl.wr_reg_sel  = WREG_RT;
              ctrl.wr_data_sel = WDATA_ALU;
              ctrl.reg_write   = 1'b1;
            end
            OP_J: begin          // PC <- target
              ctrl.pc_sel = PCSEL_TARGET;
              ctrl.pc_ld  = 1'b1;
            end
            default: ;
          endcase
        end
      end
      S_EXECUTE2: begin
        if (op == OP_ALU) begin        // slt, rs < rt: rd <- 1
          ctrl.src_b       = SRCB_ONE;
          ctrl.alu_op      = ALU_PASSB;
          ctrl.wr_reg_sel  = WREG_RD;
          ctrl.wr_data_sel = WDATA_ALU;
          ctrl.reg_write   = 1'b1;
        end else if (op == OP_LW) begin // MBR <- mem[ALUout]
          ctrl.alu_ma_en = 1'b1;
          ctrl.mr        = 1'b1;
          ctrl.mbr_ld    = 1'b1;
        end else if (op == OP_SW) begin // mem[ALUout] <- RegB
          ctrl.alu_ma_en  = 1'b1;
          ctrl.regb_md_en = 1'b1;
          ctrl.mw         = 1'b1;
        end else if (op == OP_BEQ) begin // taken: PC <- PC + offset
          ctrl.src_a  = SRCA_PC;
          ctrl.src_b  = SRCB_IMMED;
          ctrl.alu_op = ALU_ADD;
          ctrl.pc_sel = PCSEL_ALU;
          ctrl.pc_ld  = 1'b1;
        end
      end
      S_EXECUTE3: begin
        if (op == OP_ALU) begin        // slt, rs >= rt: rd <- 0
          ctrl.src_b       = SRCB_ZERO;
          ctrl.alu_op      = ALU_PASSB;
          ctrl.wr_reg_sel  = WREG_RD;
          ctrl.wr_data_sel = WDATA_ALU;
          ctrl.reg_write   = 1'b1;
        end else if (op == OP_LW) begin // rt <- MBR
          ctrl.wr_reg_sel  = WREG_RT;
          ctrl.wr_data_sel = WDATA_MBR;
          ctrl.reg_write   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  // At most one driver on each memory bus
  a_addr_bus_one_driver: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.pc_ma_en && ctrl.alu_ma_en));
  a_data_bus_one_driver: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mr && ctrl.regb_md_en));

endmodule
